// reg_file: the 32 x 32-bit register file.
//
// Two combinational read ports (Ra -> busA, Rb -> busB) and one write port:
// at the rising clock edge, when we (RegWr) is 1, busW is stored in register
// Rw. A read in the same cycle as a write to the same register returns the
// old value; the new one is visible from the next cycle. Register 0 always
// reads 0 and ignores writes, as in the MIPS architecture. The synchronous
// reset that clears every register is this design's addition, so that a run
// starts from a known state.
module reg_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [AW-1:0]    rw,
  input  logic             we,
  input  logic [WIDTH-1:0] busw,
  output logic [WIDTH-1:0] busa,
  output logic [WIDTH-1:0] busb
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  assign busa = (ra == '0) ? '0 : regs[ra];
  assign busb = (rb == '0) ? '0 : regs[rb];
endmodule
