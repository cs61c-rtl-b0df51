// inst_mem: the "ideal" instruction memory.
//
// 2**AW words of 32 bits, read combinationally: instr = MEM[addr] in the same
// cycle the PC is presented. addr is the byte address held in the PC; bits
// [AW+1:2] select the word and the others are ignored. The processor never
// writes it; the write port (we, waddr, wdata, written at the rising clock
// edge) is this design's addition for loading a program before a run.
module inst_mem #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic [31:0]   addr,
  output logic [31:0]   instr,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign instr = mem[addr[AW+1:2]];
endmodule
