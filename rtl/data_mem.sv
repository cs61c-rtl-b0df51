// data_mem: the "ideal" data memory of the single-cycle datapath.
//
// 2**AW words of 32 bits. The read is combinational: dout = MEM[addr] within
// the cycle, as an ideal memory. When wren (MemWr) is 1, din (Data In) is
// written at the rising clock edge. addr is a byte address; bits [AW+1:2]
// pick the word and the others are ignored, so addresses wrap around the
// memory and the two low bits do not matter. Size and the wrap-around are
// this design's choices; contents are not initialised.
module data_mem #(
  parameter int unsigned AW = 10
) (
  input  logic        clk,
  input  logic        wren,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  output logic [31:0] dout
);
  logic [31:0] mem [2**AW];
  logic [AW-1:0] widx;

  assign widx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wren) mem[widx] <= din;
  end

  assign dout = mem[widx];
endmodule
