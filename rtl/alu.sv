// alu: the datapath's 32-bit arithmetic unit.
//
// Performs the three operations the instruction subset needs, selected by
// ALUctr<2:0>: add (add, lw, sw address), subtract (sub, and beq's compare)
// and bitwise or (ori). Zero is 1 when the result is 0; beq uses it to decide
// a branch after subtracting R[rt] from R[rs]. Combinational; add and
// subtract wrap modulo 2**WIDTH (overflow is not detected). The bit encoding
// of ALUctr is this design's choice (see mips_pkg); an unused code adds.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_ctr_e         alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);
  always_comb begin
    unique case (alu_ctr)
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = a + b;
    endcase
  end
  assign zero = (result == '0);
endmodule
