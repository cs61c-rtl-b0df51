// mux2: two-input multiplexer of parameterised width.
//
// y = sel ? d1 : d0, purely combinational. Used for the datapath's RegDst,
// ALUSrc and MemtoReg selectors and the fetch unit's next-PC selectors; the
// input numbering (0 and 1) is the one printed on each mux of the datapath.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
