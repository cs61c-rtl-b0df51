// tb_extender: self-checking test of the immediate extender.
//
// Checks zero extension (ExtOp = 0) and sign extension (ExtOp = 1) on the
// boundary values and on random immediates.
module tb_extender;
  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] y;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm), .ext_op(ext_op), .imm32(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ti, input logic te);
    logic [31:0] exp;
    imm = ti; ext_op = te;
    #1;
    if (te) exp = $unsigned(32'($signed(ti)));
    else    exp = {16'h0000, ti};
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL imm=%h ext_op=%b y=%h exp=%h", ti, te, y, exp);
    end
  endtask

  initial begin
    apply(16'h0000, 1'b1); apply(16'h7fff, 1'b1); apply(16'h8000, 1'b1); apply(16'hffff, 1'b1);
    apply(16'h8000, 1'b0); apply(16'hffff, 1'b0);
    for (int i = 0; i < 500; i++) apply(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
