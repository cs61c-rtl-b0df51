// tb_alu: self-checking test of the ALU.
//
// Applies directed and random operands to add, subtract and or, and compares
// result and Zero with values computed here. Zero is checked on equal
// operands under subtract, as beq uses it.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y;
  alu_ctr_e    ctr;
  logic        zero;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a(a), .b(b), .alu_ctr(ctr), .result(y), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb_, input alu_ctr_e tc);
    logic [31:0] exp;
    a = ta; b = tb_; ctr = tc;
    #1;
    case (tc)
      ALU_ADD: exp = ta + tb_;
      ALU_SUB: exp = ta + ~tb_ + 32'd1;
      default: exp = ta | tb_;
    endcase
    checks++;
    if (y !== exp || zero !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL ctr=%b a=%h b=%h y=%h exp=%h zero=%b", tc, ta, tb_, y, exp, zero);
    end
  endtask

  initial begin
    apply(32'd5, 32'd7, ALU_ADD);
    apply(32'hffffffff, 32'd1, ALU_ADD);
    apply(32'd7, 32'd5, ALU_SUB);
    apply(32'd5, 32'd7, ALU_SUB);
    apply(32'h1234, 32'h1234, ALU_SUB);
    apply(32'hf0f0_0000, 32'h0000_0f0f, ALU_OR);
    apply(32'd0, 32'd0, ALU_OR);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] ra;
      ra = $urandom;
      apply(ra, $urandom, ALU_ADD);
      apply(ra, $urandom, ALU_SUB);
      apply(ra, ra, ALU_SUB);
      apply(ra, $urandom, ALU_OR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
