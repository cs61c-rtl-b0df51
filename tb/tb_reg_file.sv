// tb_reg_file: self-checking test of the 32 x 32-bit register file.
//
// Runs random writes and reads against a reference array kept here. Checks
// that a write appears from the next cycle on, that a read in the cycle of a
// write to the same register still returns the old value, that register 0
// stays 0, and that reset clears all registers.
module tb_reg_file;
  logic        clk = 0, rst;
  logic [4:0]  ra, rb, rw;
  logic        we;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  reg_file #(.NREGS(32), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; we = 0; ra = 0; rb = 0; rw = 0; busw = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < 32; r++) begin
      model[r] = 0;
      ra = 5'(r); rb = 5'(31 - r); #1;
      chk("after reset A", busa, 0);
      chk("after reset B", busb, 0);
    end
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); rw = 5'($urandom); busw = $urandom;
      ra = (i % 4 == 0) ? rw : 5'($urandom);
      rb = 5'($urandom);
      #1;
      chk("read A", busa, model[ra]);
      chk("read B", busb, model[rb]);
      @(posedge clk); #1;
      if (we && rw != 0) model[rw] = busw;
      ra = rw; #1;
      chk("read after write", busa, model[rw]);
    end
    // register 0 ignores writes
    we = 1; rw = 0; busw = 32'hdeadbeef;
    @(posedge clk); #1;
    ra = 0; rb = 0; #1;
    chk("r0 A", busa, 0);
    chk("r0 B", busb, 0);
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
