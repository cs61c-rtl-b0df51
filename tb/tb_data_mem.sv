// tb_data_mem: self-checking test of the data memory.
//
// Writes every word once, then mixes random reads and writes against a
// reference array kept here. Checks that the read is combinational, that a
// write lands at the clock edge only when WrEn is 1, and that the two low
// address bits and the bits above the memory size are ignored.
module tb_data_mem;
  localparam int AW = 6;
  logic        clk = 0, wren;
  logic [31:0] addr, din, dout;
  logic [31:0] model [2**AW];
  int checks = 0, failures = 0;

  data_mem #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%h got=%h exp=%h", what, addr, got, exp);
    end
  endtask

  initial begin
    wren = 0; addr = 0; din = 0;
    for (int w = 0; w < 2**AW; w++) begin
      wren = 1; addr = 32'(w) << 2; din = $urandom; model[w] = din;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      int w;
      wren = 1'($urandom); din = $urandom;
      addr = $urandom;           // any byte address: word index is addr[AW+1:2]
      w = int'(addr[AW+1:2]);
      #1;
      chk("read", dout, model[w]);
      @(posedge clk); #1;
      if (wren) model[w] = din;
      chk("read after edge", dout, model[w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
