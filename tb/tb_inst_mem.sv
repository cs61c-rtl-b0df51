// tb_inst_mem: self-checking test of the instruction memory.
//
// Loads every word through the load port, then reads random byte addresses
// (as a PC would present them) and compares with a reference array; the read
// must be combinational, with no clock edge in between.
module tb_inst_mem;
  localparam int AW = 6;
  logic          clk = 0, we;
  logic [31:0]   addr, instr, wdata;
  logic [AW-1:0] waddr;
  logic [31:0]   model [2**AW];
  int checks = 0, failures = 0;

  inst_mem #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int w = 0; w < 2**AW; w++) begin
      we = 1; waddr = AW'(w); wdata = $urandom; model[w] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      addr = $urandom;
      #1;
      checks++;
      if (instr !== model[addr[AW+1:2]]) begin
        failures++;
        $display("FAIL addr=%h instr=%h exp=%h", addr, instr, model[addr[AW+1:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
