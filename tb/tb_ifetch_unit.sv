// tb_ifetch_unit: self-checking test of the instruction fetch unit.
//
// Fills the instruction memory with random words, resets the PC and then
// drives nPC_sel, Zero and Jump at random every cycle. A reference PC kept
// here follows PC + 4, PC + 4 + SignExt(imm16)*4 (nPC_sel and Zero both 1)
// or {PC[31:28], target, 00} (Jump); the PC and the fetched instruction are
// compared every cycle, so each next-PC choice is checked to take exactly one
// cycle.
module tb_ifetch_unit;
  localparam int AW = 6;
  logic          clk = 0, rst, npc_sel, zero, jump, imem_we;
  logic [AW-1:0] imem_waddr;
  logic [31:0]   imem_wdata, pc, instr;
  logic [31:0]   model [2**AW];
  logic [31:0]   exp_pc;
  int checks = 0, failures = 0;
  int n_seq = 0, n_br = 0, n_br_not = 0, n_jump = 0;

  ifetch_unit #(.IMEM_AW(AW)) dut (.*);

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
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; npc_sel = 0; zero = 0; jump = 0; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    for (int w = 0; w < 2**AW; w++) begin
      imem_we = 1; imem_waddr = AW'(w); imem_wdata = $urandom; model[w] = imem_wdata;
      @(posedge clk); #1;
    end
    imem_we = 0;
    @(posedge clk); #1;
    rst = 0;
    exp_pc = 0;
    for (int i = 0; i < 3000; i++) begin
      chk("pc", pc, exp_pc);
      chk("instr", instr, model[exp_pc[AW+1:2]]);
      npc_sel = 1'($urandom); zero = 1'($urandom); jump = ($urandom % 8) == 0;
      if (i % 500 == 499) begin
        // occasionally move the PC into another 256 MB region
        jump = 0; npc_sel = 1; zero = 1;
      end
      #1;
      if (jump) begin
        exp_pc = {exp_pc[31:28], model[exp_pc[AW+1:2]][25:0], 2'b00};
        n_jump++;
      end else if (npc_sel && zero) begin
        exp_pc = exp_pc + 32'd4 + {{14{model[exp_pc[AW+1:2]][15]}}, model[exp_pc[AW+1:2]][15:0], 2'b00};
        n_br++;
      end else begin
        exp_pc = exp_pc + 32'd4;
        if (npc_sel) n_br_not++; else n_seq++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (n_seq == 0 || n_br == 0 || n_br_not == 0 || n_jump == 0) begin
      failures++;
      $display("FAIL a next-PC case never happened");
    end
    $display("sequential=%0d branch_taken=%0d branch_not_taken=%0d jump=%0d", n_seq, n_br, n_br_not, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
