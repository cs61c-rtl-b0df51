// tb_datapath: self-checking test of the datapath.
//
// Feeds the datapath a stream of add, sub, ori, lw, sw and beq instructions
// together with control signals derived here from the instruction set's
// control table, and keeps its own model of the registers and the data
// memory. Every cycle it compares the register write (enable, register,
// value), the memory write (enable, address, data) and Zero with the model.
// The data memory is first cleared with one sw per word.
module tb_datapath;
  import mips_pkg::*;
  localparam int AW = 6;
  logic        clk = 0, rst, zero, reg_we, mem_we;
  logic [31:0] instr, reg_wdata, mem_addr, mem_wdata;
  logic [4:0]  reg_waddr;
  ctrl_t       ctrl;
  logic [31:0] r [32];
  logic [31:0] m [2**AW];
  int checks = 0, failures = 0;

  datapath #(.DMEM_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%h got=%h exp=%h", what, instr, got, exp);
    end
  endtask

  // kind: 0 add, 1 sub, 2 ori, 3 lw, 4 sw, 5 beq
  task automatic exec(input int kind, input logic [4:0] rs, input logic [4:0] rt,
                      input logic [4:0] rd, input logic [15:0] imm);
    logic [31:0] a, b, se, ze, y, wv;
    logic [4:0]  wr;
    logic        we, mw;
    a = r[rs]; b = r[rt];
    se = {{16{imm[15]}}, imm}; ze = {16'h0, imm};
    ctrl = '{alu_ctr: ALU_ADD, default: 1'b0};
    we = 0; mw = 0; wr = rt; y = 0; wv = 0;
    case (kind)
      0: begin instr = {6'b000000, rs, rt, rd, 5'd0, 6'b100000};
               ctrl.reg_dst = 1; ctrl.reg_wr = 1; ctrl.alu_ctr = ALU_ADD;
               y = a + b; we = 1; wr = rd; wv = y; end
      1: begin instr = {6'b000000, rs, rt, rd, 5'd0, 6'b100010};
               ctrl.reg_dst = 1; ctrl.reg_wr = 1; ctrl.alu_ctr = ALU_SUB;
               y = a - b; we = 1; wr = rd; wv = y; end
      2: begin instr = {6'b001101, rs, rt, imm};
               ctrl.alu_src = 1; ctrl.reg_wr = 1; ctrl.alu_ctr = ALU_OR;
               y = a | ze; we = 1; wv = y; end
      3: begin instr = {6'b100011, rs, rt, imm};
               ctrl.alu_src = 1; ctrl.mem_to_reg = 1; ctrl.reg_wr = 1; ctrl.ext_op = 1;
               y = a + se; we = 1; wv = m[y[AW+1:2]]; end
      4: begin instr = {6'b101011, rs, rt, imm};
               ctrl.alu_src = 1; ctrl.mem_wr = 1; ctrl.ext_op = 1;
               y = a + se; mw = 1; end
      default: begin instr = {6'b000100, rs, rt, imm};
               ctrl.npc_sel = 1; ctrl.alu_ctr = ALU_SUB;
               y = a - b; end
    endcase
    #1;
    chk("reg_we", 32'(reg_we), 32'(we));
    chk("mem_we", 32'(mem_we), 32'(mw));
    chk("zero", 32'(zero), 32'(y == 0));
    if (we) begin
      chk("reg_waddr", 32'(reg_waddr), 32'(wr));
      chk("reg_wdata", reg_wdata, wv);
    end
    if (mw || kind == 3) chk("mem_addr", mem_addr, y);
    if (mw) chk("mem_wdata", mem_wdata, b);
    @(posedge clk); #1;
    if (we && wr != 0) r[wr] = wv;
    if (mw) m[y[AW+1:2]] = b;
  endtask

  initial begin
    rst = 1; instr = 0; ctrl = '{alu_ctr: ALU_ADD, default: 1'b0};
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 32; i++) r[i] = 0;
    for (int w = 0; w < 2**AW; w++) exec(4, 5'd0, 5'd0, 5'd0, 16'(w * 4));
    for (int i = 1; i < 32; i++) exec(2, 5'd0, 5'(i), 5'd0, 16'($urandom));
    for (int i = 0; i < 4000; i++) begin
      int k;
      logic [4:0] rs, rt;
      k = $urandom % 6;
      rs = 5'($urandom); rt = 5'($urandom);
      if (k == 5 && ($urandom % 3 == 0)) rt = rs;   // force equal operands for beq
      exec(k, rs, rt, 5'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
