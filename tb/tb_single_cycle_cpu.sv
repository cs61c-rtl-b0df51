// tb_single_cycle_cpu: end-to-end test of the single-cycle processor.
//
// Runs at the default sizes. The program loaded into the instruction memory
// has three parts:
//   1. a loop that clears the whole data memory (ori, sw, add, beq, j);
//   2. a directed sequence: add, sub, ori, lw after sw, beq taken and not
//      taken, j, a write to register 0, an undefined instruction;
//   3. a random section of all seven instructions (and some undefined ones),
//      whose branches and jumps stay inside it, ending in a jump back to its
//      start so it runs until the cycle budget is spent.
// An instruction-level model kept here executes the same program in lockstep.
// Every cycle the PC, the instruction and the register and memory writes are
// compared with the model, which also checks that every instruction takes
// exactly one cycle. The run is repeated after a second reset. Each
// instruction kind, taken and not-taken branches, jumps, writes to register 0
// and undefined instructions are counted; one that never occurs is a failure.
module tb_single_cycle_cpu;
  localparam int IAW = 10;   // defaults of single_cycle_cpu
  localparam int DAW = 10;
  localparam int RAND_START = 64;
  localparam int RAND_END   = 2**IAW - 1;   // last word holds the jump back

  logic           clk = 0, rst, imem_we;
  logic [IAW-1:0] imem_waddr;
  logic [31:0]    imem_wdata, pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic           reg_we, mem_we;
  logic [4:0]     reg_waddr;

  logic [31:0] prog [2**IAW];
  logic [31:0] r [32];
  logic [31:0] m [2**DAW];
  logic [31:0] mpc;
  int checks = 0, failures = 0;
  int n_add, n_sub, n_ori, n_lw, n_sw, n_beq_t, n_beq_n, n_j, n_r0, n_undef;

  single_cycle_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- assembler ----
  function automatic logic [31:0] R(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] I(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] J(input int word);
    return {6'b000010, 26'(word)};
  endfunction
  localparam logic [5:0] ADD = 6'b100000, SUB = 6'b100010;
  localparam logic [5:0] ORI = 6'b001101, LW = 6'b100011, SW = 6'b101011, BEQ = 6'b000100;
  // beq at word 'at' branching to word 'to'
  function automatic logic [31:0] B(input int rs, input int rt, input int at, input int to);
    return I(BEQ, rt, rs, to - at - 1);
  endfunction

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s pc=%h got=%h exp=%h", what, mpc, got, exp);
    end
  endtask

  task automatic build_program();
    int a;
    for (int w = 0; w < 2**IAW; w++) prog[w] = 32'hffff_ffff;   // undefined
    // 1. clear data memory: r1 = address, r2 = 4, r3 = end address
    prog[0] = I(ORI, 2, 0, 4);
    prog[1] = I(ORI, 3, 0, 4 * 2**DAW);
    prog[2] = I(ORI, 1, 0, 0);
    prog[3] = I(SW, 0, 1, 0);            // loop: MEM[r1] = 0
    prog[4] = R(ADD, 1, 1, 2);
    prog[5] = B(1, 3, 5, 7);             // exit when r1 == r3
    prog[6] = J(3);
    // 2. directed sequence
    prog[7]  = I(ORI, 4, 0, 'h1234);
    prog[8]  = I(ORI, 5, 0, 'hfff0);   // zero-extended
    prog[9]  = R(ADD, 6, 4, 5);
    prog[10] = R(SUB, 7, 4, 5);          // negative result
    prog[11] = I(SW, 7, 0, 'h0100);
    prog[12] = I(LW, 8, 0, 'h0100);
    prog[13] = I(ORI, 9, 0, 'h0104);
    prog[14] = I(SW, 6, 9, -4);          // negative offset: same word, overwrite
    prog[15] = I(LW, 10, 9, -4);
    prog[16] = B(8, 6, 16, 20);          // r8 != r6: not taken
    prog[17] = B(10, 6, 17, 20);         // taken
    prog[18] = I(ORI, 11, 0, 1);         // skipped
    prog[19] = I(ORI, 11, 0, 2);         // skipped
    prog[20] = R(ADD, 0, 4, 4);          // write to r0 is ignored
    prog[21] = R(ADD, 12, 0, 4);
    prog[22] = 32'hfc00_0000;            // undefined opcode
    prog[23] = J(25);
    prog[24] = I(ORI, 13, 0, 'hdead);  // skipped
    prog[25] = B(0, 0, 25, RAND_START);  // always taken, into the random section
    // 3. random section
    for (int w = RAND_START; w < RAND_END; w++) begin
      int k, rs, rt, rd;
      k = $urandom % 20;
      rs = $urandom % 32; rt = $urandom % 32; rd = $urandom % 32;
      if (w < RAND_START + 31) begin
        prog[w] = I(ORI, w - RAND_START + 1, 0, $urandom);   // seed registers
        continue;
      end
      case (k)
        0, 1, 2:  prog[w] = R(ADD, rd, rs, rt);
        3, 4, 5:  prog[w] = R(SUB, rd, rs, rt);
        6, 7, 8:  prog[w] = I(ORI, rt, rs, $urandom);
        9, 10:    prog[w] = I(LW, rt, rs, $urandom);
        11, 12:   prog[w] = I(SW, rt, rs, $urandom);
        13, 14:   prog[w] = B(rs, ($urandom % 2 == 1) ? rs : rt, w,
                              w + 1 + ($urandom % 12));   // short forward
        15:       prog[w] = B(rs, rs, w, RAND_START + 31 + ($urandom % (RAND_END - RAND_START - 31)));
        16:       prog[w] = J(w + 1 + ($urandom % 8));
        17:       prog[w] = R(6'($urandom), rd, rs, rt);  // mostly undefined functions
        default:  prog[w] = R(ADD, rd, rs, rt);
      endcase
    end
    // keep forward targets inside the section
    for (int w = RAND_END - 12; w < RAND_END; w++)
      if (prog[w][31:26] inside {BEQ, 6'b000010}) prog[w] = R(ADD, 0, 0, 0);
    prog[RAND_END] = J(RAND_START + 31);
  endtask

  // one instruction of the reference model, compared with the processor
  task automatic step();
    logic [31:0] ins, a, b, se, ze, y, npc;
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt, rd;
    logic        we, mw;
    logic [4:0]  wr;
    logic [31:0] wv;
    ins = prog[mpc[IAW+1:2]];
    op = ins[31:26]; fn = ins[5:0];
    rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
    a = r[rs]; b = r[rt];
    se = {{16{ins[15]}}, ins[15:0]}; ze = {16'h0, ins[15:0]};
    we = 0; mw = 0; wr = 0; wv = 0; y = 0;
    npc = mpc + 4;
    case (op)
      6'b000000: begin
        if (fn == ADD) begin we = 1; wr = rd; wv = a + b; n_add++; end
        else if (fn == SUB) begin we = 1; wr = rd; wv = a - b; n_sub++; end
        else n_undef++;
      end
      ORI: begin we = 1; wr = rt; wv = a | ze; n_ori++; end
      LW:  begin we = 1; wr = rt; y = a + se; wv = m[y[DAW+1:2]]; n_lw++; end
      SW:  begin mw = 1; y = a + se; n_sw++; end
      BEQ: begin
        if (a == b) begin npc = mpc + 4 + (se << 2); n_beq_t++; end
        else n_beq_n++;
      end
      6'b000010: begin npc = {mpc[31:28], ins[25:0], 2'b00}; n_j++; end
      default: n_undef++;
    endcase
    if (we && wr == 0) n_r0++;
    chk("pc", pc, mpc);
    chk("instr", instr, ins);
    chk("reg_we", 32'(reg_we), 32'(we));
    chk("mem_we", 32'(mem_we), 32'(mw));
    if (we) begin
      chk("reg_waddr", 32'(reg_waddr), 32'(wr));
      chk("reg_wdata", reg_wdata, wv);
    end
    if (mw) begin
      chk("mem_addr", mem_addr, y);
      chk("mem_wdata", mem_wdata, b);
    end
    @(posedge clk); #1;
    if (we && wr != 0) r[wr] = wv;
    if (mw) m[y[DAW+1:2]] = b;
    mpc = npc;
  endtask

  task automatic count(input string name, input int n);
    $display("  %-16s %0d", name, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", name);
    end
  endtask

  initial begin
    n_add = 0; n_sub = 0; n_ori = 0; n_lw = 0; n_sw = 0;
    n_beq_t = 0; n_beq_n = 0; n_j = 0; n_r0 = 0; n_undef = 0;
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    build_program();
    for (int w = 0; w < 2**IAW; w++) begin
      imem_we = 1; imem_waddr = IAW'(w); imem_wdata = prog[w];
      @(posedge clk); #1;
    end
    imem_we = 0;
    for (int run = 0; run < 2; run++) begin
      rst = 1;
      @(posedge clk); #1;
      rst = 0;
      mpc = 0;
      for (int i = 0; i < 32; i++) r[i] = 0;
      for (int c = 0; c < 40000; c++) begin
        if (mpc == 32'd100) begin
          // end of the directed part: these values must have been computed
          chk("r6 = 0x1234 + 0xfff0", r[6], 32'h0001_1224);
          chk("r7 = 0x1234 - 0xfff0", r[7], 32'hffff_1244);
          chk("r8 loaded", r[8], 32'hffff_1244);
          chk("r10 loaded", r[10], 32'h0001_1224);
          chk("r11 skipped", r[11], 32'h0);
          chk("r12", r[12], 32'h1234);
          chk("r13 skipped", r[13], 32'h0);
        end
        step();
      end
    end
    $display("events:");
    count("add", n_add);
    count("sub", n_sub);
    count("ori", n_ori);
    count("lw", n_lw);
    count("sw", n_sw);
    count("beq taken", n_beq_t);
    count("beq not taken", n_beq_n);
    count("j", n_j);
    count("write to r0", n_r0);
    count("undefined", n_undef);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
