// tb_main_control: self-checking test of the main control.
//
// Compares every control signal with the instruction set's control table for
// add, sub, ori, lw, sw, beq and j (don't-care entries are not checked), and
// checks that opcodes and R-type functions outside the table write neither a
// register nor memory and do not branch or jump.
module tb_main_control;
  import mips_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      c;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .funct(funct), .ctrl(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values as characters: '0', '1' or 'x' (don't care)
  task automatic row(input string name, input logic [5:0] top, input logic [5:0] tfn,
                     input string exp, input string aluexp);
    string got;
    op = top; funct = tfn;
    #1;
    got = {c.reg_dst ? "1" : "0", c.alu_src ? "1" : "0", c.mem_to_reg ? "1" : "0",
           c.reg_wr ? "1" : "0", c.mem_wr ? "1" : "0", c.npc_sel ? "1" : "0",
           c.jump ? "1" : "0", c.ext_op ? "1" : "0"};
    for (int i = 0; i < 8; i++) begin
      if (exp[i] != "x") begin
        checks++;
        if (got[i] != exp[i]) begin
          failures++;
          $display("FAIL %s signal %0d got=%s exp=%s", name, i, got, exp);
        end
      end
    end
    if (aluexp != "x") begin
      checks++;
      if ((aluexp == "add" && c.alu_ctr != ALU_ADD) ||
          (aluexp == "sub" && c.alu_ctr != ALU_SUB) ||
          (aluexp == "or"  && c.alu_ctr != ALU_OR)) begin
        failures++;
        $display("FAIL %s ALUctr=%b exp=%s", name, c.alu_ctr, aluexp);
      end
    end
  endtask

  initial begin
    //                                       RegDst ALUSrc MemtoReg RegWr MemWr nPCsel Jump ExtOp
    row("add", 6'b000000, 6'b100000, "1001000x", "add");
    row("sub", 6'b000000, 6'b100010, "1001000x", "sub");
    row("ori", 6'b001101, 6'($urandom), "01010000", "or");
    row("lw",  6'b100011, 6'($urandom), "01110001", "add");
    row("sw",  6'b101011, 6'($urandom), "x1x01001", "add");
    row("beq", 6'b000100, 6'($urandom), "x0x0010x", "sub");
    row("j",   6'b000010, 6'($urandom), "xxx0001x", "x");
    for (int i = 0; i < 300; i++) begin
      logic [5:0] o, f;
      o = 6'($urandom); f = 6'($urandom);
      if (o inside {6'b001101, 6'b100011, 6'b101011, 6'b000100, 6'b000010}) continue;
      if (o == 6'b000000 && f inside {6'b100000, 6'b100010}) continue;
      row("undefined", o, f, "xxx0000x", "x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
