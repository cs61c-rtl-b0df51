// main_control: decodes an instruction into the datapath's control signals.
//
// Combinational. From the opcode (Instruction<31:26>) and, for R-type
// instructions, the function code (Instruction<5:0>) it produces one set of
// control signals per instruction:
//
//            RegDst ALUSrc MemtoReg RegWr MemWr nPC_sel Jump ExtOp ALUctr
//   add        1      0       0       1     0      0      0    -    add
//   sub        1      0       0       1     0      0      0    -    sub
//   ori        0      1       0       1     0      0      0    0    or
//   lw         0      1       1       1     0      0      0    1    add
//   sw         -      1       -       0     1      0      0    1    add
//   beq        -      0       -       0     0      1      0    -    sub
//   j          -      -       -       0     0      0      1    -    -
//
// The table is the instruction set's; a don't-care ('-') is driven 0 here.
// An opcode or R-type function outside the table is this design's choice:
// it writes nothing and the PC advances by 4.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{alu_ctr: ALU_ADD, default: 1'b0};
    case (op)
      OP_RTYPE: begin
        if (funct == FN_ADD || funct == FN_SUB) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = (funct == FN_SUB) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.alu_src = 1'b1;
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
        ctrl.ext_op  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.npc_sel = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
