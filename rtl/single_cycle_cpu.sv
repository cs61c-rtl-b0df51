// single_cycle_cpu: a single-cycle processor for a MIPS instruction subset.
//
// Executes add, sub, ori, lw, sw, beq and j, each in exactly one clock cycle:
// the PC addresses the instruction memory, the main control decodes the
// instruction into control signals, the datapath reads registers, computes
// in the ALU, accesses the data memory and writes the result back, and the
// fetch unit loads the next PC, all at the same rising edge. The critical
// path is that of lw: PC clock-to-out, instruction memory, register read,
// ALU add, data memory read, register write setup.
//
// Ports besides clk and rst: a load port for the instruction memory (the
// processor itself never writes it) and observation outputs carrying the PC,
// the instruction and the register and memory writes of the current cycle.
// These ports, the synchronous reset (PC and registers to 0) and the memory
// sizes (2**IMEM_AW and 2**DMEM_AW words) are this design's choices.
//
// Assertions state three rules the control table guarantees: the PC stays
// word aligned, no instruction writes both a register and memory, and no
// instruction is both a branch and a jump.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_AW = 10,
  parameter int unsigned DMEM_AW = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               imem_we,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  logic [31:0]        imem_wdata,
  output logic [31:0]        pc,
  output logic [31:0]        instr,
  output logic               reg_we,
  output logic [4:0]         reg_waddr,
  output logic [31:0]        reg_wdata,
  output logic               mem_we,
  output logic [31:0]        mem_addr,
  output logic [31:0]        mem_wdata
);
  ctrl_t ctrl;
  logic  zero;

  ifetch_unit #(.IMEM_AW(IMEM_AW)) u_ifu (
    .clk       (clk),
    .rst       (rst),
    .npc_sel   (ctrl.npc_sel),
    .zero      (zero),
    .jump      (ctrl.jump),
    .imem_we   (imem_we),
    .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata),
    .pc        (pc),
    .instr     (instr)
  );

  main_control u_ctrl (.op(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl));

  datapath #(.DMEM_AW(DMEM_AW)) u_dp (
    .clk      (clk),
    .rst      (rst),
    .instr    (instr),
    .ctrl     (ctrl),
    .zero     (zero),
    .reg_we   (reg_we),
    .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata),
    .mem_we   (mem_we),
    .mem_addr (mem_addr),
    .mem_wdata(mem_wdata)
  );

  a_pc_aligned: assert property (@(posedge clk) disable iff (rst) pc[1:0] == 2'b00)
    else $error("PC not word aligned: %h", pc);
  a_one_write: assert property (@(posedge clk) disable iff (rst) !(ctrl.reg_wr && ctrl.mem_wr))
    else $error("register and memory written by one instruction");
  a_br_or_jump: assert property (@(posedge clk) disable iff (rst) !(ctrl.npc_sel && ctrl.jump))
    else $error("instruction is both branch and jump");
endmodule
