// ifetch_unit: the instruction fetch unit.
//
// Holds the PC, reads Instruction = MEM[PC] from the instruction memory and
// chooses the next PC, loaded at the rising clock edge:
//
//   branch select = nPC_sel AND Zero
//   sequential    = branch select ? PC + 4 + {SignExt(imm16), 00} : PC + 4
//   next PC       = Jump ? {PC[31:28], target, 00} : sequential
//
// Two adders (PC + 4, and that sum plus the shifted offset), the nPC mux and
// the Jump mux in front of the PC register, as the fetch-unit drawings show.
// The upper four bits of a jump target come from the current PC. Zero comes
// from the ALU in the same cycle; nPC_sel and Jump from the main control.
// The reset value of the PC (0) is this design's choice.
module ifetch_unit #(
  parameter int unsigned IMEM_AW = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               npc_sel,
  input  logic               zero,
  input  logic               jump,
  input  logic               imem_we,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  logic [31:0]        imem_wdata,
  output logic [31:0]        pc,
  output logic [31:0]        instr
);
  logic [31:0] pc_plus4, br_off, br_target, seq_pc, jmp_target, next_pc;
  logic        npc_mux_sel;

  inst_mem #(.AW(IMEM_AW)) u_imem (
    .clk  (clk),
    .addr (pc),
    .instr(instr),
    .we   (imem_we),
    .waddr(imem_waddr),
    .wdata(imem_wdata)
  );

  // "PC Ext": sign-extend imm16 and append 00
  assign br_off      = {{14{instr[15]}}, instr[15:0], 2'b00};
  assign pc_plus4    = pc + 32'd4;
  assign br_target   = pc_plus4 + br_off;
  assign npc_mux_sel = npc_sel & zero;
  assign jmp_target  = {pc[31:28], instr[25:0], 2'b00};

  mux2 #(.W(32)) u_npc_mux  (.sel(npc_mux_sel), .d0(pc_plus4), .d1(br_target),  .y(seq_pc));
  mux2 #(.W(32)) u_jump_mux (.sel(jump),        .d0(seq_pc),   .d1(jmp_target), .y(next_pc));

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= next_pc;
  end
endmodule
