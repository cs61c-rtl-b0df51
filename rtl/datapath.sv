// datapath: the single-cycle datapath steered by the control signals.
//
// Fields of the instruction: rs = <25:21>, rt = <20:16>, rd = <15:11>,
// imm16 = <15:0>. In one cycle:
//   busA = R[rs], busB = R[rt]                       (register file read)
//   Rw   = RegDst ? rd : rt                          (RegDst mux)
//   B    = ALUSrc ? Extend(imm16, ExtOp) : busB      (ALUSrc mux)
//   Y    = ALU(busA, B, ALUctr), Zero = (Y == 0)
//   Dout = MEM[Y]; MEM[Y] <- busB at the edge if MemWr   (data memory)
//   busW = MemtoReg ? Dout : Y; R[Rw] <- busW at the edge if RegWr
// Zero goes back to the instruction fetch unit for beq. The register and
// memory write buses are also brought out so a run can be observed.
module datapath
  import mips_pkg::*;
#(
  parameter int unsigned DMEM_AW = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] instr,
  input  ctrl_t       ctrl,
  output logic        zero,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);
  logic [4:0]  rs, rt, rd, rw;
  logic [31:0] busa, busb, busw, imm32, alu_b, alu_y, dout;

  assign rs = instr[25:21];
  assign rt = instr[20:16];
  assign rd = instr[15:11];

  mux2 #(.W(5)) u_regdst_mux (.sel(ctrl.reg_dst), .d0(rt), .d1(rd), .y(rw));

  reg_file #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk (clk),
    .rst (rst),
    .ra  (rs),
    .rb  (rt),
    .rw  (rw),
    .we  (ctrl.reg_wr),
    .busw(busw),
    .busa(busa),
    .busb(busb)
  );

  extender u_ext (.imm16(instr[15:0]), .ext_op(ctrl.ext_op), .imm32(imm32));

  mux2 #(.W(32)) u_alusrc_mux (.sel(ctrl.alu_src), .d0(busb), .d1(imm32), .y(alu_b));

  alu #(.WIDTH(32)) u_alu (.a(busa), .b(alu_b), .alu_ctr(ctrl.alu_ctr), .result(alu_y), .zero(zero));

  data_mem #(.AW(DMEM_AW)) u_dmem (
    .clk (clk),
    .wren(ctrl.mem_wr),
    .addr(alu_y),
    .din (busb),
    .dout(dout)
  );

  mux2 #(.W(32)) u_memtoreg_mux (.sel(ctrl.mem_to_reg), .d0(alu_y), .d1(dout), .y(busw));

  assign reg_we    = ctrl.reg_wr;
  assign reg_waddr = rw;
  assign reg_wdata = busw;
  assign mem_we    = ctrl.mem_wr;
  assign mem_addr  = alu_y;
  assign mem_wdata = busb;
endmodule
