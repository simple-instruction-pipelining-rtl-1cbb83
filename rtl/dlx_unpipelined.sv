// dlx_unpipelined: single-cycle DLX with hardwired control (CPI = 1).
//
// Every instruction is fetched, decoded, executed, given its memory access and
// written back in one clock cycle; at the next rising edge the PC, the register
// file and the data memory are updated together. The clock period therefore has
// to cover instruction fetch + register fetch + ALU + data memory + register
// write set-up.
//
// Datapath (as drawn for the hardwired machine):
//   PC -> instruction memory -> inst
//   inst<25:21> = rs1, inst<20:16> = rs2, ws = {rf2, rf3, 31} chosen by RegDst
//   ALU a = rd1, b = rd2 or the extended immediate (BSrc)
//   data memory: addr = ALU result, wdata = rd2, we = MemWrite
//   wd = ALU result, memory read data or PC+4 (WBSrc)
//   next PC = PC+4 (~j), PC+4 + extended offset (PCR) or rd1 (RInd)
// Branch and jump offsets are byte offsets relative to PC+4. JAL and JALR save
// PC+4 in R31: the machine has no delay slot. Instructions: R-type ALU, ALU
// immediates, LHI, LW, SW, BEQZ, J, JAL, JR, JALR (see hardwired_ctrl).
//
// Both memories are magic_ram instances (read combinational, write at the
// clock edge). The machine never writes the instruction memory; a program is
// loaded through the imem_* port, one word per clock, while rst_n holds the
// machine in reset (the port borrows the memory's single address input, so it
// must not be used while the machine runs). The load port is this design's
// addition; the lecture treats program memory as read-only. The trace outputs show
// each cycle's register write and memory write so the machine can be observed.
// Reset is asynchronous, active low; the PC restarts at RESET_PC.
module dlx_unpipelined
  import dlx_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 2048,
  parameter int unsigned DMEM_WORDS = 2048,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction-memory load port (used while the machine is held in reset)
  input  logic            imem_we,
  input  logic [31:0]     imem_addr,
  input  logic [31:0]     imem_wdata,
  output logic [31:0]     pc,
  output logic [31:0]     inst,
  output logic            rf_we,
  output logic [4:0]      rf_ws,
  output logic [XLEN-1:0] rf_wd,
  output logic            dm_we,
  output logic [31:0]     dm_addr,
  output logic [XLEN-1:0] dm_wdata
);
  ctrl_t           ctrl;
  alu_op_e         alu_op;
  logic [XLEN-1:0] rd1, rd2, imm, alu_b, alu_y, dm_rdata;
  logic            zero;
  logic [31:0]     pc_plus4, pc_rel, pc_next;

  // ---- fetch ----
  magic_ram #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .we(imem_we), .addr(imem_we ? imem_addr : pc), .wdata(imem_wdata),
    .rdata(inst));

  assign pc_plus4 = pc + 32'd4;

  // ---- decode & register fetch ----
  hardwired_ctrl u_ctrl (.opcode(inst[31:26]), .zero(zero), .ctrl(ctrl));

  assign rf_ws = dest_reg(inst, ctrl.regdst);

  gpr_file u_gpr (
    .clk(clk), .rst_n(rst_n),
    .rs1(inst[25:21]), .rs2(inst[20:16]), .rd1(rd1), .rd2(rd2),
    .we(rf_we), .ws(rf_ws), .wd(rf_wd));

  imm_ext u_ext (.imm(inst[25:0]), .ext_sel(ctrl.ext_sel), .ext(imm));

  // ---- execute ----
  alu_control u_aluc (.opsel(ctrl.opsel), .opcode(inst[31:26]), .func(inst[5:0]),
                      .alu_op(alu_op));
  assign alu_b = (ctrl.bsrc == BSRC_IMM) ? imm : rd2;
  alu u_alu (.a(rd1), .b(alu_b), .alu_op(alu_op), .y(alu_y), .z(zero));

  // ---- memory ----
  assign dm_we    = ctrl.mem_write;
  assign dm_addr  = alu_y;
  assign dm_wdata = rd2;
  magic_ram #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata));

  // ---- write-back ----
  assign rf_we = ctrl.reg_write;
  always_comb begin
    unique case (ctrl.wbsrc)
      WB_MEM:  rf_wd = dm_rdata;
      WB_PC:   rf_wd = pc_plus4;
      default: rf_wd = alu_y;
    endcase
  end

  // ---- next PC ----
  assign pc_rel = pc_plus4 + imm;
  always_comb begin
    unique case (ctrl.pcsrc)
      PC_PCR:  pc_next = pc_rel;
      PC_RIND: pc_next = rd1;
      default: pc_next = pc_plus4;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc <= RESET_PC;
    else        pc <= pc_next;
  end

  // The load port shares the instruction memory's address input with the PC:
  // it may only be used while the machine is held in reset.
  a_load_in_reset: assert property (@(posedge clk) imem_we |-> !rst_n)
    else $error("instruction-memory load port used while the machine runs");
endmodule
