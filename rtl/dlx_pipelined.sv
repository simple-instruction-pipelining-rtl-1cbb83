// dlx_pipelined: five-stage pipelined DLX, Harvard style, without jumps.
//
// The single-cycle datapath is cut by pipeline registers into five stages of
// roughly equal delay, so the clock period is set by the slowest stage instead
// of the sum of all of them, while one instruction still completes per cycle:
//
//   IF  PC -> instruction memory -> IR(ID);            PC <= PC + 4
//   ID  GPR read, immediate extension, BSrc mux  ->  A, B, MD1, IR(EX)
//   EX  ALU(A, B)                                ->  Y, MD2 <= MD1, IR(MA)
//   MA  data memory (addr Y, wdata MD2), WBSrc mux -> R, IR(WB)
//   WB  GPR write: ws from IR(WB) by RegDst, wd = R, we = RegWrite
//
// Each stage has its own copy of the instruction register and decodes the
// control points it owns from it (ExtSel and BSrc in ID, OpSel in EX, MemWrite
// and WBSrc in MA, RegDst and RegWrite in WB), using the same hardwired
// control table as the single-cycle machine. In particular the register written
// is taken from IR(WB), not from the instruction being decoded.
//
// Data hazards are resolved by stall feedback (hazard_unit): while an older
// instruction in EX, MA or WB has yet to write a register the ID instruction
// reads, PC and IR(ID) hold and a bubble (NOP) enters EX. There is no bypassing,
// so a dependent instruction waits until its producer has left WB. Separate
// instruction and data memories leave no structural hazard.
//
// As in the lecture's pipelined datapath, there is no jump or branch hardware:
// BEQZ, J, JR execute as no-ops and JAL/JALR are suppressed (they would need the
// PC in the pipeline). Supported: R-type ALU, ALU immediates, LHI, LW, SW.
//
// Timing: an instruction fetched in cycle t writes its result at the end of
// cycle t+4; without hazards the pipeline retires one instruction per cycle.
// Reset (asynchronous, active low) sets PC to RESET_PC and fills every IR with
// NOPs. A program is loaded through the imem_* port (one word per clock, byte
// address) while the machine is held in reset; this port is the design's own
// addition, as the lecture treats program memory as read-only. The outputs expose PC, the stall, and the write-back and memory-write
// activity for observation.
module dlx_pipelined
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
  output logic            stall,
  output logic            rf_we,
  output logic [4:0]      rf_ws,
  output logic [XLEN-1:0] rf_wd,
  output logic            dm_we,
  output logic [31:0]     dm_addr,
  output logic [XLEN-1:0] dm_wdata
);
  // pipeline registers (names as in the datapath drawing)
  logic [31:0]     ir_id, ir_ex, ir_ma, ir_wb;
  logic [XLEN-1:0] a_q, b_q, md1_q, y_q, md2_q, r_q;

  ctrl_t           c_id, c_ex, c_ma, c_wb;
  logic [31:0]     inst;
  logic [XLEN-1:0] rd1, rd2, imm, b_in, alu_y, dm_rdata;
  alu_op_e         alu_op;
  logic            alu_z;
  logic            ex_we, ma_we, wb_we;

  // ---- IF ----
  magic_ram #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .we(imem_we), .addr(imem_we ? imem_addr : pc), .wdata(imem_wdata),
    .rdata(inst));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc    <= RESET_PC;
      ir_id <= NOP;
    end else if (!stall) begin
      pc    <= pc + 32'd4;
      ir_id <= inst;
    end
  end

  // ---- ID ----
  hardwired_ctrl u_ctrl_id (.opcode(ir_id[31:26]), .zero(1'b0), .ctrl(c_id));

  gpr_file u_gpr (
    .clk(clk), .rst_n(rst_n),
    .rs1(ir_id[25:21]), .rs2(ir_id[20:16]), .rd1(rd1), .rd2(rd2),
    .we(rf_we), .ws(rf_ws), .wd(rf_wd));

  imm_ext u_ext (.imm(ir_id[25:0]), .ext_sel(c_id.ext_sel), .ext(imm));
  assign b_in = (c_id.bsrc == BSRC_IMM) ? imm : rd2;

  hazard_unit u_hz (
    .id_rs1(ir_id[25:21]), .id_reads_rs1(c_id.reads_rf1),
    .id_rs2(ir_id[20:16]), .id_reads_rs2(c_id.reads_rf2),
    .ex_we(ex_we), .ex_ws(dest_reg(ir_ex, c_ex.regdst)),
    .ma_we(ma_we), .ma_ws(dest_reg(ir_ma, c_ma.regdst)),
    .wb_we(wb_we), .wb_ws(dest_reg(ir_wb, c_wb.regdst)),
    .stall(stall));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_ex <= NOP;
      a_q   <= '0;
      b_q   <= '0;
      md1_q <= '0;
    end else begin
      ir_ex <= stall ? NOP : ir_id;
      a_q   <= rd1;
      b_q   <= b_in;
      md1_q <= rd2;
    end
  end

  // ---- EX ----
  hardwired_ctrl u_ctrl_ex (.opcode(ir_ex[31:26]), .zero(1'b0), .ctrl(c_ex));
  alu_control u_aluc (.opsel(c_ex.opsel), .opcode(ir_ex[31:26]), .func(ir_ex[5:0]),
                      .alu_op(alu_op));
  alu u_alu (.a(a_q), .b(b_q), .alu_op(alu_op), .y(alu_y), .z(alu_z));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_ma <= NOP;
      y_q   <= '0;
      md2_q <= '0;
    end else begin
      ir_ma <= ir_ex;
      y_q   <= alu_y;
      md2_q <= md1_q;
    end
  end

  // ---- MA ----
  hardwired_ctrl u_ctrl_ma (.opcode(ir_ma[31:26]), .zero(1'b0), .ctrl(c_ma));
  assign dm_we    = c_ma.mem_write;
  assign dm_addr  = y_q;
  assign dm_wdata = md2_q;
  magic_ram #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_wb <= NOP;
      r_q   <= '0;
    end else begin
      ir_wb <= ir_ma;
      r_q   <= (c_ma.wbsrc == WB_MEM) ? dm_rdata : y_q;
    end
  end

  // ---- WB ----
  hardwired_ctrl u_ctrl_wb (.opcode(ir_wb[31:26]), .zero(1'b0), .ctrl(c_wb));
  assign rf_ws = dest_reg(ir_wb, c_wb.regdst);
  assign rf_wd = r_q;
  assign rf_we = wb_we;

  // RegWrite per stage; link writes (WBSrc = PC) are suppressed since this
  // pipeline carries no PC.
  assign ex_we = c_ex.reg_write && (c_ex.wbsrc != WB_PC);
  assign ma_we = c_ma.reg_write && (c_ma.wbsrc != WB_PC);
  assign wb_we = c_wb.reg_write && (c_wb.wbsrc != WB_PC);

  // The load port shares the instruction memory's address input with the PC:
  // it may only be used while the machine is held in reset.
  a_load_in_reset: assert property (@(posedge clk) imem_we |-> !rst_n)
    else $error("instruction-memory load port used while the machine runs");
endmodule
