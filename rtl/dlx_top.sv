// dlx_top: the two DLX machines of the design side by side.
//
//   u_pipe  - dlx_pipelined, the five-stage pipeline (ALU, ALU-immediate, LW, SW)
//   u_single- dlx_unpipelined, the single-cycle machine with hardwired control
//             (adds BEQZ, J, JAL, JR, JALR)
//
// They share nothing; each has its own clock, reset and observation ports
// (p_* for the pipeline, s_* for the single-cycle machine). A program is
// written into each machine's instruction memory through its *_imem_* port
// while that machine is held in reset. All parameters default to the design's sizes.
module dlx_top
  import dlx_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 2048,
  parameter int unsigned DMEM_WORDS = 2048
) (
  input  logic            p_clk,
  input  logic            p_rst_n,
  input  logic            p_imem_we,
  input  logic [31:0]     p_imem_addr,
  input  logic [31:0]     p_imem_wdata,
  output logic [31:0]     p_pc,
  output logic            p_stall,
  output logic            p_rf_we,
  output logic [4:0]      p_rf_ws,
  output logic [XLEN-1:0] p_rf_wd,
  output logic            p_dm_we,
  output logic [31:0]     p_dm_addr,
  output logic [XLEN-1:0] p_dm_wdata,

  input  logic            s_clk,
  input  logic            s_rst_n,
  input  logic            s_imem_we,
  input  logic [31:0]     s_imem_addr,
  input  logic [31:0]     s_imem_wdata,
  output logic [31:0]     s_pc,
  output logic [31:0]     s_inst,
  output logic            s_rf_we,
  output logic [4:0]      s_rf_ws,
  output logic [XLEN-1:0] s_rf_wd,
  output logic            s_dm_we,
  output logic [31:0]     s_dm_addr,
  output logic [XLEN-1:0] s_dm_wdata
);
  dlx_pipelined #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_pipe (
    .clk(p_clk), .rst_n(p_rst_n),
    .imem_we(p_imem_we), .imem_addr(p_imem_addr), .imem_wdata(p_imem_wdata), .pc(p_pc), .stall(p_stall),
    .rf_we(p_rf_we), .rf_ws(p_rf_ws), .rf_wd(p_rf_wd),
    .dm_we(p_dm_we), .dm_addr(p_dm_addr), .dm_wdata(p_dm_wdata));

  dlx_unpipelined #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_single (
    .clk(s_clk), .rst_n(s_rst_n),
    .imem_we(s_imem_we), .imem_addr(s_imem_addr), .imem_wdata(s_imem_wdata), .pc(s_pc), .inst(s_inst),
    .rf_we(s_rf_we), .rf_ws(s_rf_ws), .rf_wd(s_rf_wd),
    .dm_we(s_dm_we), .dm_addr(s_dm_addr), .dm_wdata(s_dm_wdata));
endmodule
