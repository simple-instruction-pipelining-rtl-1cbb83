// gpr_file: DLX general-purpose registers, 32 x 32 bits.
//
// Two read ports (rs1 -> rd1, rs2 -> rd2) are combinational. The write port
// (ws, wd, we) updates the register at the rising clock edge, like the rest of
// the machine state; a read of the register being written in the same cycle
// returns the old value. R0 always reads as zero and ignores writes (the DLX
// convention; the lecture material does not spell it out). Reset clears all
// registers so that simulation starts from a known state.
module gpr_file
  import dlx_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [4:0]      rs1,
  input  logic [4:0]      rs2,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [4:0]      ws,
  input  logic [XLEN-1:0] wd
);
  logic [XLEN-1:0] regs [NREGS];

  assign rd1 = (rs1 == '0) ? '0 : regs[rs1];
  assign rd2 = (rs2 == '0) ? '0 : regs[rs2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && ws != '0) begin
      regs[ws] <= wd;
    end
  end
endmodule
