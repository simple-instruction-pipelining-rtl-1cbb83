// hazard_unit: stall feedback of the five-stage DLX pipeline.
//
// An instruction in decode (ID) reads its source registers from the register
// file, which is written only when an instruction leaves write-back (WB) at the
// clock edge. If any older instruction still in EX, MA or WB is going to write a
// register the ID instruction reads, the ID instruction must wait: stall is
// raised, the pipeline holds PC and the ID instruction register, and a bubble
// enters EX. R0 is never a hazard since it always reads zero.
//
// This is the "feedback to previous stages to stall" scheme: the decision needs
// only the instruction registers of the later stages. The lecture names the
// mechanism but not its logic; this comparison of register numbers is the
// simplest circuit that does it. Purely combinational.
module hazard_unit
  import dlx_pkg::*;
(
  input  logic [4:0] id_rs1,
  input  logic       id_reads_rs1,
  input  logic [4:0] id_rs2,
  input  logic       id_reads_rs2,
  input  logic       ex_we,
  input  logic [4:0] ex_ws,
  input  logic       ma_we,
  input  logic [4:0] ma_ws,
  input  logic       wb_we,
  input  logic [4:0] wb_ws,
  output logic       stall
);
  function automatic logic pending(input logic [4:0] r, input logic used,
                                   input logic we, input logic [4:0] ws);
    return used && we && (r != '0) && (r == ws);
  endfunction

  logic hz1, hz2;
  assign hz1 = pending(id_rs1, id_reads_rs1, ex_we, ex_ws) ||
               pending(id_rs1, id_reads_rs1, ma_we, ma_ws) ||
               pending(id_rs1, id_reads_rs1, wb_we, wb_ws);
  assign hz2 = pending(id_rs2, id_reads_rs2, ex_we, ex_ws) ||
               pending(id_rs2, id_reads_rs2, ma_we, ma_ws) ||
               pending(id_rs2, id_reads_rs2, wb_we, wb_ws);
  assign stall = hz1 || hz2;
endmodule
