// imm_ext: immediate extension ("Imm Ext") of the DLX datapath.
//
// Takes the low 26 bits of the instruction and forms a 32-bit operand as chosen
// by ExtSel, combinationally:
//   sExt16 - sign-extend bits 15:0 (signed ALU immediates, load/store
//            displacement, branch offset)
//   uExt16 - zero-extend bits 15:0 (unsigned and logical ALU immediates)
//   sExt26 - sign-extend bits 25:0 (J and JAL offset)
//   High16 - bits 15:0 placed in the upper half, lower half zero (LHI)
// The four choices are the lecture's; their exact bit meaning is the usual DLX one.
module imm_ext
  import dlx_pkg::*;
(
  input  logic [25:0]     imm,
  input  ext_sel_e        ext_sel,
  output logic [XLEN-1:0] ext
);
  always_comb begin
    unique case (ext_sel)
      EXT_S16:    ext = {{16{imm[15]}}, imm[15:0]};
      EXT_U16:    ext = {16'h0000, imm[15:0]};
      EXT_S26:    ext = {{6{imm[25]}}, imm};
      EXT_HIGH16: ext = {imm[15:0], 16'h0000};
      default:    ext = '0;
    endcase
  end
endmodule
