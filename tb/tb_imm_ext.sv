// tb_imm_ext: random immediates through each of the four extensions, compared
// with values formed independently by integer arithmetic.
module tb_imm_ext;
  import dlx_pkg::*;
  logic [25:0] imm;
  ext_sel_e sel;
  logic [31:0] ext, exp;
  int checks = 0, failures = 0;

  imm_ext dut (.imm(imm), .ext_sel(sel), .ext(ext));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int v16, v26;
      imm = $urandom;
      if (i < 8) imm = (i % 2) ? 26'h3FF_FFFF : 26'h200_8000;
      sel = ext_sel_e'(i % 4);
      v16 = int'(imm[15:0]); if (v16 >= 32768) v16 -= 65536;
      v26 = int'(imm);       if (v26 >= (1 << 25)) v26 -= (1 << 26);
      case (sel)
        EXT_S16:    exp = 32'(v16);
        EXT_U16:    exp = 32'(int'(imm[15:0]));
        EXT_S26:    exp = 32'(v26);
        default:    exp = 32'(int'(imm[15:0]) * 65536);
      endcase
      #1;
      checks++;
      if (ext !== exp) begin
        failures++;
        $display("FAIL sel=%0d imm=%h got %h exp %h", sel, imm, ext, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
