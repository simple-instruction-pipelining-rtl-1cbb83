// tb_hazard_unit: random register numbers and write enables for the ID source
// registers and the EX, MA and WB destinations; stall must be raised exactly
// when a used, non-zero source matches a stage that will write it. Matches are
// forced often so that each stage's comparison is exercised.
module tb_hazard_unit;
  logic [4:0] rs1, rs2, exs, mas, wbs;
  logic u1, u2, exw, maw, wbw, stall, exp;
  int checks = 0, failures = 0, stalls = 0;

  hazard_unit dut (.id_rs1(rs1), .id_reads_rs1(u1), .id_rs2(rs2), .id_reads_rs2(u2),
                   .ex_we(exw), .ex_ws(exs), .ma_we(maw), .ma_ws(mas),
                   .wb_we(wbw), .wb_ws(wbs), .stall(stall));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      rs1 = $urandom_range(3); rs2 = $urandom_range(3);
      exs = $urandom_range(3); mas = $urandom_range(3); wbs = $urandom_range(3);
      {u1, u2, exw, maw, wbw} = 5'($urandom);
      #1;
      exp = 0;
      if (u1 && rs1 != 0 && ((exw && exs == rs1) || (maw && mas == rs1) || (wbw && wbs == rs1))) exp = 1;
      if (u2 && rs2 != 0 && ((exw && exs == rs2) || (maw && mas == rs2) || (wbw && wbs == rs2))) exp = 1;
      checks++;
      if (exp) stalls++;
      if (stall !== exp) begin
        failures++;
        $display("FAIL rs1=%0d/%b rs2=%0d/%b ex=%0d/%b ma=%0d/%b wb=%0d/%b stall=%b",
                 rs1, u1, rs2, u2, exs, exw, mas, maw, wbs, wbw, stall);
      end
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
