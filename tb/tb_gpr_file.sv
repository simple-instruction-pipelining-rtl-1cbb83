// tb_gpr_file: checks the register file against a shadow copy: random writes
// and two simultaneous combinational reads, R0 reading zero after a write, and
// a read of the register being written returning the old value until the edge.
module tb_gpr_file;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] rs1 = 0, rs2 = 0, ws = 0;
  logic [31:0] wd = 0, rd1, rd2;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  gpr_file dut (.clk(clk), .rst_n(rst_n), .rs1(rs1), .rs2(rs2), .rd1(rd1), .rd2(rd2),
                .we(we), .ws(ws), .wd(wd));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      rs1 = i; #1 check(rd1, 0, "after reset");
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(3) != 0; ws = $urandom; wd = $urandom;
      rs1 = $urandom; rs2 = (i % 7 == 0) ? ws : 5'($urandom);
      #1;
      check(rd1, shadow[rs1], "rd1");
      check(rd2, shadow[rs2], "rd2 (old value while written)");
      if (we && ws != 0) shadow[ws] = wd;
    end
    @(negedge clk); we = 1; ws = 0; wd = 32'hFFFF_FFFF;
    @(negedge clk); we = 0; rs1 = 0; rs2 = 0;
    #1 check(rd1, 0, "R0 rd1"); check(rd2, 0, "R0 rd2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
