// tb_hardwired_ctrl: checks every row of the hardwired control table (opcode
// class -> ExtSel, BSrc, OpSel, MemWrite, RegWrite, WBSrc, RegDst, PCSrc) for
// each opcode of the class, BEQZ with zero? low and high, and that an unused
// opcode writes nothing and falls through to PC+4. Don't-care entries of the
// table are not checked.
module tb_hardwired_ctrl;
  import dlx_pkg::*;
  logic [5:0] opcode;
  logic zero;
  ctrl_t c;
  int checks = 0, failures = 0;

  hardwired_ctrl dut (.opcode(opcode), .zero(zero), .ctrl(c));

  // expected row; '*' columns are passed as -1 and skipped
  task automatic row(string nm, logic [5:0] op, logic z,
                     int ext, int bsrc, int opsel, int mw, int rw, int wbs, int dst, int pcs);
    opcode = op; zero = z; #1;
    checks++;
    if ((ext   >= 0 && int'(c.ext_sel) != ext)  || (bsrc >= 0 && int'(c.bsrc) != bsrc) ||
        (opsel >= 0 && int'(c.opsel) != opsel)  || int'(c.mem_write) != mw ||
        int'(c.reg_write) != rw || (wbs >= 0 && int'(c.wbsrc) != wbs) ||
        (dst >= 0 && int'(c.regdst) != dst) || int'(c.pcsrc) != pcs) begin
      failures++;
      $display("FAIL %s op=%h z=%b: %p", nm, op, z, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int S16 = 0, U16 = 1, S26 = 2, H16 = 3;
  localparam int REG = 0, IMM = 1;
  localparam int FUNC = 0, OPC = 1, ADD = 2, ZQ = 3;
  localparam int WALU = 0, WMEM = 1, WPC = 2;
  localparam int RF2 = 0, RF3 = 1, R31 = 2;
  localparam int NXT = 0, PCR = 1, RIND = 2;

  initial begin
    logic [5:0] alui  [11] = '{6'h08, 6'h0A, 6'h14, 6'h16, 6'h17, 6'h18, 6'h19, 6'h1A, 6'h1B, 6'h1C, 6'h1D};
    logic [5:0] aluiu [5]  = '{6'h09, 6'h0B, 6'h0C, 6'h0D, 6'h0E};
    for (int z = 0; z < 2; z++) begin
      row("ALU",  6'h00, z[0], -1,  REG, FUNC, 0, 1, WALU, RF3, NXT);
      foreach (alui[i])  row("ALUi",  alui[i],  z[0], S16, IMM, OPC, 0, 1, WALU, RF2, NXT);
      foreach (aluiu[i]) row("ALUiu", aluiu[i], z[0], U16, IMM, OPC, 0, 1, WALU, RF2, NXT);
      row("LHI",  6'h0F, z[0], H16, IMM, OPC, 0, 1, WALU, RF2, NXT);
      row("LW",   6'h23, z[0], S16, IMM, ADD, 0, 1, WMEM, RF2, NXT);
      row("SW",   6'h2B, z[0], S16, IMM, ADD, 1, 0, -1,   -1,  NXT);
      row("J",    6'h02, z[0], S26, -1,  -1,  0, 0, -1,   -1,  PCR);
      row("JAL",  6'h03, z[0], S26, -1,  -1,  0, 1, WPC,  R31, PCR);
      row("JR",   6'h12, z[0], -1,  -1,  -1,  0, 0, -1,   -1,  RIND);
      row("JALR", 6'h13, z[0], -1,  -1,  -1,  0, 1, WPC,  R31, RIND);
      row("undef", 6'h3F, z[0], -1, -1,  -1,  0, 0, -1,   -1,  NXT);
    end
    row("BEQZ taken",     6'h04, 1'b1, S16, -1, ZQ, 0, 0, -1, -1, PCR);
    row("BEQZ not taken", 6'h04, 1'b0, S16, -1, ZQ, 0, 0, -1, -1, NXT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
