// tb_dlx_unpipelined: runs a program on the single-cycle DLX and compares it,
// cycle by cycle, with the instruction-level reference model (dlx_iss).
//
// The program sums an array with a BEQZ/J loop (taken and not-taken branches,
// loads), stores the sum, calls a subroutine with JAL and returns with JR,
// calls a second one through JALR (it builds a constant with LHI/ORI), then
// runs a block of random ALU and ALU-immediate instructions and stops in a
// J-to-self loop. Each cycle the PC must equal the model's PC (this is the
// CPI = 1 check: one instruction per clock), and the register write and memory
// write of the cycle must equal the model's. The mechanisms are counted and
// each must occur.
module tb_dlx_unpipelined;
  import dlx_pkg::*;
  import dlx_tb_pkg::*;

  localparam int unsigned IW = 256, DW = 64;
  logic clk = 0, rst_n = 0;
  logic imem_we = 0;
  logic [31:0] imem_addr = 0, imem_wdata = 0;
  logic [31:0] pc, inst, rf_wd, dm_addr, dm_wdata;
  logic [4:0]  rf_ws;
  logic        rf_we, dm_we;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_j = 0, n_jal = 0, n_jr = 0, n_jalr = 0, n_lw = 0, n_sw = 0;

  dlx_unpipelined #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk(clk), .rst_n(rst_n), .imem_we(imem_we), .imem_addr(imem_addr), .imem_wdata(imem_wdata),
    .pc(pc), .inst(inst), .rf_we(rf_we), .rf_ws(rf_ws),
    .rf_wd(rf_wd), .dm_we(dm_we), .dm_addr(dm_addr), .dm_wdata(dm_wdata));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @pc=%h: %s", pc, what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [IW];
  localparam int HALT = 114;

  initial begin
    dlx_iss iss = new(DW);
    effect_t e;
    foreach (prog[i]) prog[i] = NOP;
    prog[0]  = enc_i(OP_ADDI, 1, 0, 16'd0);          // r1 = 0 (pointer)
    prog[1]  = enc_i(OP_ADDI, 2, 0, 16'd8);          // r2 = 8 (count)
    prog[2]  = enc_i(OP_ADDI, 3, 0, 16'd0);          // r3 = 0 (sum)
    prog[3]  = enc_i(OP_BEQZ, 0, 2, 16'd20);         // loop: if r2 == 0 goto 9
    prog[4]  = enc_i(OP_LW,   4, 1, 16'd0);
    prog[5]  = enc_r(FN_ADD,  3, 3, 4);
    prog[6]  = enc_i(OP_ADDI, 1, 1, 16'd4);
    prog[7]  = enc_i(OP_SUBI, 2, 2, 16'd1);
    prog[8]  = enc_j(OP_J, -26'sd24);                // goto 3
    prog[9]  = enc_i(OP_SW,   3, 0, 16'd64);         // done: mem[64] = sum
    prog[10] = enc_j(OP_JAL, 26'd756);               // call 200
    prog[11] = enc_i(OP_ADDI, 7, 0, 16'd840);        // r7 = address of 210
    prog[12] = enc_i(OP_JALR, 0, 7, 16'd0);          // call through r7
    prog[13] = enc_i(OP_SW,  31, 0, 16'd68);         // mem[68] = link
    for (int i = 14; i < HALT; i++) prog[i] = rand_alu(10);
    prog[HALT] = enc_j(OP_J, -26'sd4);               // halt: J to self
    prog[200] = enc_i(OP_ADDI, 5, 0, 16'h55);
    prog[201] = enc_i(OP_JR,   0, 31, 16'd0);
    prog[210] = enc_i(OP_LHI,  9, 0, 16'h1234);
    prog[211] = enc_i(OP_ORI,  9, 9, 16'h5678);
    prog[212] = enc_i(OP_JR,   0, 31, 16'd0);

    for (int i = 0; i < DW; i++) begin
      logic [31:0] v;
      v = (i < 8) ? 32'($urandom_range(1000)) : 32'(0);
      dut.u_dmem.mem[i] = v;
      iss.dmem[i] = v;
    end

    // load the program through the instruction-memory port while in reset
    foreach (prog[i]) begin
      @(negedge clk);
      imem_we = 1; imem_addr = i * 4; imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 0;
    rst_n = 1;
    #1;
    while (iss.pc != HALT * 4) begin
      logic [31:0] i_exp;
      logic [5:0]  op;
      logic        zr;
      i_exp = prog[iss.pc[9:2]];
      op    = i_exp[31:26];
      zr    = iss.regs[i_exp[25:21]] == 0;
      check(pc == iss.pc, $sformatf("pc %h, model %h", pc, iss.pc));
      e = iss.step(i_exp, 1'b1);
      check(rf_we == e.rf_we && (!e.rf_we || (rf_ws == e.rf_ws && rf_wd == e.rf_wd)),
            $sformatf("reg write %b r%0d=%h, model %b r%0d=%h", rf_we, rf_ws, rf_wd,
                      e.rf_we, e.rf_ws, e.rf_wd));
      check(dm_we == e.dm_we && (!e.dm_we || (dm_addr == e.dm_addr && dm_wdata == e.dm_wdata)),
            "memory write");
      case (op)
        OP_BEQZ: if (zr) n_taken++; else n_not_taken++;
        OP_J: n_j++;   OP_JAL: n_jal++;  OP_JR: n_jr++;  OP_JALR: n_jalr++;
        OP_LW: n_lw++; OP_SW: n_sw++;
        default: ;
      endcase
      @(negedge clk);
    end
    check(pc == HALT * 4, "reached halt");
    check(dut.u_dmem.mem[16] == iss.dmem[16], "stored sum");
    check(dut.u_dmem.mem[17] == 32'd52, "JALR link value PC+4");
    for (int r = 0; r < 32; r++)
      check(dut.u_gpr.regs[r] == iss.regs[r] || r == 0, $sformatf("final r%0d", r));
    $display("mechanisms: taken=%0d not_taken=%0d J=%0d JAL=%0d JR=%0d JALR=%0d LW=%0d SW=%0d",
             n_taken, n_not_taken, n_j, n_jal, n_jr, n_jalr, n_lw, n_sw);
    check(n_taken > 0 && n_not_taken > 0 && n_j > 0 && n_jal > 0 && n_jr > 0 &&
          n_jalr > 0 && n_lw > 0 && n_sw > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
