// tb_dlx_top: end-to-end test of both machines in dlx_top at the design's
// default sizes (2048-word instruction and data memories).
//
// Pipeline (p_*): a straight-line program of random ALU, ALU-immediate, LHI,
// LW and SW instructions over 12 registers and 256 data words, ended by a
// marker instruction. Its register-write and memory-write traces must match
// the reference model in order, and the marker must write back in cycle
// (instructions - 1 + stalls + 4). Counted mechanisms: stalls, loads, stores,
// and runs of write-backs in consecutive cycles (full-rate issue).
//
// Single-cycle machine (s_*): a program that fills an array with squares
// (computed by repeated addition in a nested loop), sums it back with loads,
// calls a subroutine with JAL/JR and another through JALR/JR, and halts in a
// J-to-self loop. Its traces must match the model, and it must reach the halt
// after exactly as many cycles as the model executed instructions (CPI = 1).
// Counted: BEQZ taken and not taken, J, JAL, JR, JALR, LW, SW.
// Every counted mechanism must happen at least once.
module tb_dlx_top;
  import dlx_pkg::*;
  import dlx_tb_pkg::*;

  localparam int unsigned IW = 2048, DW = 2048;
  localparam int NPROG = 1500;
  localparam int SHALT = 40;

  logic p_clk = 0, p_rst_n = 0, s_clk = 0, s_rst_n = 0;
  logic p_imem_we = 0, s_imem_we = 0;
  logic [31:0] p_imem_addr = 0, p_imem_wdata = 0, s_imem_addr = 0, s_imem_wdata = 0;
  logic [31:0] p_pc, p_rf_wd, p_dm_addr, p_dm_wdata;
  logic [31:0] s_pc, s_inst, s_rf_wd, s_dm_addr, s_dm_wdata;
  logic [4:0]  p_rf_ws, s_rf_ws;
  logic        p_stall, p_rf_we, p_dm_we, s_rf_we, s_dm_we;
  int checks = 0, failures = 0;

  dlx_top dut (.*);

  always #5 p_clk = ~p_clk;
  always #7 s_clk = ~s_clk;

  typedef struct { int cyc; logic [4:0] ws; logic [31:0] wd; } rw_t;
  typedef struct { logic [31:0] addr; logic [31:0] data; } mw_t;
  rw_t prq[$], srq[$];
  mw_t pmq[$], smq[$];
  int p_cycle = 0, p_stalls = 0, p_loads = 0, p_stores = 0, p_b2b = 0, p_last_wb_cyc = -10;
  int s_cycle = 0, s_taken = 0, s_not_taken = 0, s_j = 0, s_jal = 0, s_jr = 0, s_jalr = 0;
  int s_lw = 0, s_sw = 0;
  bit s_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(negedge p_clk) if (p_rst_n) begin
    if (p_rf_we && p_rf_ws != 0) begin
      prq.push_back('{p_cycle, p_rf_ws, p_rf_wd});
      if (p_last_wb_cyc == p_cycle - 1) p_b2b++;
      p_last_wb_cyc = p_cycle;
    end
    if (p_dm_we) begin pmq.push_back('{p_dm_addr, p_dm_wdata}); p_stores++; end
    if (dut.u_pipe.ir_wb[31:26] == OP_LW) p_loads++;
    if (p_stall) p_stalls++;
    p_cycle++;
  end

  always @(negedge s_clk) if (s_rst_n && !s_done) begin
    if (s_pc == SHALT * 4) s_done = 1;
    else begin
      if (s_rf_we && s_rf_ws != 0) srq.push_back('{s_cycle, s_rf_ws, s_rf_wd});
      if (s_dm_we) smq.push_back('{s_dm_addr, s_dm_wdata});
      case (s_inst[31:26])
        OP_BEQZ: if (s_pc + 4 != dut.u_single.pc_next) s_taken++; else s_not_taken++;
        OP_J: s_j++;   OP_JAL: s_jal++;  OP_JR: s_jr++;  OP_JALR: s_jalr++;
        OP_LW: s_lw++; OP_SW: s_sw++;
        default: ;
      endcase
      s_cycle++;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] pprog [IW];
  logic [31:0] sprog [IW];

  initial begin
    dlx_iss piss = new(DW);
    dlx_iss siss = new(DW);
    effect_t e;
    rw_t pexp_r[$], sexp_r[$];
    mw_t pexp_m[$], sexp_m[$];
    int s_steps, last_wb;

    // ---- pipeline program ----
    foreach (pprog[i]) pprog[i] = NOP;
    for (int k = 0; k < NPROG - 1; k++)
      pprog[k] = ($urandom_range(2) == 0) ? rand_mem(12, 256) : rand_alu(12);
    pprog[NPROG - 1] = enc_i(OP_ADDI, 20, 0, 16'd1);     // marker, r20 used nowhere else
    // ---- single-cycle program ----
    foreach (sprog[i]) sprog[i] = NOP;
    sprog[0]  = enc_i(OP_ADDI, 1, 0, 16'd16);     // r1 = n = 16
    sprog[1]  = enc_i(OP_ADDI, 2, 0, 16'd0);      // r2 = i = 0
    sprog[2]  = enc_r(FN_SUB,  3, 2, 1);          // outer: r3 = i - n
    sprog[3]  = enc_i(OP_BEQZ, 0, 3, 16'd40);     //   if i == n goto 14
    sprog[4]  = enc_i(OP_ADDI, 4, 0, 16'd0);      //   r4 = acc = 0
    sprog[5]  = enc_i(OP_ADDI, 5, 2, 16'd0);      //   r5 = j = i
    sprog[6]  = enc_i(OP_BEQZ, 0, 5, 16'd12);     //   inner: if j == 0 goto 10
    sprog[7]  = enc_r(FN_ADD,  4, 4, 2);          //     acc += i
    sprog[8]  = enc_i(OP_SUBI, 5, 5, 16'd1);      //     j--
    sprog[9]  = enc_j(OP_J, -26'sd16);            //     goto 6
    sprog[10] = enc_i(OP_SLLI, 6, 2, 16'd2);      //   r6 = 4*i
    sprog[11] = enc_i(OP_SW,   4, 6, 16'd256);    //   mem[256 + 4i] = i*i
    sprog[12] = enc_i(OP_ADDI, 2, 2, 16'd1);      //   i++
    sprog[13] = enc_j(OP_J, -26'sd48);            //   goto 2
    sprog[14] = enc_i(OP_ADDI, 2, 0, 16'd0);      // r2 = i = 0
    sprog[15] = enc_i(OP_ADDI, 7, 0, 16'd0);      // r7 = sum = 0
    sprog[16] = enc_r(FN_SUB,  3, 2, 1);          // loop: r3 = i - n
    sprog[17] = enc_i(OP_BEQZ, 0, 3, 16'd20);     //   if i == n goto 23
    sprog[18] = enc_i(OP_SLLI, 6, 2, 16'd2);
    sprog[19] = enc_i(OP_LW,   8, 6, 16'd256);    //   r8 = mem[256 + 4i]
    sprog[20] = enc_r(FN_ADD,  7, 7, 8);          //   sum += r8
    sprog[21] = enc_i(OP_ADDI, 2, 2, 16'd1);      //   i++
    sprog[22] = enc_j(OP_J, -26'sd28);            //   goto 16
    sprog[23] = enc_i(OP_SW,   7, 0, 16'd512);    // mem[512] = sum
    sprog[24] = enc_j(OP_JAL, 26'd300);           // call 100
    sprog[25] = enc_i(OP_LHI,  9, 0, 16'h0000);   // r9 = 0
    sprog[26] = enc_i(OP_ORI,  9, 9, 16'd440);    // r9 = address of 110
    sprog[27] = enc_i(OP_JALR, 0, 9, 16'd0);      // call through r9
    sprog[28] = enc_i(OP_SW,  10, 0, 16'd516);    // mem[516] = result of 110
    sprog[29] = enc_j(OP_J, 26'd40);              // goto 40 (halt)
    sprog[SHALT] = enc_j(OP_J, -26'sd4);          // halt: J to self
    sprog[100] = enc_i(OP_SRAI, 10, 7, 16'd2);    // r10 = sum >> 2
    sprog[101] = enc_i(OP_JR,   0, 31, 16'd0);
    sprog[110] = enc_i(OP_XORI, 10, 10, 16'hFFFF);
    sprog[111] = enc_i(OP_JR,   0, 31, 16'd0);

    for (int i = 0; i < DW; i++) begin
      logic [31:0] v;
      v = $urandom;
      dut.u_pipe.u_dmem.mem[i] = v;  piss.dmem[i] = v;
      dut.u_single.u_dmem.mem[i] = 0; siss.dmem[i] = 0;
    end

    // reference traces
    for (int k = 0; k < NPROG; k++) begin
      e = piss.step(pprog[k], 1'b0);
      if (e.rf_we && e.rf_ws != 0) pexp_r.push_back('{0, e.rf_ws, e.rf_wd});
      if (e.dm_we) pexp_m.push_back('{e.dm_addr, e.dm_wdata});
    end
    s_steps = 0;
    while (siss.pc != SHALT * 4 && s_steps < 100000) begin
      e = siss.step(sprog[siss.pc[12:2]], 1'b1);
      if (e.rf_we && e.rf_ws != 0) sexp_r.push_back('{0, e.rf_ws, e.rf_wd});
      if (e.dm_we) sexp_m.push_back('{e.dm_addr, e.dm_wdata});
      s_steps++;
    end

    fork
      begin
        foreach (pprog[i]) begin     // program load through the port, in reset
          @(negedge p_clk);
          p_imem_we = 1; p_imem_addr = i * 4; p_imem_wdata = pprog[i];
        end
        @(negedge p_clk);
        p_imem_we = 0;
        p_rst_n = 1;
        wait (prq.size() > 0 && prq[prq.size() - 1].ws == 20);
        repeat (2) @(negedge p_clk);
      end
      begin
        foreach (sprog[i]) begin
          @(negedge s_clk);
          s_imem_we = 1; s_imem_addr = i * 4; s_imem_wdata = sprog[i];
        end
        @(negedge s_clk);
        s_imem_we = 0;
        s_rst_n = 1;
        wait (s_done);
      end
    join

    // ---- pipeline checks ----
    check(prq.size() == pexp_r.size(), $sformatf("pipe: %0d register writes, model %0d", prq.size(), pexp_r.size()));
    foreach (pexp_r[i])
      if (i < prq.size())
        check(prq[i].ws == pexp_r[i].ws && prq[i].wd == pexp_r[i].wd, $sformatf("pipe write %0d", i));
    check(pmq.size() == pexp_m.size(), "pipe: number of stores");
    foreach (pexp_m[i])
      if (i < pmq.size())
        check(pmq[i].addr == pexp_m[i].addr && pmq[i].data == pexp_m[i].data, $sformatf("pipe store %0d", i));
    last_wb = NPROG - 1 + p_stalls + 4;
    check(prq[prq.size() - 1].cyc == last_wb,
          $sformatf("pipe: marker wrote back in cycle %0d, expected %0d", prq[prq.size() - 1].cyc, last_wb));
    $display("pipe: instructions=%0d stalls=%0d loads=%0d stores=%0d back-to-back write-backs=%0d",
             NPROG, p_stalls, p_loads, p_stores, p_b2b);
    check(p_stalls > 0, "pipe: stall happened");
    check(p_loads > 0, "pipe: load happened");
    check(p_stores > 0, "pipe: store happened");
    check(p_b2b > 0, "pipe: full-rate write-back happened");

    // ---- single-cycle checks ----
    check(s_cycle == s_steps, $sformatf("single: %0d cycles for %0d instructions", s_cycle, s_steps));
    check(srq.size() == sexp_r.size(), "single: number of register writes");
    foreach (sexp_r[i])
      if (i < srq.size())
        check(srq[i].ws == sexp_r[i].ws && srq[i].wd == sexp_r[i].wd, $sformatf("single write %0d", i));
    check(smq.size() == sexp_m.size(), "single: number of stores");
    foreach (sexp_m[i])
      if (i < smq.size())
        check(smq[i].addr == sexp_m[i].addr && smq[i].data == sexp_m[i].data, $sformatf("single store %0d", i));
    check(dut.u_single.u_dmem.mem[128] == 32'd1240, "single: sum of squares 0..15 = 1240");
    check(dut.u_single.u_dmem.mem[129] == (32'd310 ^ 32'hFFFF), "single: subroutine results");
    $display("single: instructions=%0d taken=%0d not_taken=%0d J=%0d JAL=%0d JR=%0d JALR=%0d LW=%0d SW=%0d",
             s_steps, s_taken, s_not_taken, s_j, s_jal, s_jr, s_jalr, s_lw, s_sw);
    check(s_taken > 0, "single: taken branch");
    check(s_not_taken > 0, "single: not-taken branch");
    check(s_j > 0 && s_jal > 0 && s_jr > 0 && s_jalr > 0, "single: J, JAL, JR, JALR");
    check(s_lw > 0 && s_sw > 0, "single: LW, SW");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
