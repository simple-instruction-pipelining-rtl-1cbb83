// tb_dlx_pipelined: runs a program on the five-stage DLX pipeline and checks it
// against the instruction-level reference model (dlx_iss) and against the
// pipeline's timing.
//
// Program:
//   0-4   five independent ADDIs: each must write back exactly 4 cycles after
//         it was fetched (IF ID EX MA WB), in five consecutive cycles (CPI = 1)
//   5-6   ADDI r6 then ADD r7,r6,r6: the dependent instruction must stall for
//         exactly 3 cycles (no bypass; its source is written when the producer
//         leaves WB), so r6 is written in cycle 9 and r7 in cycle 13
//   7-    random ALU, ALU-immediate, LW and SW over 10 registers and 16 data
//         words, so dependences at every distance occur, then a marker ADDI
// In cycles 4-6 the instruction registers of ID, EX, MA and WB must hold four
// consecutive instructions (the resource-usage chart of a full pipeline).
// The ordered register-write and memory-write traces must equal the model's,
// and the last instruction must complete at cycle (instructions + stalls + 4).
module tb_dlx_pipelined;
  import dlx_pkg::*;
  import dlx_tb_pkg::*;

  localparam int unsigned IW = 512, DW = 16;
  localparam int NRAND = 400;
  localparam int NPROG = 8 + NRAND;
  logic clk = 0, rst_n = 0;
  logic imem_we = 0;
  logic [31:0] imem_addr = 0, imem_wdata = 0;
  logic [31:0] pc, rf_wd, dm_addr, dm_wdata;
  logic [4:0]  rf_ws;
  logic        rf_we, dm_we, stall;
  int checks = 0, failures = 0;
  int cycle = 0, stalls = 0;

  typedef struct { int cyc; logic [4:0] ws; logic [31:0] wd; } rw_t;
  typedef struct { logic [31:0] addr; logic [31:0] data; } mw_t;
  rw_t rq[$];
  mw_t mq[$];

  dlx_pipelined #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk(clk), .rst_n(rst_n), .imem_we(imem_we), .imem_addr(imem_addr), .imem_wdata(imem_wdata),
    .pc(pc), .stall(stall), .rf_we(rf_we), .rf_ws(rf_ws),
    .rf_wd(rf_wd), .dm_we(dm_we), .dm_addr(dm_addr), .dm_wdata(dm_wdata));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // observe one cycle at a time
  always @(negedge clk) if (rst_n) begin
    if (rf_we && rf_ws != 0) rq.push_back('{cycle, rf_ws, rf_wd});
    if (dm_we) mq.push_back('{dm_addr, dm_wdata});
    if (stall) stalls++;
    // resource usage: in cycles 4-6 every stage holds a different instruction,
    // the one fetched one cycle after the instruction in the next stage
    if (cycle >= 4 && cycle <= 6)
      check(dut.ir_id == prog[cycle - 1] && dut.ir_ex == prog[cycle - 2] &&
            dut.ir_ma == prog[cycle - 3] && dut.ir_wb == prog[cycle - 4],
            $sformatf("stage occupancy in cycle %0d", cycle));
    cycle++;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [IW];

  initial begin
    dlx_iss iss = new(DW);
    effect_t e;
    rw_t exp_r[$];
    mw_t exp_m[$];
    int last_wb, stalls_at_13;
    foreach (prog[i]) prog[i] = NOP;
    for (int k = 0; k < 5; k++) prog[k] = enc_i(OP_ADDI, 5'(k + 1), 0, 16'(100 + k));
    prog[5] = enc_i(OP_ADDI, 6, 0, 16'd7);
    prog[6] = enc_r(FN_ADD, 7, 6, 6);
    for (int k = 7; k < NPROG - 1; k++) prog[k] = ($urandom_range(2) == 0) ? rand_mem(10, DW) : rand_alu(10);

    prog[NPROG - 1] = enc_i(OP_ADDI, 11, 0, 16'd1);   // marker, r11 used nowhere else
    for (int i = 0; i < DW; i++) begin
      logic [31:0] v;
      v = $urandom;
      dut.u_dmem.mem[i] = v;
      iss.dmem[i] = v;
    end
    for (int k = 0; k < NPROG; k++) begin
      e = iss.step(prog[k], 1'b0);
      if (e.rf_we && e.rf_ws != 0) exp_r.push_back('{0, e.rf_ws, e.rf_wd});
      if (e.dm_we) exp_m.push_back('{e.dm_addr, e.dm_wdata});
    end

    // load the program through the instruction-memory port while in reset
    foreach (prog[i]) begin
      @(negedge clk);
      imem_we = 1; imem_addr = i * 4; imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 0;
    rst_n = 1;
    wait (cycle == 14);
    stalls_at_13 = stalls;
    wait (cycle == NPROG + stalls + 8);
    @(negedge clk);

    // timing of the first instructions
    for (int k = 0; k < 5; k++)
      check(rq.size() > k && rq[k].ws == 5'(k + 1) && rq[k].cyc == k + 4,
            $sformatf("instruction %0d writes back in cycle %0d", k, k + 4));
    check(rq.size() > 6 && rq[5].ws == 6 && rq[5].cyc == 9, "producer r6 in cycle 9");
    check(rq.size() > 6 && rq[6].ws == 7 && rq[6].cyc == 13 && rq[6].wd == 14,
          "dependent r7 = 14 in cycle 13 after a 3-cycle stall");
    check(stalls_at_13 == 3, $sformatf("3 stall cycles for back-to-back dependence, saw %0d", stalls_at_13));

    // architectural traces
    check(rq.size() == exp_r.size(), $sformatf("%0d register writes, model %0d", rq.size(), exp_r.size()));
    foreach (exp_r[i])
      if (i < rq.size())
        check(rq[i].ws == exp_r[i].ws && rq[i].wd == exp_r[i].wd,
              $sformatf("write %0d: r%0d=%h, model r%0d=%h", i, rq[i].ws, rq[i].wd, exp_r[i].ws, exp_r[i].wd));
    check(mq.size() == exp_m.size(), "number of memory writes");
    foreach (exp_m[i])
      if (i < mq.size())
        check(mq[i].addr == exp_m[i].addr && mq[i].data == exp_m[i].data, $sformatf("store %0d", i));
    for (int r = 1; r < 32; r++) check(dut.u_gpr.regs[r] == iss.regs[r], $sformatf("final r%0d", r));

    // throughput: the last instruction leaves WB at cycle NPROG - 1 + stalls + 4
    last_wb = NPROG - 1 + stalls + 4;
    check(rq.size() > 0 && rq[rq.size() - 1].ws == 11 && rq[rq.size() - 1].cyc == last_wb,
          $sformatf("last instruction writes back in cycle %0d", last_wb));
    $display("instructions=%0d stalls=%0d cycles to last write-back=%0d", NPROG, stalls, last_wb);
    check(stalls > 3, "stalls occur in the random section");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
