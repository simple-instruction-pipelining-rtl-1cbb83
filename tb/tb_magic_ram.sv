// tb_magic_ram: checks the memory model. Writes random words at the clock edge,
// checks that a write with we low changes nothing, that a read is combinational
// (data follows the address with no clock edge) and that a write is visible
// only after the edge. Reference: a shadow array in the testbench.
module tb_magic_ram;
  localparam int unsigned WORDS = 64;
  logic clk = 0, we = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  magic_ram #(.WORDS(WORDS)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; addr = i * 4; wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    // combinational reads, no clock edge between them
    for (int i = 0; i < 200; i++) begin
      int k;
      k = $urandom_range(WORDS - 1);
      addr = k * 4 + $urandom_range(3);
      #1 check(rdata, shadow[k], "comb read");
    end
    // write with we low is ignored
    @(negedge clk); addr = 8; wdata = ~shadow[2]; we = 0;
    @(negedge clk); check(rdata, shadow[2], "we low");
    // write lands at the edge, not before
    addr = 12; wdata = 32'hCAFE_F00D; we = 1;
    #1 check(rdata, shadow[3], "before edge");
    @(posedge clk); #1 check(rdata, 32'hCAFE_F00D, "after edge");
    shadow[3] = 32'hCAFE_F00D;
    // random mixed traffic
    for (int i = 0; i < 500; i++) begin
      int k;
      @(negedge clk);
      k = $urandom_range(WORDS - 1);
      we = $urandom_range(1); addr = k * 4; wdata = $urandom;
      #1 check(rdata, shadow[k], "mixed read");
      if (we) shadow[k] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < WORDS; i++) begin
      addr = i * 4; #1 check(rdata, shadow[i], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
