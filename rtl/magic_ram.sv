// magic_ram: the idealised memory used for both the instruction and the data
// memory of the DLX machines.
//
// A read is combinational: rdata always shows the word at addr. A write happens
// at the rising clock edge when we is high, so addr, wdata and we must be stable
// at that edge. Every access completes in one cycle; this is the lecture's
// memory model, which stands for an on-chip cache that always hits.
//
// The memory is word organised. addr is a byte address; its two low bits are
// ignored (the machines only make word accesses) and the next $clog2(WORDS) bits
// select the word, so the memory repeats every WORDS*4 bytes. The size is this
// design's choice: 2048 words (8 KiB) is the small end of the 8-64 KB range the
// lecture quotes for first-level caches of the time.
// Contents are not reset; a program and its data are loaded by the environment.
module magic_ram #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             we,
  input  logic [31:0]      addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    widx;

  assign widx  = addr[AW+1:2];
  assign rdata = mem[widx];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end
endmodule
