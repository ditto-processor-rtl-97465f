// Instruction memory with two read ports, standing in for the 16 KB L1
// instruction cache of the baseline machine.
//
// The cache lies outside the protected core, so it is modelled as an
// always-hit word array of the cache's capacity (no tags or misses, the
// design's simplification). Port A serves the normal fetch half, port B the
// clone fetch half; both read combinationally within the fetch cycle (the
// 1-cycle hit latency). A write port loads programs. Addresses are byte
// addresses; bits [1:0] are ignored and the index wraps at WORDS.
module ditto_imem
  import ditto_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic  clk,
  input  logic  we,
  input  word_t waddr,
  input  word_t wdata,
  input  word_t addr_a,
  output word_t data_a,
  input  word_t addr_b,
  output word_t data_b
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign data_a = mem[addr_a[AW+1:2]];
  assign data_b = mem[addr_b[AW+1:2]];

endmodule
