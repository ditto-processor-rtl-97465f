// Pipelined integer multiplier (reference-configuration latency 3, one issue per cycle).
//
// Accepts one multiply per cycle and returns the low 32 bits of the product
// LAT cycles later together with the tag it was issued with (ROB index and
// whether this is the first or the second execution of the instruction).
// The product is formed in the first stage and carried through the remaining
// ones; a synthesis tool may retime it. flush empties the pipeline on a
// rollback. Timing: in_valid at cycle t gives out_valid at cycle t+LAT.
module ditto_mul
  import ditto_pkg::*;
#(
  parameter int unsigned LAT   = 3,
  parameter int unsigned TAG_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic             in_second,
  input  word_t            a,
  input  word_t            b,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_second,
  output word_t            y
);

  logic             v   [LAT];
  logic [TAG_W-1:0] tg  [LAT];
  logic             sec [LAT];
  word_t            p   [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        v[i] <= 1'b0; tg[i] <= '0; sec[i] <= 1'b0; p[i] <= '0;
      end
    end else begin
      v[0]   <= in_valid && !flush;
      tg[0]  <= in_tag;
      sec[0] <= in_second;
      p[0]   <= a * b;
      for (int i = 1; i < LAT; i++) begin
        v[i]   <= v[i-1] && !flush;
        tg[i]  <= tg[i-1];
        sec[i] <= sec[i-1];
        p[i]   <= p[i-1];
      end
    end
  end

  assign out_valid  = v[LAT-1] && !flush;
  assign out_tag    = tg[LAT-1];
  assign out_second = sec[LAT-1];
  assign y          = p[LAT-1];

endmodule
