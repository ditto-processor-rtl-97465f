// Iterative unsigned divider (reference-configuration latency 20, not pipelined).
//
// One division at a time: busy is high from the accepting cycle until the
// result is returned. The quotient is produced by restoring division, two
// quotient bits per cycle (16 working cycles for 32 bits); the unit then
// waits so that out_valid comes exactly LAT cycles after in_valid. Division
// by zero gives all ones. LAT must be at least 17. The issue tag (ROB index, first/second execution)
// travels with the operation. flush abandons the operation in progress.
module ditto_div
  import ditto_pkg::*;
#(
  parameter int unsigned LAT   = 20,
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
  output logic             busy,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_second,
  output word_t            y
);

  localparam int unsigned CNT_W = $clog2(LAT + 1);

  logic [CNT_W-1:0] cnt;       // cycles left until the result is due
  logic [4:0]       step;      // 2-bit steps done
  word_t            q, d, r;
  logic [TAG_W-1:0] tag;
  logic             second;
  word_t            q_n, r_n;

  // Two restoring-division steps.
  always_comb begin
    logic [32:0] rr;
    word_t       qq;
    rr = {1'b0, r};
    qq = q;
    for (int k = 0; k < 2; k++) begin
      rr = {rr[31:0], qq[31]};
      qq = {qq[30:0], 1'b0};
      if (rr >= {1'b0, d}) begin
        rr    = rr - {1'b0, d};
        qq[0] = 1'b1;
      end
    end
    q_n = qq;
    r_n = rr[31:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; step <= '0; q <= '0; d <= '0; r <= '0; tag <= '0; second <= 1'b0;
    end else if (flush) begin
      cnt <= '0;
    end else if (cnt == '0) begin
      if (in_valid) begin
        cnt    <= CNT_W'(LAT);
        step   <= '0;
        q      <= a;
        d      <= b;
        r      <= '0;
        tag    <= in_tag;
        second <= in_second;
      end
    end else begin
      cnt <= cnt - 1'b1;
      if (step != 5'd16) begin
        step <= step + 1'b1;
        q    <= q_n;
        r    <= r_n;
      end
    end
  end

  assign busy       = (cnt != '0);
  assign out_valid  = (cnt == CNT_W'(1)) && !flush;
  assign out_tag    = tag;
  assign out_second = second;
  assign y          = (d == '0) ? '1 : q;

endmodule
