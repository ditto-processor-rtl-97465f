// Self-checking test of the pipelined multiplier: one operation per cycle,
// each result checked against a * b and against its issue cycle + 3.
module tb_ditto_mul;
  import ditto_pkg::*;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 0, flush = 0, in_valid = 0, in_second = 0;
  logic [6:0] in_tag;
  word_t a, b, y;
  logic out_valid, out_second;
  logic [6:0] out_tag;
  int checks = 0, failures = 0, cycle = 0;
  word_t exp_y [128];
  int    exp_c [128];
  int    seen = 0;

  ditto_mul #(.LAT(LAT), .TAG_W(7)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    seen++;
    checks += 3;
    if (y !== exp_y[out_tag]) begin failures++; $display("MUL tag %0d y=%h exp=%h", out_tag, y, exp_y[out_tag]); end
    if (cycle - exp_c[out_tag] != LAT) begin failures++; $display("MUL latency %0d", cycle - exp_c[out_tag]); end
    if (out_second !== out_tag[0]) failures++;
  end

  initial begin
    a = 0; b = 0; in_tag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      in_valid  = 1;
      in_tag    = 7'(n);
      in_second = n[0];
      a = $urandom; b = (n < 5) ? 32'd0 : $urandom;
      exp_y[n] = a * b;
      exp_c[n] = cycle;
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    // flush drops everything in flight
    in_valid = 1; in_tag = 7'd100;
    @(negedge clk) in_valid = 0; flush = 1;
    @(negedge clk) flush = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (seen != 100) begin failures++; $display("MUL seen %0d", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
