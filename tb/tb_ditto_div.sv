// Self-checking test of the iterative divider: random divisions (and divide
// by zero), quotient checked against a / b, result exactly 20 cycles after
// acceptance, busy while working, and a flush abandoning an operation.
module tb_ditto_div;
  import ditto_pkg::*;
  localparam int LAT = 20;
  logic clk = 0, rst_n = 0, flush = 0, in_valid = 0, in_second = 0;
  logic [6:0] in_tag = 0;
  word_t a = 0, b = 0, y;
  logic busy, out_valid, out_second;
  logic [6:0] out_tag;
  int checks = 0, failures = 0, cycle = 0;

  ditto_div #(.LAT(LAT), .TAG_W(7)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(word_t x, word_t z, logic [6:0] tg);
    int c0;
    word_t e;
    @(negedge clk);
    a = x; b = z; in_tag = tg; in_second = tg[0]; in_valid = 1;
    c0 = cycle;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!busy) begin failures++; $display("DIV not busy"); end
    while (!out_valid) @(negedge clk);
    e = (z == 0) ? 32'hFFFF_FFFF : x / z;
    checks += 3;
    if (y !== e) begin failures++; $display("DIV %h/%h y=%h exp=%h", x, z, y, e); end
    if (cycle - c0 != LAT) begin failures++; $display("DIV latency %0d", cycle - c0); end
    if (out_tag !== tg || out_second !== tg[0]) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(32'd100, 32'd7, 7'd1);
    one(32'hFFFF_FFFF, 32'd1, 7'd2);
    one(32'd5, 32'd0, 7'd3);
    one(32'd3, 32'd9, 7'd4);
    for (int n = 0; n < 60; n++) one($urandom, $urandom >> $urandom_range(0, 31), 7'(n));
    // flush abandons the operation
    @(negedge clk); a = 10; b = 2; in_valid = 1;
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    flush = 1;
    @(negedge clk); flush = 0;
    checks++;
    if (busy) failures++;
    repeat (25) begin
      @(negedge clk);
      if (out_valid) begin failures++; $display("DIV result after flush"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
