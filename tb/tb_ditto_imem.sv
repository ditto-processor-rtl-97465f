// Self-checking test of the two-port instruction memory: random words
// written, both ports read back at independent addresses.
module tb_ditto_imem;
  import ditto_pkg::*;
  localparam int W = 256;
  logic clk = 0, we = 0;
  word_t waddr = 0, wdata = 0, addr_a = 0, data_a, addr_b = 0, data_b;
  word_t model [W];
  int checks = 0, failures = 0;

  ditto_imem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; waddr = word_t'(i * 4); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 500; n++) begin
      int i, j;
      i = $urandom_range(0, W - 1); j = $urandom_range(0, W - 1);
      addr_a = word_t'(i * 4); addr_b = word_t'(j * 4 + 2);   // low bits ignored
      #1;
      checks += 2;
      if (data_a !== model[i]) failures++;
      if (data_b !== model[j]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
