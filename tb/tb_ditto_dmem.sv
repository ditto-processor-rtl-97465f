// Self-checking test of the data memory: writes, then pipelined reads one per
// cycle, each returned exactly 3 cycles later with its tag; flush drops reads
// in flight; the debug port reads the array.
module tb_ditto_dmem;
  import ditto_pkg::*;
  localparam int W = 256, LAT = 3;
  logic clk = 0, rst_n = 0, flush = 0, rd_valid = 0, rd_second = 0, we = 0;
  word_t rd_addr = 0, waddr = 0, wdata = 0, dbg_addr = 0, dbg_data, rd_out_data;
  logic [6:0] rd_tag = 0, rd_out_tag;
  logic rd_out_valid, rd_out_second;
  word_t model [W];
  int exp_cycle [128];
  word_t exp_data [128];
  int checks = 0, failures = 0, cycle = 0, seen = 0;

  ditto_dmem #(.WORDS(W), .LOAD_LAT(LAT), .TAG_W(7)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rd_out_valid) begin
    seen++;
    checks += 2;
    if (rd_out_data !== exp_data[rd_out_tag]) begin failures++; $display("DMEM data tag %0d", rd_out_tag); end
    if (cycle - exp_cycle[rd_out_tag] != LAT) begin failures++; $display("DMEM latency %0d", cycle - exp_cycle[rd_out_tag]); end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; waddr = word_t'(i * 4); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 100; n++) begin
      int i;
      @(negedge clk);
      i = $urandom_range(0, W - 1);
      rd_valid = 1; rd_addr = word_t'(i * 4); rd_tag = 7'(n); rd_second = n[0];
      exp_data[n] = model[i]; exp_cycle[n] = cycle;
      dbg_addr = word_t'(((i + 1) % W) * 4);
      #1;
      checks++;
      if (dbg_data !== model[(i + 1) % W]) failures++;
    end
    @(negedge clk) rd_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    rd_valid = 1; rd_tag = 7'd120;
    @(negedge clk) rd_valid = 0; flush = 1;
    @(negedge clk) flush = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (seen != 100) begin failures++; $display("DMEM seen %0d", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
