// Self-checking test of the LP-ROB (4 entries here): allocation with copied
// results, clone renaming (youngest older writer wins, younger entries and
// register 0 ignored), expected-value read, in-order retirement, full, flush.
module tb_ditto_lp_rob;
  import ditto_pkg::*;
  localparam int N = 4, IW = 2;
  logic clk = 0, rst_n = 0, flush = 0, alloc_valid = 0, alloc_we = 0, retire = 0;
  reg_t alloc_dest = 0, q_src [2];
  word_t alloc_result = 0, alloc_addr = 0, q_val [2], e_result, e_addr;
  logic [IW-1:0] alloc_idx, q_idx = 0, e_idx = 0, head_idx;
  logic full, head_valid, q_hit [2];
  logic [IW:0] count;
  int checks = 0, failures = 0;

  ditto_lp_rob #(.ENTRIES(N), .IDX_W(IW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("LP check failed: %s", what); end
  endtask

  task automatic alloc(reg_t d, logic we, word_t r);
    alloc_valid = 1; alloc_dest = d; alloc_we = we; alloc_result = r; alloc_addr = r + 1;
    @(negedge clk) alloc_valid = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_src[0] = 0; q_src[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    alloc(5'd1, 1, 32'd10);   // idx 0
    alloc(5'd2, 1, 32'd20);   // idx 1
    alloc(5'd1, 1, 32'd11);   // idx 2
    alloc(5'd3, 0, 32'd30);   // idx 3, no register write
    #1 chk("full", full && count == 4);
    q_idx = 2; q_src[0] = 5'd1; q_src[1] = 5'd2;
    #1 chk("older r1 from idx0", q_hit[0] && q_val[0] == 10);
    chk("older r2 from idx1", q_hit[1] && q_val[1] == 20);
    q_idx = 3; q_src[1] = 5'd3;
    #1 chk("youngest older r1", q_hit[0] && q_val[0] == 11);
    chk("non-writer ignored", !q_hit[1]);
    q_idx = 0;
    #1 chk("head has no older", !q_hit[0]);
    q_idx = 1; q_src[0] = 5'd0;
    #1 chk("r0 never hits", !q_hit[0]);
    e_idx = 2;
    #1 chk("expected values", e_result == 11 && e_addr == 12);
    // retire two and reuse
    chk("head", head_valid && head_idx == 0);
    @(negedge clk);
    retire = 1;
    repeat (2) @(negedge clk);
    retire = 0;
    #1 chk("head 2", head_idx == 2 && count == 2);
    @(negedge clk);
    alloc(5'd1, 1, 32'd12);   // idx 0 again
    q_idx = 1; q_src[0] = 5'd1;   // consumer at idx1 -> older: 2, 3, 0
    #1 chk("wrap youngest", q_hit[0] && q_val[0] == 12);
    q_idx = 0;
    #1 chk("wrap older only", q_hit[0] && q_val[0] == 11);
    @(negedge clk);
    flush = 1;
    @(negedge clk) flush = 0;
    #1 chk("flushed", !head_valid && count == 0);
    q_idx = 1;
    #1 chk("no hit after flush", !q_hit[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
