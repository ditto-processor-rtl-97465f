// Self-checking test of the normal-stream ROB (8 entries here): in-order
// allocation up to full, out-of-order first completions, selection of the
// oldest long-latency entry for its second execution, the compare of the two
// executions (match -> verified, differ -> mismatch), read ports, in-order
// retirement with wrap-around, and flush.
module tb_ditto_rob;
  import ditto_pkg::*;
  localparam int N = 8, IW = 3;
  logic clk = 0, rst_n = 0, flush = 0, alloc_valid = 0, x2_take = 0, retire = 0;
  rob_entry_t alloc_entry, rd_entry [2], x2_entry, head_entry;
  logic [IW-1:0] alloc_idx, mismatch_idx, x2_idx, head_idx, rd_idx [2];
  logic full, mismatch, x2_valid, head_valid;
  logic [IW:0] count;
  logic cmp_valid [3], cmp_second [3];
  logic [IW-1:0] cmp_idx [3];
  word_t cmp_data [3];
  int checks = 0, failures = 0;

  ditto_rob #(.ENTRIES(N), .NCMP(3), .IDX_W(IW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("ROB check failed: %s", what); end
  endtask

  function automatic rob_entry_t mk(int n, logic lng, logic done);
    rob_entry_t e;
    e = '0;
    e.pc = word_t'(n * 4); e.inst = word_t'(n); e.dest = reg_t'(n + 1); e.we = 1;
    e.is_long = lng; e.fu = lng ? FU_MUL : FU_ALU; e.done = done;
    e.result = done ? word_t'(100 + n) : '0;
    return e;
  endfunction

  task automatic complete(int port, int idx, logic second, word_t d);
    cmp_valid[port] = 1; cmp_idx[port] = IW'(idx); cmp_second[port] = second; cmp_data[port] = d;
  endtask
  task automatic clear_cmp();
    for (int p = 0; p < 3; p++) begin cmp_valid[p] = 0; cmp_idx[p] = 0; cmp_second[p] = 0; cmp_data[p] = 0; end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear_cmp();
    rd_idx[0] = 0; rd_idx[1] = 0; alloc_entry = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // allocate 8: entries 1, 3, 4 are long latency and not done
    for (int n = 0; n < N; n++) begin
      alloc_entry = mk(n, n == 1 || n == 3 || n == 4, !(n == 1 || n == 3 || n == 4));
      alloc_valid = 1;
      #1 chk("alloc idx", alloc_idx == IW'(n));
      @(negedge clk);
    end
    alloc_valid = 0;
    #1 chk("full", full && count == 4'(N));
    chk("no x2 before results", !x2_valid);
    // first results out of order: 4 then 1 (two ports in one cycle), 3 later
    complete(0, 4, 0, 32'd404);
    complete(1, 1, 0, 32'd101);
    @(negedge clk) clear_cmp();
    #1 chk("x2 picks oldest", x2_valid && x2_idx == 1 && x2_entry.result == 101);
    rd_idx[0] = 4; rd_idx[1] = 2;
    #1 chk("read ports", rd_entry[0].done && rd_entry[0].result == 404 && rd_entry[1].result == 102);
    x2_take = 1;
    @(negedge clk) x2_take = 0;
    #1 chk("x2 next", x2_valid && x2_idx == 4);
    x2_take = 1;
    @(negedge clk) x2_take = 0;
    #1 chk("x2 none left", !x2_valid);
    // second execution of 1 matches, of 4 differs
    complete(0, 1, 1, 32'd101);
    #1 chk("match no mismatch", !mismatch);
    @(negedge clk) clear_cmp();
    complete(2, 4, 1, 32'd999);
    #1 chk("mismatch flagged", mismatch && mismatch_idx == 4);
    @(negedge clk) clear_cmp();
    rd_idx[0] = 1; rd_idx[1] = 4;
    #1 chk("verified bits", rd_entry[0].verified && !rd_entry[1].verified);
    // retire three, allocate two more (wrap around)
    chk("head 0", head_valid && head_idx == 0 && head_entry.result == 100);
    retire = 1;
    repeat (3) @(negedge clk);
    retire = 0;
    #1 chk("head 3", head_idx == 3 && count == 4'(N - 3));
    alloc_entry = mk(8, 0, 1); alloc_valid = 1;
    #1 chk("wrap idx", alloc_idx == 0);
    @(negedge clk) alloc_valid = 0;
    complete(1, 3, 0, 32'd303);
    @(negedge clk) clear_cmp();
    #1 chk("x2 after wrap", x2_valid && x2_idx == 3);
    // flush
    flush = 1;
    @(negedge clk) flush = 0;
    #1 chk("flushed", !head_valid && count == 0 && !full && !x2_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
