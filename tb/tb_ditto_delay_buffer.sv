// Self-checking test of the delay buffer (8 entries here) against a queue
// model: pushes of one or two entries, reads through a read pointer running
// ahead of the head, pops of one or two, free / count, wrap-around, a
// single stored-bit flip that must be corrected on read, and flush.
module tb_ditto_delay_buffer;
  import ditto_pkg::*;
  localparam int N = 8, IW = 3;
  logic clk = 0, rst_n = 0, flush = 0, inj_flip = 0;
  logic [1:0] push_n = 0, pop_n = 0;
  db_entry_t push_e [2], rd_e [2];
  logic [IW:0] count, free;
  logic [IW-1:0] head_ptr, rd_ptr = 0;
  logic rd_corrected, rd_uncorrectable;
  db_entry_t model [$];
  int checks = 0, failures = 0, ncorr = 0;

  ditto_delay_buffer #(.ENTRIES(N), .IDX_W(IW)) dut (.*);
  always #5 clk = ~clk;

  function automatic db_entry_t rnd();
    db_entry_t e;
    e.operands = 1'($urandom); e.has_ops = 1'($urandom);
    e.pc = $urandom; e.inst = $urandom; e.w0 = $urandom; e.w1 = $urandom;
    return e;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_e[0] = '0; push_e[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int sz, off;
      @(negedge clk);
      sz = model.size();
      // read at a random offset from the head
      off = (sz > 1) ? $urandom_range(0, sz - 2) : 0;
      rd_ptr = IW'((int'(head_ptr) + off) % N);
      #1;
      checks++;
      if (count != (IW+1)'(sz) || free != (IW+1)'(N - sz)) begin failures++; $display("DB count %0d exp %0d", count, sz); end
      if (sz >= 2) begin
        checks += 2;
        if (rd_e[0] !== model[off]) begin failures++; if (failures < 5) $display("DB rd0 off %0d", off); end
        if (rd_e[1] !== model[off + 1]) begin failures++; if (failures < 5) $display("DB rd1 off %0d", off); end
        if (rd_corrected) ncorr++;
        checks++;
        if (rd_uncorrectable) failures++;
      end
      pop_n  = 2'($urandom_range(0, (sz < 2) ? sz : 2));
      push_n = 2'($urandom_range(0, 2));
      if (int'(push_n) > N - sz + int'(pop_n)) push_n = 0;
      push_e[0] = rnd(); push_e[1] = rnd();
      inj_flip = (push_n != 0) && (n % 37 == 0);
      flush = (n % 700 == 699);
      @(posedge clk);
      if (flush) model.delete();
      else begin
        for (int k = 0; k < int'(pop_n); k++) void'(model.pop_front());
        for (int k = 0; k < int'(push_n); k++) model.push_back(push_e[k]);
      end
      #1 push_n = 0; pop_n = 0; inj_flip = 0; flush = 0;
    end
    checks++;
    if (ncorr == 0) begin failures++; $display("no corrected read seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
