// LP-ROB: the region of the reorder buffer that holds cloned instructions.
//
// A circular queue in program order. A clone is allocated after its
// re-decode, and its entry receives the original instruction's result and
// data address / target, copied (ECC-corrected) from the delay buffer. The
// entry is retired in order once the clone has been verified.
//
// Clone renaming: a clone source register written by an older clone that is
// still in the LP-ROB takes that entry's copied result, so clones never wait
// for each other; otherwise the source reads the verified register value.
// The lookup port returns, for the consumer at q_idx, the youngest entry
// between the head and q_idx (exclusive) that writes the asked register.
// Combinational lookup; updates at the clock edge; flush empties the queue.
module ditto_lp_rob
  import ditto_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             alloc_valid,
  input  reg_t             alloc_dest,
  input  logic             alloc_we,
  input  word_t            alloc_result,
  input  word_t            alloc_addr,
  output logic [IDX_W-1:0] alloc_idx,
  output logic             full,
  output logic [IDX_W:0]   count,
  // clone renaming lookup
  input  logic [IDX_W-1:0] q_idx,
  input  reg_t             q_src [2],
  output logic             q_hit [2],
  output word_t            q_val [2],
  // expected values of an entry (for the second check)
  input  logic [IDX_W-1:0] e_idx,
  output word_t            e_result,
  output word_t            e_addr,
  // head / retirement
  output logic             head_valid,
  output logic [IDX_W-1:0] head_idx,
  input  logic             retire
);

  typedef struct packed {
    reg_t  dest;
    logic  we;
    word_t result;
    word_t addr;
  } lp_entry_t;

  lp_entry_t        q [ENTRIES];
  logic [IDX_W-1:0] head, tail;
  logic [IDX_W:0]   cnt;

  function automatic logic [IDX_W-1:0] inc(logic [IDX_W-1:0] i);
    return (i == IDX_W'(ENTRIES - 1)) ? '0 : i + 1'b1;
  endfunction

  assign alloc_idx  = tail;
  assign full       = (cnt == (IDX_W+1)'(ENTRIES));
  assign count      = cnt;
  assign head_valid = (cnt != '0);
  assign head_idx   = head;
  assign e_result   = q[e_idx].result;
  assign e_addr     = q[e_idx].addr;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      logic             stop;
      logic [IDX_W-1:0] i;
      q_hit[s] = 1'b0;
      q_val[s] = '0;
      stop     = 1'b0;
      i        = head;
      for (int unsigned n = 0; n < ENTRIES; n++) begin
        if (i == q_idx || (IDX_W+1)'(n) >= cnt) stop = 1'b1;
        if (!stop && q[i].we && q[i].dest == q_src[s] && q_src[s] != 5'd0) begin
          q_hit[s] = 1'b1;
          q_val[s] = q[i].result;
        end
        i = inc(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
      for (int unsigned i = 0; i < ENTRIES; i++) q[i] <= '0;
    end else if (flush) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
    end else begin
      if (alloc_valid && !full) begin
        q[tail] <= '{dest: alloc_dest, we: alloc_we, result: alloc_result, addr: alloc_addr};
        tail    <= inc(tail);
      end
      if (retire && head_valid) head <= inc(head);
      cnt <= cnt + (IDX_W+1)'(alloc_valid && !full) - (IDX_W+1)'(retire && head_valid);
    end
  end

endmodule
