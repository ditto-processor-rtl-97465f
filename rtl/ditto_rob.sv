// Normal-stream region of the reorder buffer.
//
// A circular queue of rob_entry_t. Entries are allocated in program order at
// issue and retired in order from the head by the commit logic. Results come
// back out of order on NCMP completion ports. Each entry carries the extra
// long-latency bit, the "ready to execute a second time" status (done, long,
// second execution not yet issued) and the verify bit of the duplicated
// execution scheme: a long-latency operation's first result makes the entry
// done (dependents are scheduled on it), the entry is then offered on the
// x2_* port for its second execution, and when the second result arrives it
// is compared with the first. Equal sets verified; different raises mismatch
// (combinational, same cycle as the completion) with the entry's index.
// Two read ports return whole entries for operand bypass. flush empties the
// queue (rollback). All updates take effect at the next clock edge.
//
// Sizing follows the reference design (112 entries: 128 less the 16-entry LP-ROB);
// doing the compare inside the ROB is this design's choice.
module ditto_rob
  import ditto_pkg::*;
#(
  parameter int unsigned ENTRIES = 112,
  parameter int unsigned NCMP    = 3,
  parameter int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  // allocation at issue
  input  logic             alloc_valid,
  input  rob_entry_t       alloc_entry,
  output logic [IDX_W-1:0] alloc_idx,
  output logic             full,
  output logic [IDX_W:0]   count,
  // completions
  input  logic             cmp_valid  [NCMP],
  input  logic [IDX_W-1:0] cmp_idx    [NCMP],
  input  logic             cmp_second [NCMP],
  input  word_t            cmp_data   [NCMP],
  output logic             mismatch,
  output logic [IDX_W-1:0] mismatch_idx,
  // operand read
  input  logic [IDX_W-1:0] rd_idx   [2],
  output rob_entry_t       rd_entry [2],
  // second-execution selection
  output logic             x2_valid,
  output logic [IDX_W-1:0] x2_idx,
  output rob_entry_t       x2_entry,
  input  logic             x2_take,
  // head / retirement
  output logic             head_valid,
  output logic [IDX_W-1:0] head_idx,
  output rob_entry_t       head_entry,
  input  logic             retire
);

  rob_entry_t       q [ENTRIES];
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
  assign head_entry = q[head];
  assign rd_entry[0] = q[rd_idx[0]];
  assign rd_entry[1] = q[rd_idx[1]];

  // Oldest entry waiting for its second execution.
  always_comb begin
    logic [IDX_W-1:0] i;
    x2_valid = 1'b0;
    x2_idx   = head;
    i        = head;
    for (int unsigned n = 0; n < ENTRIES; n++) begin
      if (!x2_valid && (IDX_W+1)'(n) < cnt && q[i].is_long && q[i].done &&
          !q[i].x2_issued && !q[i].verified) begin
        x2_valid = 1'b1;
        x2_idx   = i;
      end
      i = inc(i);
    end
    x2_entry = q[x2_idx];
  end

  always_comb begin
    mismatch     = 1'b0;
    mismatch_idx = '0;
    for (int unsigned p = 0; p < NCMP; p++) begin
      if (cmp_valid[p] && cmp_second[p] && cmp_data[p] != q[cmp_idx[p]].result) begin
        mismatch     = 1'b1;
        mismatch_idx = cmp_idx[p];
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
        q[tail] <= alloc_entry;
        tail    <= inc(tail);
      end
      for (int unsigned p = 0; p < NCMP; p++) begin
        if (cmp_valid[p]) begin
          if (!cmp_second[p]) begin
            q[cmp_idx[p]].result <= cmp_data[p];
            q[cmp_idx[p]].done   <= 1'b1;
          end else if (cmp_data[p] == q[cmp_idx[p]].result) begin
            q[cmp_idx[p]].verified <= 1'b1;
          end
        end
      end
      if (x2_take && x2_valid) q[x2_idx].x2_issued <= 1'b1;
      if (retire && head_valid) head <= inc(head);
      cnt <= cnt + (IDX_W+1)'(alloc_valid && !full) - (IDX_W+1)'(retire && head_valid);
    end
  end

endmodule
