// Delay buffer: the queue of committed instructions waiting to be cloned.
//
// The commit logic pushes one entry per committed instruction (instruction
// address, instruction code, result, and the data address or decoded target)
// and, for a long-latency instruction, a second entry right after it holding
// its source operand values. The clone fetch reads entries ahead of the head
// through a read pointer (two consecutive entries, so a main entry and its
// operand entry arrive together); entries are popped once their clone has
// passed register read.
//
// The two data words of every entry are stored in a SECDED code and corrected
// on the way out, so the results copied into the LP-ROB, against which clones
// are checked, are protected. rd_corrected flags a corrected single error,
// rd_uncorrectable a double error. inj_flip flips one stored bit of the first
// pushed entry (fault injection for the code). Pushes and pops take effect at
// the clock edge; reads are combinational. flush empties the buffer.
module ditto_delay_buffer
  import ditto_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic [1:0]       push_n,
  input  db_entry_t        push_e [2],
  input  logic             inj_flip,
  output logic [IDX_W:0]   count,
  output logic [IDX_W:0]   free,
  output logic [IDX_W-1:0] head_ptr,
  input  logic [IDX_W-1:0] rd_ptr,
  output db_entry_t        rd_e [2],
  output logic             rd_corrected,
  output logic             rd_uncorrectable,
  input  logic [1:0]       pop_n
);

  typedef struct packed {
    logic        operands;
    logic        has_ops;
    word_t       pc;
    word_t       inst;
    logic [38:0] c0;
    logic [38:0] c1;
  } stored_t;

  stored_t          q [ENTRIES];
  logic [IDX_W-1:0] head, tail;
  logic [IDX_W:0]   cnt;
  logic [38:0]      enc [2][2];
  logic [38:0]      dec_in [2][2];
  word_t            dec_out [2][2];
  logic             corr [2][2];
  logic             unc  [2][2];
  logic [IDX_W-1:0] rd_idx [2];

  function automatic logic [IDX_W-1:0] add(logic [IDX_W-1:0] i, int unsigned n);
    int unsigned s;
    s = (int'(i) + n) % ENTRIES;
    return IDX_W'(s);
  endfunction

  assign rd_idx[0] = rd_ptr;
  assign rd_idx[1] = add(rd_ptr, 1);

  for (genvar e = 0; e < 2; e++) begin : g_ecc
    for (genvar w = 0; w < 2; w++) begin : g_word
      logic [38:0] unused_code;
      word_t       unused_data;
      logic        unused_c, unused_u;
      ditto_secded u_enc (
        .enc_data     (w == 0 ? push_e[e].w0 : push_e[e].w1),
        .enc_code     (enc[e][w]),
        .dec_code     ('0),
        .dec_data     (unused_data),
        .corrected    (unused_c),
        .uncorrectable(unused_u)
      );
      ditto_secded u_dec (
        .enc_data     ('0),
        .enc_code     (unused_code),
        .dec_code     (dec_in[e][w]),
        .dec_data     (dec_out[e][w]),
        .corrected    (corr[e][w]),
        .uncorrectable(unc[e][w])
      );
      assign dec_in[e][w] = (w == 0) ? q[rd_idx[e]].c0 : q[rd_idx[e]].c1;
    end
    assign rd_e[e] = '{operands: q[rd_idx[e]].operands, has_ops: q[rd_idx[e]].has_ops,
                       pc: q[rd_idx[e]].pc, inst: q[rd_idx[e]].inst,
                       w0: dec_out[e][0], w1: dec_out[e][1]};
  end

  assign rd_corrected     = corr[0][0] | corr[0][1] | corr[1][0] | corr[1][1];
  assign rd_uncorrectable = unc[0][0]  | unc[0][1]  | unc[1][0]  | unc[1][1];
  assign count    = cnt;
  assign free     = (IDX_W+1)'(ENTRIES) - cnt;
  assign head_ptr = head;

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
      // The pushes must fit and the pops must not exceed the contents.
      assert ((IDX_W+1)'(push_n) <= free + (IDX_W+1)'(pop_n));
      assert ((IDX_W+1)'(pop_n) <= cnt);
      for (int unsigned e = 0; e < 2; e++) begin
        if (e < push_n) begin
          q[add(tail, e)] <= '{operands: push_e[e].operands, has_ops: push_e[e].has_ops,
                               pc: push_e[e].pc, inst: push_e[e].inst,
                               c0: enc[e][0] ^ ((e == 0 && inj_flip) ? 39'd32 : 39'd0),
                               c1: enc[e][1]};
        end
      end
      tail <= add(tail, int'(push_n));
      head <= add(head, int'(pop_n));
      cnt  <= cnt + (IDX_W+1)'(push_n) - (IDX_W+1)'(pop_n);
    end
  end

endmodule
