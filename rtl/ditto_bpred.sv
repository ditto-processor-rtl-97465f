// Branch prediction for the normal fetch half: gshare direction predictor
// plus a set-associative branch target buffer.
//
// Lookup (combinational, in the fetch cycle): the BTB is searched with the
// fetch address; on a hit the entry's target is the predicted next address
// if the entry is a jump, or if it is a conditional branch whose 2-bit
// counter in the pattern history table says taken. The table is indexed by
// the word address XOR the global history (gshare). The index used is
// returned so that the update can use the same counter.
//
// Update (at the clock edge, when a branch or jump resolves at issue): the
// counter of a conditional branch moves toward the outcome and the outcome is
// shifted into the global history; a taken branch or jump is written into the
// BTB (same way on a hit, otherwise the set's round-robin victim).
//
// Sizes follow the reference configuration as far as it can be read: a
// 64-entry gshare table and an 8K-entry, 8-way BTB. Updating the history at
// resolution rather than at fetch, full tags and round-robin replacement are
// this design's choices. The reference scheme treats the predictor as
// protected by its own ECC; here the tables carry none, because a wrong or
// corrupted prediction only costs a redirect: every next address is
// recomputed at issue and checked again by the clone.
module ditto_bpred
  import ditto_pkg::*;
#(
  parameter int unsigned PHT_ENTRIES = 64,
  parameter int unsigned BTB_ENTRIES = 8192,
  parameter int unsigned BTB_WAYS    = 8,
  parameter int unsigned PHT_W       = $clog2(PHT_ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  word_t            f_pc,
  output logic             pred_taken,
  output word_t            pred_target,
  output logic [PHT_W-1:0] pred_idx,
  // update
  input  logic             upd_valid,
  input  logic             upd_cond,     // conditional branch (else jump)
  input  word_t            upd_pc,
  input  logic             upd_taken,
  input  word_t            upd_target,
  input  logic [PHT_W-1:0] upd_idx
);

  localparam int unsigned SETS  = BTB_ENTRIES / BTB_WAYS;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = (BTB_WAYS > 1) ? $clog2(BTB_WAYS) : 1;
  localparam int unsigned TAG_W = 30 - SET_W;

  typedef struct packed {
    logic             valid;
    logic             cond;
    logic [TAG_W-1:0] tag;
    logic [29:0]      target;   // word address
  } btb_entry_t;

  logic [1:0]       pht  [PHT_ENTRIES];
  logic [PHT_W-1:0] ghr;
  btb_entry_t       btb  [BTB_WAYS][SETS];
  logic [WAY_W-1:0] victim [SETS];

  // lookup
  logic [SET_W-1:0] f_set;
  logic [TAG_W-1:0] f_tag;
  logic             f_hit;
  btb_entry_t       f_e;

  always_comb begin
    f_set    = f_pc[SET_W+1:2];
    f_tag    = f_pc[31:SET_W+2];
    pred_idx = f_pc[PHT_W+1:2] ^ ghr;
    f_hit    = 1'b0;
    f_e      = '0;
    for (int unsigned w = 0; w < BTB_WAYS; w++) begin
      if (btb[w][f_set].valid && btb[w][f_set].tag == f_tag) begin
        f_hit = 1'b1;
        f_e   = btb[w][f_set];
      end
    end
    pred_taken  = f_hit && (!f_e.cond || pht[pred_idx][1]);
    pred_target = {f_e.target, 2'b00};
  end

  // update
  logic [SET_W-1:0] u_set;
  logic [TAG_W-1:0] u_tag;
  logic             u_hit;
  logic [WAY_W-1:0] u_way;

  always_comb begin
    u_set = upd_pc[SET_W+1:2];
    u_tag = upd_pc[31:SET_W+2];
    u_hit = 1'b0;
    u_way = victim[u_set];
    for (int unsigned w = 0; w < BTB_WAYS; w++) begin
      if (btb[w][u_set].valid && btb[w][u_set].tag == u_tag) begin
        u_hit = 1'b1;
        u_way = WAY_W'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr <= '0;
      for (int unsigned i = 0; i < PHT_ENTRIES; i++) pht[i] <= 2'b01;
      for (int unsigned s = 0; s < SETS; s++) begin
        victim[s] <= '0;
        for (int unsigned w = 0; w < BTB_WAYS; w++) btb[w][s] <= '0;
      end
    end else if (upd_valid) begin
      if (upd_cond) begin
        ghr <= {ghr[PHT_W-2:0], upd_taken};
        if (upd_taken && pht[upd_idx] != 2'b11) pht[upd_idx] <= pht[upd_idx] + 2'b01;
        if (!upd_taken && pht[upd_idx] != 2'b00) pht[upd_idx] <= pht[upd_idx] - 2'b01;
      end
      if (upd_taken) begin
        btb[u_way][u_set] <= '{valid: 1'b1, cond: upd_cond, tag: u_tag, target: upd_target[31:2]};
        if (!u_hit) victim[u_set] <= (u_way == WAY_W'(BTB_WAYS - 1)) ? '0 : u_way + 1'b1;
      end
    end
  end

endmodule
