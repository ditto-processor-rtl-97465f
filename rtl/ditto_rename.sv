// Rename table of the normal stream.
//
// For each architecture register: busy (its newest value is produced by an
// instruction still in the ROB) and the ROB index of that instruction. Issue
// is in order, so this single map is all the renaming needed: a source that
// is not busy reads the register file, a busy one reads the ROB entry once it
// is done. set marks a register at issue of its writer; clr frees it at
// commit, only if the committing index is still the newest writer (set wins
// over clr on the same register). flush clears all (rollback).
// Lookups are combinational; updates at the clock edge.
module ditto_rename
  import ditto_pkg::*;
#(
  parameter int unsigned IDX_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  reg_t             q_reg  [2],
  output logic             q_busy [2],
  output logic [IDX_W-1:0] q_tag  [2],
  input  logic             set_en,
  input  reg_t             set_reg,
  input  logic [IDX_W-1:0] set_tag,
  input  logic             clr_en,
  input  reg_t             clr_reg,
  input  logic [IDX_W-1:0] clr_tag
);

  logic             busy [32];
  logic [IDX_W-1:0] tag  [32];

  for (genvar p = 0; p < 2; p++) begin : g_q
    assign q_busy[p] = busy[q_reg[p]] && q_reg[p] != 5'd0;
    assign q_tag[p]  = tag[q_reg[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 32; r++) begin
        busy[r] <= 1'b0; tag[r] <= '0;
      end
    end else if (flush) begin
      for (int r = 0; r < 32; r++) busy[r] <= 1'b0;
    end else begin
      if (clr_en && busy[clr_reg] && tag[clr_reg] == clr_tag) busy[clr_reg] <= 1'b0;
      if (set_en && set_reg != 5'd0) begin
        busy[set_reg] <= 1'b1;
        tag[set_reg]  <= set_tag;
      end
    end
  end

endmodule
