// Architecture register file with transient / verified status.
//
// A commit writes a register's value and marks it transient; when the clone
// of that instruction has been verified the value is marked verified. Both the
// renamer and the scheduler of the normal stream treat transient and verified
// values alike (both are "ready"). When a fault is detected, flush throws away
// every transient value. For that to restore something, each register also
// keeps its last verified value, written by the clone stream (which verifies
// in program order), and a count of commits to it not yet verified; the
// status bit is "count != 0". Keeping the verified copy is this design's
// choice: the reference design only says the status costs one extra bit per register.
//
// Ports: two committed-value read ports (normal issue), two verified-value
// read ports (clone register read), one commit write, one verify write, a
// debug read. Reads are combinational, register 0 reads 0; writes and flush
// act at the clock edge, flush over everything else.
module ditto_arf
  import ditto_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  reg_t         rs_addr [2],
  output word_t        rs_data [2],
  input  reg_t         vr_addr [2],
  output word_t        vr_data [2],
  input  logic         cw_en,
  input  reg_t         cw_addr,
  input  word_t        cw_data,
  input  logic         vw_en,
  input  reg_t         vw_addr,
  input  word_t        vw_data,
  output logic [31:0]  transient,
  input  reg_t         dbg_addr,
  output word_t        dbg_data,
  output word_t        dbg_vdata
);

  word_t            val [32];
  word_t            ver [32];
  logic [CNT_W-1:0] pend [32];

  for (genvar p = 0; p < 2; p++) begin : g_rd
    assign rs_data[p] = (rs_addr[p] == 5'd0) ? '0 : val[rs_addr[p]];
    assign vr_data[p] = (vr_addr[p] == 5'd0) ? '0 : ver[vr_addr[p]];
  end
  for (genvar r = 0; r < 32; r++) begin : g_st
    assign transient[r] = (pend[r] != '0);
  end
  assign dbg_data  = (dbg_addr == 5'd0) ? '0 : val[dbg_addr];
  assign dbg_vdata = (dbg_addr == 5'd0) ? '0 : ver[dbg_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 32; r++) begin
        val[r] <= '0; ver[r] <= '0; pend[r] <= '0;
      end
    end else if (flush) begin
      for (int r = 0; r < 32; r++) begin
        val[r]  <= ver[r];
        pend[r] <= '0;
      end
    end else begin
      if (cw_en && cw_addr != 5'd0) val[cw_addr] <= cw_data;
      if (vw_en && vw_addr != 5'd0) ver[vw_addr] <= vw_data;
      for (int r = 0; r < 32; r++) begin
        pend[r] <= pend[r] + CNT_W'(cw_en && cw_addr == reg_t'(r) && r != 0)
                           - CNT_W'(vw_en && vw_addr == reg_t'(r) && r != 0);
      end
    end
  end

endmodule
