// Data memory standing in for the 16 KB L1 data cache (3-cycle hit).
//
// Always hits (the cache and the levels behind it lie outside the protected
// core; their tags and misses are not modelled). The read port is pipelined:
// a read accepted at cycle t returns its word at cycle t+LOAD_LAT with the tag
// it carried (ROB index, first or second access). The word is taken from the
// array on acceptance. One write per cycle; stores reach the array only once
// their clone is verified, so no read-after-write ordering is handled here.
// A debug port reads the array combinationally. flush drops reads in flight.
module ditto_dmem
  import ditto_pkg::*;
#(
  parameter int unsigned WORDS    = 4096,
  parameter int unsigned LOAD_LAT = 3,
  parameter int unsigned TAG_W    = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             rd_valid,
  input  word_t            rd_addr,
  input  logic [TAG_W-1:0] rd_tag,
  input  logic             rd_second,
  output logic             rd_out_valid,
  output logic [TAG_W-1:0] rd_out_tag,
  output logic             rd_out_second,
  output word_t            rd_out_data,
  input  logic             we,
  input  word_t            waddr,
  input  word_t            wdata,
  input  word_t            dbg_addr,
  output word_t            dbg_data
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t            mem [WORDS];
  logic             v   [LOAD_LAT];
  logic [TAG_W-1:0] tg  [LOAD_LAT];
  logic             sec [LOAD_LAT];
  word_t            dat [LOAD_LAT];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LOAD_LAT; i++) begin
        v[i] <= 1'b0; tg[i] <= '0; sec[i] <= 1'b0; dat[i] <= '0;
      end
    end else begin
      v[0]   <= rd_valid && !flush;
      tg[0]  <= rd_tag;
      sec[0] <= rd_second;
      dat[0] <= mem[rd_addr[AW+1:2]];
      for (int i = 1; i < LOAD_LAT; i++) begin
        v[i]   <= v[i-1] && !flush;
        tg[i]  <= tg[i-1];
        sec[i] <= sec[i-1];
        dat[i] <= dat[i-1];
      end
    end
  end

  assign rd_out_valid  = v[LOAD_LAT-1] && !flush;
  assign rd_out_tag    = tg[LOAD_LAT-1];
  assign rd_out_second = sec[LOAD_LAT-1];
  assign rd_out_data   = dat[LOAD_LAT-1];
  assign dbg_data      = mem[dbg_addr[AW+1:2]];

endmodule
