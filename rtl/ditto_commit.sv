// Commit logic of the Ditto core (held twice and compared, see the top).
//
// Looks at the ROB head and decides whether it retires this cycle: it must
// be done, a long-latency one must also be verified (both executions
// matched), and the delay buffer must have room for its clone entries (one,
// or two for a long-latency instruction, whose second entry carries the
// source operand values). On retirement it produces the register-file write
// (which marks the register transient) and the delay-buffer entries.
// Most output bits are the head entry's fields (address, code, result,
// operands) routed unchanged into the delay-buffer entry format; the logic
// is in the retire decision and the entry count. Purely combinational; one instruction per cycle.
module ditto_commit
  import ditto_pkg::*;
#(
  parameter int unsigned DB_CNT_W = 8
) (
  input  logic                head_valid,
  input  rob_entry_t          head,
  input  logic [DB_CNT_W-1:0] db_free,
  input  logic                block,
  output logic                fire,
  output logic                rf_we,
  output reg_t                rf_addr,
  output word_t               rf_data,
  output logic [1:0]          db_push_n,
  output db_entry_t           db_e [2]
);

  logic [1:0] need;

  always_comb begin
    need    = head.is_long ? 2'd2 : 2'd1;
    fire    = head_valid && !block && head.done && (!head.is_long || head.verified) &&
              db_free >= DB_CNT_W'(need);
    rf_we   = fire && head.we;
    rf_addr = head.dest;
    rf_data = head.result;
    db_push_n = fire ? need : 2'd0;
    db_e[0] = '{operands: 1'b0, has_ops: head.is_long, pc: head.pc, inst: head.inst,
                w0: head.result, w1: head.addr};
    db_e[1] = '{operands: 1'b1, has_ops: 1'b0, pc: head.pc, inst: head.inst,
                w0: head.srca, w1: head.srcb};
  end

endmodule
