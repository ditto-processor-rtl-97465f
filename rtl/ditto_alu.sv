// Integer ALU of the Ditto core (1-cycle latency unit of the baseline).
//
// Combinational: add, subtract, and, or, xor, signed set-less-than, load upper
// immediate, and the equal / not-equal comparisons that resolve branches
// (result 1 when the branch is taken). The normal stream and the cloned
// stream each have one instance; the clone's instance re-executes
// short-latency operations for the second checking mechanism.
module ditto_alu
  import ditto_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SLT: y = {31'd0, $signed(a) < $signed(b)};
      ALU_LUI: y = {b[15:0], 16'd0};
      ALU_EQ:  y = {31'd0, a == b};
      ALU_NE:  y = {31'd0, a != b};
      default: y = '0;
    endcase
  end

endmodule
