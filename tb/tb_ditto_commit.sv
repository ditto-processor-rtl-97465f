// Self-checking test of the commit logic: retirement conditions (done,
// verified for long-latency, delay-buffer room, block), register write, and
// the one or two delay-buffer entries formed from the ROB head.
module tb_ditto_commit;
  import ditto_pkg::*;
  logic head_valid, block, fire, rf_we;
  rob_entry_t head;
  logic [7:0] db_free;
  reg_t rf_addr;
  word_t rf_data;
  logic [1:0] db_push_n;
  db_entry_t db_e [2];
  int checks = 0, failures = 0;

  ditto_commit #(.DB_CNT_W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic ef;
      int need;
      head = '0;
      head_valid = 1'($urandom);
      block = ($urandom_range(0, 7) == 0);
      head.pc = $urandom; head.inst = $urandom; head.result = $urandom; head.addr = $urandom;
      head.srca = $urandom; head.srcb = $urandom; head.dest = reg_t'($urandom);
      head.we = 1'($urandom); head.is_long = 1'($urandom); head.done = ($urandom_range(0, 3) != 0);
      head.verified = 1'($urandom);
      db_free = 8'($urandom_range(0, 3));
      #1;
      need = head.is_long ? 2 : 1;
      ef = head_valid && !block && head.done && (!head.is_long || head.verified) && db_free >= need;
      checks += 3;
      if (fire !== ef) begin failures++; if (failures < 5) $display("fire %b exp %b", fire, ef); end
      if (rf_we !== (ef && head.we)) failures++;
      if (db_push_n !== (ef ? 2'(need) : 2'd0)) failures++;
      if (ef) begin
        checks += 3;
        if (rf_addr !== head.dest || rf_data !== head.result) failures++;
        if (db_e[0] !== '{operands: 1'b0, has_ops: head.is_long, pc: head.pc, inst: head.inst,
                          w0: head.result, w1: head.addr}) failures++;
        if (head.is_long && db_e[1] !== '{operands: 1'b1, has_ops: 1'b0, pc: head.pc, inst: head.inst,
                                          w0: head.srca, w1: head.srcb}) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
