// Self-checking test of the SECDED code: clean round trips, every single-bit
// error corrected, random double-bit errors detected as uncorrectable.
module tb_ditto_secded;
  import ditto_pkg::*;
  word_t d, q;
  logic [38:0] code, dcode;
  logic corr, unc;
  int checks = 0, failures = 0;

  ditto_secded dut (.enc_data(d), .enc_code(code), .dec_code(dcode), .dec_data(q),
                    .corrected(corr), .uncorrectable(unc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      d = (n == 0) ? 32'd0 : (n == 1) ? 32'hFFFF_FFFF : $urandom;
      #1 dcode = code;
      #1;
      checks++;
      if (q !== d || corr || unc) begin failures++; $display("clean %h -> %h %b%b", d, q, corr, unc); end
      for (int bit_i = 0; bit_i < 39; bit_i++) begin
        dcode = code ^ (39'd1 << bit_i);
        #1;
        checks++;
        if (q !== d || !corr || unc) begin
          failures++;
          if (failures < 5) $display("single bit %0d: %h -> %h %b%b", bit_i, d, q, corr, unc);
        end
      end
      begin
        int i, j;
        i = $urandom_range(0, 38);
        j = (i + $urandom_range(1, 38)) % 39;
        dcode = code ^ (39'd1 << i) ^ (39'd1 << j);
        #1;
        checks++;
        if (!unc) begin failures++; $display("double %0d,%0d not detected", i, j); end
      end
    end
    // no two data values share a code word
    d = 32'h1234_5678; #1 dcode = code;
    d = 32'h1234_5679; #1;
    checks++;
    if (code == dcode) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
