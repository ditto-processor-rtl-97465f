// SECDED code for 32-bit words: Hamming (38,32) plus overall parity = 39 bits.
//
// The delay buffer stores results in this code so that the copy of an
// original result into the LP-ROB, against which the clone is later checked,
// is itself protected ("ECC checking" of that copy). The code used is this
// design's choice.
//
// Encoder: data bits occupy the non-power-of-two positions 3,5,6,7,9,... of a
// 1-based codeword; check bit at position 2^k is the XOR of all positions
// whose index has bit k set; bit 0 of the output is the overall parity. The
// code is systematic, so the 32 data positions of enc_code are enc_data wired
// straight through.
// Decoder: the syndrome names the flipped position; with odd overall parity a
// single error is corrected (corrected=1), with a non-zero syndrome and even
// parity a double error is reported (uncorrectable=1). Both combinational.
module ditto_secded
  import ditto_pkg::*;
(
  input  word_t       enc_data,
  output logic [38:0] enc_code,
  input  logic [38:0] dec_code,
  output word_t       dec_data,
  output logic        corrected,
  output logic        uncorrectable
);

  // code[0] = overall parity, code[1..38] = Hamming positions 1..38.
  function automatic logic is_pow2(int unsigned n);
    return (n & (n - 1)) == 0;
  endfunction

  always_comb begin
    logic [38:0] c;
    int unsigned k;
    c = '0;
    k = 0;
    for (int unsigned pos = 1; pos <= 38; pos++) begin
      if (!is_pow2(pos)) begin
        c[pos] = enc_data[k];
        k++;
      end
    end
    for (int unsigned pb = 0; pb < 6; pb++) begin
      logic par;
      par = 1'b0;
      for (int unsigned pos = 1; pos <= 38; pos++)
        if (!is_pow2(pos) && pos[pb]) par ^= c[pos];
      c[1 << pb] = par;
    end
    c[0] = ^c[38:1];
    enc_code = c;
  end

  always_comb begin
    logic [5:0]  syn;
    logic        par;
    logic [38:0] c;
    int unsigned k;
    c   = dec_code;
    syn = '0;
    for (int unsigned pos = 1; pos <= 38; pos++)
      if (c[pos]) syn ^= 6'(pos);
    par = ^c;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (par) begin
      corrected = 1'b1;
      if (syn != 6'd0 && syn <= 6'd38) c[syn] = ~c[syn];
      else if (syn != 6'd0) uncorrectable = 1'b1;
    end else if (syn != 6'd0) begin
      uncorrectable = 1'b1;
    end
    k = 0;
    dec_data = '0;
    for (int unsigned pos = 1; pos <= 38; pos++) begin
      if (!is_pow2(pos)) begin
        dec_data[k] = c[pos];
        k++;
      end
    end
  end

endmodule
