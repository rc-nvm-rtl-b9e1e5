// rcnvm_secded: (72,64) SECDED Hamming code for the optional ninth chip of
// a rank, which widens the 64-bit memory bus to 72 bits.
//
// Encoder: the 64 data bits fill positions 1..71 of a Hamming code word that
// are not powers of two (in ascending order); check bit i at position 2^i
// (i = 0..6) makes the XOR of all positions with bit i set to zero; bit 0 of
// the 72-bit word is the overall parity, which makes the whole word even.
// Code word bit p (p = 1..71) is Hamming position p.
// Decoder: the syndrome is the XOR of the positions of all set bits. With
// odd overall parity a single error at position `syndrome` (0 = the parity
// bit itself) is corrected; a non-zero syndrome with even parity is a
// double error, reported and not corrected.
// Purely combinational. Only the use of a SECDED Hamming code on a 72-bit
// bus comes from the published design; the bit arrangement is this design's.
module rcnvm_secded
  import rcnvm_pkg::*;
(
  input  word_t       enc_data,
  output logic [71:0] enc_code,
  input  logic [71:0] dec_code,
  output word_t       dec_data,
  output logic        dec_corrected,   // a single-bit error was corrected
  output logic        dec_double       // an uncorrectable double error
);
  function automatic logic is_pow2(int unsigned p);
    return (p & (p - 1)) == 0;
  endfunction

  always_comb begin
    int unsigned d;
    logic [6:0] chk;
    enc_code = '0;
    d = 0;
    for (int unsigned p = 1; p < 72; p++)
      if (!is_pow2(p)) begin
        enc_code[p] = enc_data[d];
        d++;
      end
    chk = '0;
    for (int unsigned p = 1; p < 72; p++)
      if (enc_code[p]) chk ^= 7'(p);
    for (int i = 0; i < 7; i++) enc_code[1 << i] = chk[i];
    enc_code[0] = ^enc_code[71:1];
  end

  always_comb begin
    int unsigned d;
    logic [6:0]  syn;
    logic [71:0] fixed;
    logic        par;
    syn = '0;
    for (int unsigned p = 1; p < 72; p++)
      if (dec_code[p]) syn ^= 7'(p);
    par           = ^dec_code;
    fixed         = dec_code;
    dec_corrected = 1'b0;
    dec_double    = 1'b0;
    if (par) begin
      if (int'(syn) < 72) fixed[syn] = ~fixed[syn];
      dec_corrected = 1'b1;
    end else if (syn != 0) begin
      dec_double = 1'b1;
    end
    dec_data = '0;
    d = 0;
    for (int unsigned p = 1; p < 72; p++)
      if (!is_pow2(p)) begin
        dec_data[d] = fixed[p];
        d++;
      end
  end
endmodule
