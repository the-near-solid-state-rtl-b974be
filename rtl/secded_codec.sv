// secded_codec: a modified Hamming code (single-error-correcting,
// double-error-detecting) over K data bits, encoder and decoder side by side.
//
// Code word layout: bit 0 is an overall parity bit; bits 1..K+R-1 are a
// classic Hamming word in which the positions that are powers of two hold
// the R check bits and the other positions hold the data bits, lowest data
// bit first. Decoding computes the syndrome (the XOR of the positions of all
// ones) and the overall parity: parity wrong means one bit is in error, at
// the position the syndrome names (position 0 if the syndrome is zero);
// parity right with a non-zero syndrome means two bits are in error, which is
// flagged and not corrected. Both paths are purely combinational.
//
// The document calls its external code a "modified Hamming code" that
// corrects a single bit; the extra overall parity bit (the usual
// modification) and the bit layout are this design's choice.
module secded_codec #(
  parameter int unsigned K = 16,
  // Hamming check bits: smallest R with 2^R >= K + R + 1
  parameter int unsigned R = (K <= 4) ? 3 : (K <= 11) ? 4 : (K <= 26) ? 5 :
                             (K <= 57) ? 6 : (K <= 120) ? 7 : 8,
  parameter int unsigned N = K + R + 1
) (
  input  logic [K-1:0] enc_data,   // data to encode
  output logic [N-1:0] enc_cw,     // its code word
  input  logic [N-1:0] dec_cw,     // code word to check
  output logic [K-1:0] dec_data,   // corrected data
  output logic         dec_single, // one bit was wrong and has been corrected
  output logic         dec_double  // two bits wrong: uncorrectable
);

  function automatic bit is_pow2(int unsigned v);
    return (v != 0) && ((v & (v - 1)) == 0);
  endfunction

  // Encoder
  always_comb begin
    logic [N-1:0] cw;
    int unsigned  d;
    cw = '0;
    d  = 0;
    for (int unsigned p = 1; p < N; p++) begin
      if (!is_pow2(p)) begin
        cw[p] = enc_data[d];
        d++;
      end
    end
    for (int unsigned j = 0; j < R; j++) begin
      logic par;
      par = 1'b0;
      for (int unsigned p = 1; p < N; p++)
        if (((p >> j) & 1) == 1 && !is_pow2(p)) par ^= cw[p];
      cw[1 << j] = par;
    end
    cw[0] = ^cw[N-1:1];
    enc_cw = cw;
  end

  // Decoder
  always_comb begin
    logic [N-1:0] fixed;
    logic [R-1:0] syn;
    logic         par;
    int unsigned  d;
    syn = '0;
    for (int unsigned p = 1; p < N; p++)
      if (dec_cw[p]) syn ^= R'(p);
    par = ^dec_cw;
    fixed = dec_cw;
    dec_single = 1'b0;
    dec_double = 1'b0;
    if (par) begin
      if (int'(syn) < N) begin
        fixed[syn] = ~dec_cw[syn];
        dec_single = 1'b1;
      end else begin
        dec_double = 1'b1;   // syndrome points outside the word
      end
    end else if (syn != '0) begin
      dec_double = 1'b1;
    end
    d = 0;
    dec_data = '0;
    for (int unsigned p = 1; p < N; p++) begin
      if (!is_pow2(p)) begin
        dec_data[d] = fixed[p];
        d++;
      end
    end
  end

endmodule
