// edac_interleaved: the external EDAC of the recorder. A 32-bit user word is
// split into its even-numbered bits and its odd-numbered bits; each half is
// encoded into its own 22-bit modified Hamming (SEC-DED) code word, and the
// two code words are interleaved bit by bit into the 44-bit stored word:
// stored[2i] = code word 0 bit i, stored[2i+1] = code word 1 bit i.
//
// A 4-bit DRAM holds stored bits 4d..4d+3. A redundancy-latch upset in a
// DRAM corrupts its bits 0 and 1 or its bits 2 and 3 together; such a pair
// always falls one bit in each code word, so both halves see a single error
// and the whole word is corrected. So is any single bit. Two errors in the
// same code word are flagged as uncorrectable. dec_pair marks a correction
// in both code words at once, the signature of a pair error, for telemetry.
//
// Encode and decode paths are combinational and independent. The split into
// even and odd bits follows the document; the 16-bit half width, the code
// word layout (see secded_codec) and the bit interleave are this design's
// choices, picked so that the 32-of-44 ratio matches the stated capacity.
module edac_interleaved
  import ssdr_pkg::*;
(
  input  data_t enc_data,
  output word_t enc_word,
  input  word_t dec_word,
  output data_t dec_data,
  output logic  dec_corrected,     // at least one bit was corrected
  output logic  dec_uncorrectable, // a code word held two errors
  output logic  dec_pair           // both code words corrected: a DRAM pair error
);

  logic [1:0][HALF_W-1:0] enc_half, dec_half;
  logic [1:0][CW_W-1:0]   enc_cw, dec_cw;
  logic [1:0]             single, double;

  always_comb begin
    for (int i = 0; i < HALF_W; i++) begin
      enc_half[0][i] = enc_data[2*i];
      enc_half[1][i] = enc_data[2*i+1];
      dec_data[2*i]   = dec_half[0][i];
      dec_data[2*i+1] = dec_half[1][i];
    end
    for (int i = 0; i < CW_W; i++) begin
      enc_word[2*i]   = enc_cw[0][i];
      enc_word[2*i+1] = enc_cw[1][i];
      dec_cw[0][i] = dec_word[2*i];
      dec_cw[1][i] = dec_word[2*i+1];
    end
  end

  for (genvar h = 0; h < 2; h++) begin : g_half
    secded_codec #(.K(HALF_W)) u_codec (
      .enc_data  (enc_half[h]),
      .enc_cw    (enc_cw[h]),
      .dec_cw    (dec_cw[h]),
      .dec_data  (dec_half[h]),
      .dec_single(single[h]),
      .dec_double(double[h])
    );
  end

  assign dec_corrected     = |single && !(|double);
  assign dec_uncorrectable = |double;
  assign dec_pair          = &single && !(|double);

endmodule
