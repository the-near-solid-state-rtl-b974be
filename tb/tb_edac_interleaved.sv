// tb_edac_interleaved: checks the external EDAC against an independent
// reference. For random words it checks that the clean code word decodes
// to the same data with no flags; that every single-bit error in the 44-bit
// word is corrected; that every DRAM pair error (bits 0-1 or 2-3 of each of
// the eleven 4-bit DRAMs) is corrected and flagged as a pair (single-bit
// errors are not); that a DRAM with all four bits wrong is flagged
// uncorrectable; and that two errors inside one code
// word (stored bits 2i and 2j, both even) are flagged uncorrectable. The
// reference also recomputes the Hamming syndrome of the encoded word from
// the parity-check definition to confirm the code word is valid.
module tb_edac_interleaved;
  import ssdr_pkg::*;

  data_t d, dd;
  word_t w, wr;
  logic corr, unc, pair;
  int checks = 0, failures = 0;

  edac_interleaved dut (.enc_data(d), .enc_word(w), .dec_word(wr),
                        .dec_data(dd), .dec_corrected(corr), .dec_uncorrectable(unc),
                        .dec_pair(pair));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%h w=%h wr=%h dd=%h c=%b u=%b", what, d, w, wr, dd, corr, unc);
    end
  endtask

  // reference: code word h (0/1) extracted from the stored word must satisfy
  // all Hamming parity checks and overall even parity, and carry the data
  // bits of its half in the non-power-of-two positions.
  function automatic bit ref_valid(word_t sw, data_t data);
    for (int h = 0; h < 2; h++) begin
      logic [21:0] cw;
      int k = 0;
      for (int i = 0; i < 22; i++) cw[i] = sw[2*i+h];
      if (^cw) return 0;
      for (int j = 0; j < 5; j++) begin
        logic p = 0;
        for (int pos = 1; pos < 22; pos++) if ((pos >> j) & 1) p ^= cw[pos];
        if (p) return 0;
      end
      for (int pos = 1; pos < 22; pos++) begin
        if ((pos & (pos - 1)) != 0) begin
          if (cw[pos] !== data[2*k+h]) return 0;
          k++;
        end
      end
    end
    return 1;
  endfunction

  initial begin
    for (int t = 0; t < 40; t++) begin
      d = (t == 0) ? '0 : (t == 1) ? '1 : $urandom;
      wr = '0;
      #1;
      check(ref_valid(w, d), "encoding");
      wr = w; #1;
      check(dd == d && !corr && !unc && !pair, "clean");
      for (int b = 0; b < WORD_W; b++) begin
        wr = w ^ (word_t'(1) << b); #1;
        check(dd == d && corr && !unc && !pair, "single");
      end
      for (int dr = 0; dr < 11; dr++) begin
        for (int pr = 0; pr < 2; pr++) begin
          wr = w ^ (word_t'(2'b11) << (4*dr + 2*pr)); #1;
          check(dd == d && corr && !unc && pair, "dram pair");
        end
        wr = w ^ (word_t'(4'hF) << (4*dr)); #1;
        check(unc, "whole DRAM failed: flagged uncorrectable");
      end
      for (int i = 0; i < 3; i++) begin
        int a, b;
        a = $urandom_range(0, 21); b = (a + 1 + $urandom_range(0, 20)) % 22;
        wr = w ^ (word_t'(1) << (2*a)) ^ (word_t'(1) << (2*b)); #1;
        check(unc, "double in one code word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
