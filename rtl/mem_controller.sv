// mem_controller: sequences every cycle on the internal bus between the
// controller and the memory modules, with the external EDAC in the path.
//
// Requests, highest priority first:
//   refresh   - one REFRESH cycle to all modules;
//   record    - the head word of the input buffer is encoded and written at
//               the physical address of the record pointer;
//   playback  - the word at the playback pointer is read, decoded and
//               corrected, and handed to the output buffer;
//   scrub     - the word at the scrub address is read and decoded; if a bit
//               was corrected the corrected word is re-encoded and written
//               back, if it was uncorrectable its address is logged and the
//               word is left alone.
// Corrections (playback and scrub), pair corrections and uncorrectable words
// are counted, and the physical address of the latest correction is kept,
// for the EDAC report in telemetry.
// Built-in test (bit_start) takes over the bus: it writes BIT_WORDS test
// words spread over the whole array, each with a paired two-bit error inside
// one DRAM (the signature of a redundancy-latch upset), reads them back,
// checks that the EDAC restores every one, and rewrites them clean. Refresh
// keeps its priority during the test. The test destroys the data in those
// words.
//
// Timing: a write takes one cycle; a read returns rd_valid two cycles after
// rd_issue (bus register, memory); a scrub with write-back takes four. The
// test takes BIT_WORDS write cycles plus four cycles per word read back, and
// its corrections are not added to the telemetry counts. The physical
// address selects the module by its top bits. Which operations exist and what scrubbing does follow the
// document; priorities, cycle counts and the test procedure are this
// design's choices.
module mem_controller
  import ssdr_pkg::*;
#(
  parameter int unsigned NUM_MOD   = 2,
  parameter int unsigned MOD_AW    = 24,
  parameter int unsigned PA_W      = MOD_AW + ((NUM_MOD > 1) ? $clog2(NUM_MOD) : 0),
  parameter int unsigned BIT_WORDS = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  // record
  input  logic            wr_valid,      // buffered word ready and pointer usable
  input  data_t           wr_data,
  input  logic [PA_W-1:0] wr_pa,
  output logic            wr_take,       // word written: pop buffer, advance pointer
  // playback
  input  logic            rd_en,         // a word to play back and room for it
  input  logic [PA_W-1:0] rd_pa,
  output logic            rd_issue,      // read started: advance pointer
  output logic            rd_valid,
  output data_t           rd_data,
  // scrub and refresh
  input  logic            scrub_req,
  input  logic [PA_W-1:0] scrub_pa,
  output logic            scrub_ack,
  input  logic            refresh_req,
  output logic            refresh_ack,
  output logic            log_we,
  output logic [PA_W-1:0] log_addr,
  // built-in test
  input  logic            bit_start,
  output logic            bit_busy,
  output logic            busy,          // a bus sequence is in progress
  output logic            bit_done,      // pulse
  output logic            bit_pass,
  output logic [15:0]     bit_errors,
  // bus
  output bus_req_t        bus,
  input  word_t           bus_rdata,
  input  logic            bus_rvalid,
  // counts for telemetry
  output logic [15:0]     corrected,
  output logic [15:0]     uncorrectable,
  output logic [15:0]     pair_corrected, // corrections of both code words at once
  output logic [PA_W-1:0] last_corr_pa    // physical word of the latest correction
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_WB, S_BIT_W, S_BIT_R, S_BIT_RW, S_BIT_FIX} state_e;
  typedef enum logic [1:0] {K_PB, K_SCRUB, K_BIT} kind_e;

  localparam int unsigned BW = $clog2(BIT_WORDS);
  localparam int unsigned STRIDE_SH = PA_W - BW;

  state_e          state;
  kind_e           kind;
  logic [PA_W-1:0] cur_pa, rd_pa_q;
  logic [BW:0]     bit_idx;

  data_t enc_in, dec_data;
  word_t enc_word;
  logic  dec_corr, dec_unc, dec_pair;

  edac_interleaved u_edac (
    .enc_data         (enc_in),
    .enc_word         (enc_word),
    .dec_word         (bus_rdata),
    .dec_data         (dec_data),
    .dec_corrected    (dec_corr),
    .dec_uncorrectable(dec_unc),
    .dec_pair         (dec_pair)
  );

  function automatic data_t pattern(logic [BW:0] i);
    return (32'(i) * 32'h9E37_79B9) ^ 32'hA5A5_5A5A;
  endfunction

  // paired error in DRAM (i mod 11): bits 0,1 for even i, bits 2,3 for odd i
  function automatic word_t pair_error(logic [BW:0] i);
    int unsigned d;
    d = 32'(i[BW-1:0]) % 11;
    return word_t'(2'b11) << (4 * d + (i[0] ? 2 : 0));
  endfunction

  function automatic logic [PA_W-1:0] bit_pa(logic [BW:0] i);
    return PA_W'(i[BW-1:0]) << STRIDE_SH;
  endfunction

  function automatic bus_req_t make_req(bus_op_e op, logic [PA_W-1:0] pa, word_t wd);
    bus_req_t r;
    r = '0;
    r.op    = op;
    r.addr  = MOD_AW_MAX'(pa[MOD_AW-1:0]);
    r.wdata = wd;
    if (op == BUS_REFRESH)  r.cs = '1;
    else if (NUM_MOD > 1)   r.cs = NUM_MOD_MAX'(1) << (pa >> MOD_AW);
    else                    r.cs = NUM_MOD_MAX'(1);
    return r;
  endfunction

  // encoder input: record data, scrub correction or test pattern
  always_comb begin
    unique case (state)
      S_WB:                 enc_in = rd_data;
      S_BIT_W, S_BIT_FIX:   enc_in = pattern(bit_idx);
      default:              enc_in = wr_data;
    endcase
  end

  assign busy = (state != S_IDLE);
  assign bit_busy = (state == S_BIT_W) || (state == S_BIT_R) ||
                    (state == S_BIT_RW) || (state == S_BIT_FIX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; kind <= K_PB; cur_pa <= '0; bit_idx <= '0;
      bus <= '0; rd_data <= '0; rd_valid <= 1'b0; rd_issue <= 1'b0;
      wr_take <= 1'b0; scrub_ack <= 1'b0; refresh_ack <= 1'b0;
      log_we <= 1'b0; log_addr <= '0;
      bit_done <= 1'b0; bit_pass <= 1'b0; bit_errors <= '0;
      corrected <= '0; uncorrectable <= '0; pair_corrected <= '0; last_corr_pa <= '0; rd_pa_q <= '0;
    end else begin
      bus <= '0;
      rd_valid <= 1'b0; rd_issue <= 1'b0; wr_take <= 1'b0;
      scrub_ack <= 1'b0; refresh_ack <= 1'b0; log_we <= 1'b0; bit_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (bit_start) begin
            state <= S_BIT_W; bit_idx <= '0; bit_errors <= '0;
          end else if (refresh_req && !refresh_ack) begin
            bus <= make_req(BUS_REFRESH, '0, '0);
            refresh_ack <= 1'b1;
          end else if (wr_valid && !wr_take) begin
            bus <= make_req(BUS_WRITE, wr_pa, enc_word);
            wr_take <= 1'b1;
          end else if (rd_en && !rd_issue) begin
            bus <= make_req(BUS_READ, rd_pa, '0);
            rd_issue <= 1'b1; kind <= K_PB; state <= S_RD; rd_pa_q <= rd_pa;
          end else if (scrub_req && !scrub_ack) begin
            bus <= make_req(BUS_READ, scrub_pa, '0);
            cur_pa <= scrub_pa; kind <= K_SCRUB; state <= S_RD;
          end
        end
        S_RD: if (bus_rvalid) begin
          rd_data <= dec_data;
          if (dec_corr && corrected != '1)    corrected <= corrected + 1'b1;
          if (dec_unc && uncorrectable != '1) uncorrectable <= uncorrectable + 1'b1;
          if (dec_pair && pair_corrected != '1) pair_corrected <= pair_corrected + 1'b1;
          if (dec_corr) last_corr_pa <= (kind == K_PB) ? rd_pa_q : cur_pa;
          if (kind == K_PB) begin
            rd_valid <= 1'b1;
            state <= S_IDLE;
          end else if (dec_corr) begin
            state <= S_WB;
          end else begin
            if (dec_unc) begin log_we <= 1'b1; log_addr <= cur_pa; end
            scrub_ack <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_WB: begin
          bus <= make_req(BUS_WRITE, cur_pa, enc_word);
          scrub_ack <= 1'b1;
          state <= S_IDLE;
        end
        S_BIT_W: begin
          if (refresh_req && !refresh_ack) begin
            bus <= make_req(BUS_REFRESH, '0, '0);
            refresh_ack <= 1'b1;
          end else begin
            bus <= make_req(BUS_WRITE, bit_pa(bit_idx), enc_word ^ pair_error(bit_idx));
            if (bit_idx == (BW+1)'(BIT_WORDS - 1)) begin
              bit_idx <= '0; state <= S_BIT_R;
            end else begin
              bit_idx <= bit_idx + 1'b1;
            end
          end
        end
        S_BIT_R: begin
          if (refresh_req && !refresh_ack) begin
            bus <= make_req(BUS_REFRESH, '0, '0);
            refresh_ack <= 1'b1;
          end else begin
            bus <= make_req(BUS_READ, bit_pa(bit_idx), '0);
            state <= S_BIT_RW;
          end
        end
        S_BIT_RW: if (bus_rvalid) begin
          if (dec_data != pattern(bit_idx) || !dec_corr || dec_unc)
            bit_errors <= bit_errors + 1'b1;
          state <= S_BIT_FIX;
        end
        S_BIT_FIX: begin
          bus <= make_req(BUS_WRITE, bit_pa(bit_idx), enc_word);
          if (bit_idx == (BW+1)'(BIT_WORDS - 1)) begin
            state <= S_IDLE; bit_done <= 1'b1; bit_pass <= (bit_errors == '0);
          end else begin
            bit_idx <= bit_idx + 1'b1; state <= S_BIT_R;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
