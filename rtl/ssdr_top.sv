// ssdr_top: one solid-state data recorder. Serial data arrive on one of two
// data inputs, are buffered, encoded by the external EDAC (each 32-bit word
// becomes two interleaved 22-bit SEC-DED code words, 44 bits) and written
// over an internal bus into DRAM memory modules. Playback reads the words,
// corrects single errors and paired errors within one DRAM, buffers them and
// shifts them out serially at the rate the receiver clocks. A scrubber walks
// the whole array in the background, rewriting corrected words and logging
// uncorrectable ones; refresh cycles keep their own schedule. Commands come
// in serially on either of two command lines; a status frame goes out on the
// selected telemetry line (by command: the status page, the EDAC report page
// or a window of the reconfiguration map).
//
// Redundancy: there are A and B copies of every spacecraft interface and of
// the internal bus. Commands are taken from both command lines; the data,
// telemetry and bus sides are chosen by command (ports[1], [0], [2]).
//
// Addresses: the logical word address (segment pointers) goes through the
// reconfiguration map to a physical word address; its top bit(s) select the
// memory module, the rest is the word inside the module. With the defaults
// (two modules of 2^24 words) the user capacity is 2^25 x 32 = 2^30 bits.
//
// Serial timing: every serial line has a clock supplied from outside, high
// and low for at least six system clocks, and a gate that frames a transfer;
// inputs are sampled at rising edges, outputs change after falling edges,
// most significant bit first. Command words are 16 bits, data words 32 bits,
// telemetry bytes 8 bits.
//
// The block structure, redundancy, EDAC scheme, modes and command classes
// follow the document; word sizes of the bus and serial words, buffer
// depths, the block size of the map and all timing are this design's.
module ssdr_top
  import ssdr_pkg::*;
#(
  parameter int unsigned NUM_MOD      = 2,
  parameter int unsigned MOD_AW       = 24,
  parameter int unsigned BLK_W        = 16,
  parameter int unsigned FIFO_DEPTH   = 64,
  parameter int unsigned TLM_BYTES    = 540,
  parameter int unsigned ERR_DEPTH    = 16,
  parameter int unsigned BIT_WORDS    = 64,
  parameter int unsigned SCRUB_BASE   = 64,
  parameter int unsigned REFRESH_BASE = 256,
  parameter int unsigned TMR_REFRESH_PERIOD = 1024
) (
  input  logic clk,
  input  logic rst_n,
  // command inputs A and B
  input  logic cmd_a_sclk, cmd_a_sdata, cmd_a_sgate,
  input  logic cmd_b_sclk, cmd_b_sdata, cmd_b_sgate,
  // data inputs A and B
  input  logic din_a_sclk, din_a_sdata, din_a_sgate,
  input  logic din_b_sclk, din_b_sdata, din_b_sgate,
  // data outputs A and B
  input  logic dout_a_sclk, dout_a_sgate,
  output logic dout_a_sdata,
  input  logic dout_b_sclk, dout_b_sgate,
  output logic dout_b_sdata,
  // telemetry outputs A and B
  input  logic tlm_a_sclk, tlm_a_sgate,
  output logic tlm_a_sdata,
  input  logic tlm_b_sclk, tlm_b_sgate,
  output logic tlm_b_sdata,
  // single-event upset injection into the voted configuration (tie to 0)
  input  logic [2:0]  seu_upset,
  input  logic [16:0] seu_mask,
  // status brought out for observation
  output mode_e       mode,
  output status_t     status
);

  localparam int unsigned PA_W = MOD_AW + ((NUM_MOD > 1) ? $clog2(NUM_MOD) : 0);
  localparam int unsigned LA_W = PA_W;
  localparam int unsigned NB_W = PA_W - BLK_W;

  // ---------------------------------------------------------------- commands
  logic [15:0] cw_a, cw_b;
  logic        cwv_a, cwv_b, cact_a, cact_b;

  serial_rx #(.W(CMD_W)) u_cmd_rx_a (.clk, .rst_n, .sclk(cmd_a_sclk), .sdata(cmd_a_sdata),
    .sgate(cmd_a_sgate), .word(cw_a), .word_valid(cwv_a), .active(cact_a));
  serial_rx #(.W(CMD_W)) u_cmd_rx_b (.clk, .rst_n, .sclk(cmd_b_sclk), .sdata(cmd_b_sdata),
    .sgate(cmd_b_sgate), .word(cw_b), .word_valid(cwv_b), .active(cact_b));

  command_t    cmd;
  logic        cmd_valid, cmd_error;
  logic [15:0] cmd_accepted, cmd_rejected;
  logic        last_ok;

  cmd_decoder u_cmd (
    .clk, .rst_n,
    .word_valid (cwv_a | cwv_b),
    .word       (cwv_a ? cw_a : cw_b),
    .frame_abort(!(cact_a | cact_b)),
    .cmd, .cmd_valid, .cmd_error,
    .accepted(cmd_accepted), .rejected(cmd_rejected)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last_ok <= 1'b0;
    else if (cmd_valid || cmd_error) last_ok <= cmd_valid;
  end

  // ----------------------------------------------------------------- control
  logic [2:0]  scrub_rate, refresh_rate, ports, rec_seg, pb_seg;
  logic        cfg_mismatch;
  logic        def_en, set_wp_en, set_rp_en, map_we, size_we, log_clear, flush;
  logic [2:0]  def_seg, set_seg;
  logic [LA_W-1:0] def_start, set_addr;
  logic [LA_W:0]   def_limit;
  logic [NB_W-1:0] map_lblk, map_pblk;
  logic [NB_W:0]   size_blocks, in_service;
  logic        bit_start, bit_done, bit_pass, bit_busy, playback_done;
  logic [15:0] bit_errors;
  logic [6:0]  last_opcode;
  logic [1:0]  tlm_page;
  logic [NB_W-1:0] tlm_map_base, tlm_map_idx, tlm_map_val;

  ssdr_control #(.LA_W(LA_W), .NB_W(NB_W), .TMR_REFRESH_PERIOD(TMR_REFRESH_PERIOD)) u_ctrl (
    .clk, .rst_n, .cmd, .cmd_valid,
    .mode, .scrub_rate, .refresh_rate, .ports, .rec_seg, .pb_seg, .cfg_mismatch,
    .seu_upset, .seu_mask,
    .def_en, .def_seg, .def_start, .def_limit, .set_wp_en, .set_rp_en, .set_seg, .set_addr,
    .map_we, .map_lblk, .map_pblk, .size_we, .size_blocks, .log_clear,
    .flush, .bit_start, .bit_done, .playback_done, .last_opcode, .tlm_page, .tlm_map_base
  );

  // ---------------------------------------------------------------- segments
  logic [LA_W-1:0] wr_la, rd_la;
  logic            seg_full, seg_empty, wr_take, rd_issue;
  logic [NSEG-1:0][LA_W:0] seg_start, seg_limit, seg_wp, seg_rp;
  logic        seg_mismatch, map_mismatch;

  segment_table #(.LA_W(LA_W)) u_seg (
    .clk, .rst_n,
    .def_en, .def_seg, .def_start, .def_limit,
    .set_wp_en, .set_rp_en, .set_seg, .set_addr,
    .wr_seg(rec_seg), .wr_addr(wr_la), .full(seg_full), .wr_adv(wr_take),
    .rd_seg(pb_seg),  .rd_addr(rd_la), .empty(seg_empty), .rd_adv(rd_issue),
    .seg_start, .seg_limit, .seg_wp, .seg_rp, .mismatch(seg_mismatch)
  );

  // ------------------------------------------------------- reconfiguration
  logic [PA_W-1:0] xl_pa, log_addr;
  logic            la_ok, log_we;
  logic [ERR_DEPTH-1:0][PA_W-1:0] errlog;
  logic [$clog2(ERR_DEPTH+1)-1:0] log_count;
  logic [15:0]     log_lost;

  // record and playback never run together: one translation serves both
  reconfig_map #(.PA_W(PA_W), .BLK_W(BLK_W), .ERR_DEPTH(ERR_DEPTH)) u_map (
    .clk, .rst_n,
    .map_we, .map_lblk, .map_pblk, .size_we, .size_blocks, .log_clear,
    .la(mode == MODE_PLAYBACK ? rd_la : wr_la), .pa(xl_pa), .la_ok, .in_service,
    .rd_lblk(tlm_map_idx), .rd_pblk(tlm_map_val), .mismatch(map_mismatch),
    .log_we, .log_addr, .log_entry(errlog), .log_count, .log_lost
  );

  // ------------------------------------------------------------ data input
  data_t din_w_a, din_w_b, in_head;
  logic  dinv_a, dinv_b, dact_a, dact_b;
  logic  in_push, in_pop, in_empty, in_full, in_ovf;
  logic [$clog2(FIFO_DEPTH+1)-1:0] in_count;

  serial_rx #(.W(DATA_W)) u_din_a (.clk, .rst_n, .sclk(din_a_sclk), .sdata(din_a_sdata),
    .sgate(din_a_sgate), .word(din_w_a), .word_valid(dinv_a), .active(dact_a));
  serial_rx #(.W(DATA_W)) u_din_b (.clk, .rst_n, .sclk(din_b_sclk), .sdata(din_b_sdata),
    .sgate(din_b_sgate), .word(din_w_b), .word_valid(dinv_b), .active(dact_b));

  assign in_push = (mode == MODE_RECORD) && (ports[1] ? dinv_b : dinv_a);

  sram_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_in_buf (
    .clk, .rst_n, .flush,
    .push(in_push), .wdata(ports[1] ? din_w_b : din_w_a),
    .pop(in_pop), .rdata(in_head), .empty(in_empty), .full(in_full),
    .overflow(in_ovf), .count(in_count)
  );

  // a word that finds its segment full is dropped and counted
  logic seg_drop;
  assign seg_drop = (mode == MODE_RECORD) && !in_empty && (seg_full || !la_ok) && !wr_take;
  assign in_pop   = wr_take || seg_drop;

  // -------------------------------------------------------- memory control
  logic            scrub_req, scrub_ack, refresh_req, refresh_ack, rd_valid, rd_en, mc_busy;
  logic [PA_W-1:0] scrub_pa;
  data_t           rd_data;
  bus_req_t        bus;
  word_t           bus_rdata;
  logic            bus_rvalid;
  logic [15:0]     corrected, uncorrectable, pair_corrected, scrub_passes, refresh_missed;
  logic [PA_W-1:0] last_corr_pa;
  logic            out_empty, out_full, out_ovf;
  logic [$clog2(FIFO_DEPTH+1)-1:0] out_count;

  scrub_refresh #(.PA_W(PA_W), .SCRUB_BASE(SCRUB_BASE), .REFRESH_BASE(REFRESH_BASE)) u_sr (
    .clk, .rst_n, .scrub_rate, .refresh_rate,
    .scrub_req, .scrub_addr(scrub_pa), .scrub_ack,
    .refresh_req, .refresh_ack, .scrub_passes, .refresh_missed
  );

  assign rd_en = (mode == MODE_PLAYBACK) && !seg_empty && la_ok &&
                 (out_count < $bits(out_count)'(FIFO_DEPTH - 1));

  mem_controller #(.NUM_MOD(NUM_MOD), .MOD_AW(MOD_AW), .BIT_WORDS(BIT_WORDS)) u_mc (
    .clk, .rst_n,
    .wr_valid((mode == MODE_RECORD) && !in_empty && !seg_full && la_ok),
    .wr_data(in_head), .wr_pa(xl_pa), .wr_take,
    .rd_en, .rd_pa(xl_pa), .rd_issue, .rd_valid, .rd_data,
    .scrub_req, .scrub_pa, .scrub_ack, .refresh_req, .refresh_ack,
    .log_we, .log_addr,
    .bit_start, .bit_busy, .busy(mc_busy), .bit_done, .bit_pass, .bit_errors,
    .bus, .bus_rdata, .bus_rvalid,
    .corrected, .uncorrectable, .pair_corrected, .last_corr_pa
  );

  // ----------------------------------------------------- buses and modules
  bus_req_t bus_a, bus_b;
  assign bus_a = ports[2] ? '0 : bus;
  assign bus_b = ports[2] ? bus : '0;

  word_t [NUM_MOD-1:0] mod_rdata;
  logic  [NUM_MOD-1:0] mod_rvalid;
  logic  [NUM_MOD-1:0][11:0] mod_refresh_row;

  for (genvar m = 0; m < NUM_MOD; m++) begin : g_mod
    memory_module #(.ADDR_W(MOD_AW), .MODULE_ID(m)) u_mem (
      .clk, .rst_n, .bus_sel(ports[2]), .bus_a, .bus_b,
      .rdata(mod_rdata[m]), .rvalid(mod_rvalid[m]), .refresh_row(mod_refresh_row[m])
    );
  end

  always_comb begin
    bus_rdata = '0;
    for (int m = 0; m < NUM_MOD; m++)
      if (mod_rvalid[m]) bus_rdata |= mod_rdata[m];
  end
  assign bus_rvalid = |mod_rvalid;

  // ----------------------------------------------------------- data output
  data_t out_head;
  logic  out_pop, lr_a, lr_b;

  sram_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_out_buf (
    .clk, .rst_n, .flush,
    .push(rd_valid), .wdata(rd_data),
    .pop(out_pop), .rdata(out_head), .empty(out_empty), .full(out_full),
    .overflow(out_ovf), .count(out_count)
  );

  serial_tx #(.W(DATA_W)) u_dout_a (.clk, .rst_n, .sclk(dout_a_sclk), .sgate(dout_a_sgate),
    .sdata(dout_a_sdata), .load_data(out_head), .load_valid(!ports[1] && !out_empty),
    .load_ready(lr_a), .underrun(), .active());
  serial_tx #(.W(DATA_W)) u_dout_b (.clk, .rst_n, .sclk(dout_b_sclk), .sgate(dout_b_sgate),
    .sdata(dout_b_sdata), .load_data(out_head), .load_valid(ports[1] && !out_empty),
    .load_ready(lr_b), .underrun(), .active());
  assign out_pop = lr_a | lr_b;

  assign playback_done = seg_empty && out_empty && !mc_busy && !rd_issue && !rd_valid;

  // ------------------------------------------------------------- telemetry
  logic [15:0] overflow;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overflow <= '0;
    else if ((in_ovf || seg_drop) && overflow != '1) overflow <= overflow + 1'b1;
  end

  // upsets found in the triplicated registers: counted when a mismatch
  // starts, so disagreements in consecutive cycles count once
  logic        mismatch_q;
  logic [15:0] vote_upsets;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mismatch_q <= 1'b0; vote_upsets <= '0;
    end else begin
      mismatch_q <= cfg_mismatch || seg_mismatch || map_mismatch;
      if ((cfg_mismatch || seg_mismatch || map_mismatch) && !mismatch_q && vote_upsets != '1)
        vote_upsets <= vote_upsets + 1'b1;
    end
  end

  always_comb begin
    status = '0;
    status.mode               = mode;
    status.ports              = ports;
    status.scrub_rate         = scrub_rate;
    status.refresh_rate       = refresh_rate;
    status.rec_seg            = rec_seg;
    status.pb_seg             = pb_seg;
    status.bit_done           = !bit_busy;
    status.bit_pass           = bit_pass;
    status.bit_errors         = bit_errors;
    status.cmd_accepted       = cmd_accepted;
    status.cmd_rejected       = cmd_rejected;
    status.last_opcode        = last_opcode;
    status.last_ok            = last_ok;
    status.edac_corrected     = corrected;
    status.edac_uncorrectable = uncorrectable;
    status.overflow           = overflow;
    status.scrub_passes       = scrub_passes;
    status.blocks_in_service  = 16'(in_service);
    status.errlog_count       = 5'(log_count);
    status.edac_pair_corrected = pair_corrected;
    status.last_corrected_pa  = 32'(last_corr_pa);
    status.errlog_lost        = log_lost;
    status.refresh_missed     = refresh_missed;
    status.tlm_page           = tlm_page;
    status.vote_upsets        = vote_upsets;
  end

  logic [7:0] tlm_byte, tlm_frames;
  logic       tlm_valid, tr_a, tr_b, tact_a, tact_b, tact_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tact_q <= 1'b0;
    else        tact_q <= ports[0] ? tact_b : tact_a;
  end

  telemetry_fmt #(.TLM_BYTES(TLM_BYTES), .LA_W(LA_W), .PA_W(PA_W), .ERR_DEPTH(ERR_DEPTH),
                  .NB_W(NB_W)) u_tlm (
    .clk, .rst_n, .status, .seg_start, .seg_limit, .seg_wp, .seg_rp, .errlog,
    .map_base(tlm_map_base), .map_idx(tlm_map_idx), .map_val(tlm_map_val),
    .frame_start((ports[0] ? tact_b : tact_a) && !tact_q),
    .byte_ready(tr_a | tr_b), .byte_data(tlm_byte), .byte_valid(tlm_valid), .frames(tlm_frames)
  );

  serial_tx #(.W(8)) u_tlm_a (.clk, .rst_n, .sclk(tlm_a_sclk), .sgate(tlm_a_sgate),
    .sdata(tlm_a_sdata), .load_data(tlm_byte), .load_valid(!ports[0] && tlm_valid),
    .load_ready(tr_a), .underrun(), .active(tact_a));
  serial_tx #(.W(8)) u_tlm_b (.clk, .rst_n, .sclk(tlm_b_sclk), .sgate(tlm_b_sgate),
    .sdata(tlm_b_sdata), .load_data(tlm_byte), .load_valid(ports[0] && tlm_valid),
    .load_ready(tr_b), .underrun(), .active(tact_b));

endmodule
