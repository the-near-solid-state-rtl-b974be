// tb_ssdr_control: sends decoded commands straight to the executive and
// checks mode changes (record, playback, random forms with pointer strobes,
// test entry and automatic return to idle, playback-done return), the rate
// and port registers, the table strobes, the telemetry page and map window
// (mode unchanged), reset to defaults with flush, and that an upset in one copy of the voted configuration changes nothing.
module tb_ssdr_control;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 1, cv = 0, bit_done = 0, pb_done = 0;
  command_t cmd;
  mode_e mode;
  logic [2:0] srate, rrate, ports, rseg, pseg, up = 0;
  logic [16:0] mask = 0;
  logic mm, def_en, swp, srp, map_we, size_we, lclr, flush, bstart;
  logic [2:0] dseg, sseg;
  logic [9:0] dstart, saddr;
  logic [10:0] dlim;
  logic [3:0] lb, pb;
  logic [4:0] sz;
  logic [6:0] lop;
  logic [1:0] tpage;
  logic [3:0] tbase;
  int checks = 0, failures = 0;
  int n_def = 0, n_swp = 0, n_srp = 0, n_map = 0, n_size = 0, n_clr = 0, n_flush = 0, n_bit = 0;

  ssdr_control #(.LA_W(10), .NB_W(4), .TMR_REFRESH_PERIOD(8)) dut (.clk, .rst_n, .cmd, .cmd_valid(cv),
    .mode, .scrub_rate(srate), .refresh_rate(rrate), .ports, .rec_seg(rseg), .pb_seg(pseg),
    .cfg_mismatch(mm), .seu_upset(up), .seu_mask(mask),
    .def_en, .def_seg(dseg), .def_start(dstart), .def_limit(dlim), .set_wp_en(swp), .set_rp_en(srp),
    .set_seg(sseg), .set_addr(saddr), .map_we, .map_lblk(lb), .map_pblk(pb), .size_we,
    .size_blocks(sz), .log_clear(lclr), .flush, .bit_start(bstart), .bit_done,
    .playback_done(pb_done), .last_opcode(lop),
    .tlm_page(tpage), .tlm_map_base(tbase));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) begin
    if (def_en) n_def++;
    if (swp) n_swp++;
    if (srp) n_srp++;
    if (map_we) n_map++;
    if (size_we) n_size++;
    if (lclr) n_clr++;
    if (flush) n_flush++;
    if (bstart) n_bit++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s mode=%0d", what, mode); end
  endtask

  task automatic send(logic [6:0] op, logic [15:0] f0 = 0, logic [15:0] f1 = 0,
                      logic [15:0] f2 = 0, logic [15:0] f3 = 0, logic [15:0] f4 = 0);
    cmd = '0; cmd.opcode = op;
    cmd.field[0] = f0; cmd.field[1] = f1; cmd.field[2] = f2; cmd.field[3] = f3; cmd.field[4] = f4;
    cv = 1; @(negedge clk); cv = 0; @(negedge clk);
  endtask

  initial begin
    cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(mode == MODE_IDLE && srate == 3'd3 && rrate == 3'd0 && ports == 0, "defaults");
    send(OP_REC_SEG + 7'd5);
    check(mode == MODE_RECORD && rseg == 5, "record segment 5");
    send(OP_REC_RAND + 7'd2, 16'h0, 16'h0123);
    check(mode == MODE_RECORD && rseg == 2 && n_swp == 1, "random record");
    send(OP_PB_RAND + 7'd6, 16'h0, 16'h0044);
    check(mode == MODE_PLAYBACK && pseg == 6 && n_srp == 1, "random playback");
    pb_done = 1; @(negedge clk); pb_done = 0; @(negedge clk);
    check(mode == MODE_IDLE, "playback done returns to idle");
    send(OP_PB_SEG + 7'd1);
    check(mode == MODE_PLAYBACK && pseg == 1, "playback segment 1");
    send(OP_IDLE);
    check(mode == MODE_IDLE, "idle");
    send(OP_SCRUB_RATE, 16'd6);
    send(OP_REFRESH_RATE, 16'd1);
    send(OP_PORTS, 16'd5);
    check(srate == 6 && rrate == 1 && ports == 5, "rates and ports");
    send(OP_DEFINE_SEG, 16'd4, 16'd0, 16'd10, 16'd0, 16'd90);
    send(OP_MAP_WRITE, 16'd3, 16'd15);
    send(OP_MAP_SIZE, 16'd15);
    send(OP_CLEAR_ERRLOG);
    check(n_def == 1 && n_map == 1 && n_size == 1 && n_clr == 1, "table strobes");
    send(OP_TLM_PAGE, 16'd2, 16'd9);
    check(tpage == 2 && tbase == 9 && mode == MODE_IDLE && srate == 6, "telemetry page");
    send(OP_BIT);
    check(mode == MODE_BIT && n_bit == 1, "test started");
    send(OP_REC_SEG);
    check(mode == MODE_BIT, "test not interrupted");
    bit_done = 1; @(negedge clk); bit_done = 0; @(negedge clk);
    check(mode == MODE_IDLE, "test done returns to idle");
    send(OP_REC_SEG + 7'd7);
    up = 3'b010; mask = '1; @(negedge clk); up = 0;
    check(mode == MODE_RECORD && rseg == 7 && srate == 6 && mm, "upset outvoted");
    repeat (10) @(negedge clk);
    check(!mm, "upset refreshed away");
    send(OP_RESET);
    check(mode == MODE_IDLE && srate == 3 && ports == 0 && n_flush == 1 && lop == OP_RESET && tpage == 0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
