// tb_ssdr_top: end-to-end test of the recorder at reduced size (two modules
// of 2^8 words, 16-word map blocks, 8-word buffers). All traffic goes over
// the serial lines. The run:
//   built-in test; define segment 1 (24 words) and remap its second block to
//   the last physical block; record 30 words (6 overflow); plant a DRAM pair
//   error in a remapped word; play the segment back on command line B and
//   check every word and the automatic return to idle; random playback of
//   the last 4 words; a command with a bad checksum; an upset in one copy of
//   the voted configuration, one in a copy of the segment table and one in
//   a copy of the block map; planted errors for the scrubber (one pair error,
//   one uncorrectable); switch to the B data, telemetry and bus side and
//   record/play segment 2 there; read the telemetry frame and check it;
//   select the EDAC report page and the map page and check those.
// Each mechanism is counted and must have happened at least once.
module tb_ssdr_top;
  import ssdr_pkg::*;
  localparam int HALF = 6;
  localparam int MOD_AW = 8, BLK_W = 4;

  logic clk = 0, rst_n = 1;
  logic cmd_a_sclk = 1, cmd_a_sdata = 0, cmd_a_sgate = 0;
  logic cmd_b_sclk = 1, cmd_b_sdata = 0, cmd_b_sgate = 0;
  logic din_a_sclk = 1, din_a_sdata = 0, din_a_sgate = 0;
  logic din_b_sclk = 1, din_b_sdata = 0, din_b_sgate = 0;
  logic dout_a_sclk = 1, dout_a_sgate = 0, dout_a_sdata;
  logic dout_b_sclk = 1, dout_b_sgate = 0, dout_b_sdata;
  logic tlm_a_sclk = 1, tlm_a_sgate = 0, tlm_a_sdata;
  logic tlm_b_sclk = 1, tlm_b_sgate = 0, tlm_b_sdata;
  logic [2:0] seu_upset = 0;
  logic [16:0] seu_mask = 0;
  mode_e mode;
  status_t status;
  int checks = 0, failures = 0;

  ssdr_top #(.MOD_AW(MOD_AW), .BLK_W(BLK_W), .FIFO_DEPTH(8), .BIT_WORDS(16),
             .SCRUB_BASE(16), .REFRESH_BASE(64), .TMR_REFRESH_PERIOD(64)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  `include "ssdr_tb_tasks.svh"

  // mechanism counters
  int m_bit = 0, m_overflow = 0, m_remap = 0, m_pb_correct = 0, m_auto_idle = 0,
      m_random_pb = 0, m_cmd_reject = 0, m_seu_vote = 0, m_scrub_fix = 0,
      m_scrub_log = 0, m_side_b = 0, m_refresh = 0, m_telemetry = 0, m_cmd_b = 0,
      m_tlm_page = 0;

  function automatic word_t raw(int pa);
    return pa[MOD_AW] ? dut.g_mod[1].u_mem.mem[pa[MOD_AW-1:0]] : dut.g_mod[0].u_mem.mem[pa[MOD_AW-1:0]];
  endfunction
  task automatic poke(int pa, word_t v);
    if (pa[MOD_AW]) dut.g_mod[1].u_mem.mem[pa[MOD_AW-1:0]] = v;
    else            dut.g_mod[0].u_mem.mem[pa[MOD_AW-1:0]] = v;
  endtask

  logic [31:0] rec[] = new[30];
  logic [31:0] got[$];
  logic [7:0]  fr[$];

  initial begin
    int c0, e0;
    // memory starts as all-zero words, which are valid code words
    for (int a = 0; a < 2**MOD_AW; a++) begin
      dut.g_mod[0].u_mem.mem[a] = '0;
      dut.g_mod[1].u_mem.mem[a] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // built-in test
    command(0, OP_BIT, '{});
    check(mode == MODE_BIT || status.bit_done, "test mode entered");
    while (mode == MODE_BIT) @(negedge clk);
    check(status.bit_pass && status.bit_errors == 0, "built-in test passes");
    if (status.bit_pass) m_bit++;

    // segment 1 = logical 0x20..0x37; logical block 3 -> physical block 31
    command(0, OP_DEFINE_SEG, '{16'd1, 16'd0, 16'h0020, 16'd0, 16'h0038});
    command(0, OP_MAP_WRITE, '{16'd3, 16'd31});
    command(0, OP_REC_SEG + 7'd1, '{});
    check(mode == MODE_RECORD && status.rec_seg == 1, "record mode");
    foreach (rec[i]) rec[i] = $urandom;
    data_in(0, rec);
    check(status.overflow == 6, "segment full: 6 words dropped");
    if (status.overflow == 6) m_overflow++;
    // word 18 of the segment is logical 0x32 -> physical 0x1F2
    check(raw(9'h1F2) != '0 && raw(9'h032) == '0, "remapped block used");
    if (raw(9'h1F2) != '0) m_remap++;
    poke(9'h1F2, raw(9'h1F2) ^ (word_t'(2'b11) << 26));

    // playback, commanded on line B
    c0 = status.edac_corrected;
    command(1, OP_PB_SEG + 7'd1, '{});
    m_cmd_b++;
    data_out(0, 24, got);
    for (int i = 0; i < 24; i++) check(got[i] == rec[i], "playback word");
    check(status.edac_corrected == c0 + 1, "pair error corrected on playback");
    if (status.edac_corrected == c0 + 1) m_pb_correct++;
    repeat (20) @(negedge clk);
    check(mode == MODE_IDLE, "idle after playback");
    if (mode == MODE_IDLE) m_auto_idle++;

    // random playback of the last four words
    command(0, OP_PB_RAND + 7'd1, '{16'd0, 16'h0020 + 16'd20});
    data_out(0, 4, got);
    for (int i = 0; i < 4; i++) check(got[i] == rec[20 + i], "random playback word");
    if (got[3] == rec[23]) m_random_pb++;

    // rejected command
    e0 = status.cmd_rejected;
    command(0, OP_SCRUB_RATE, '{16'd1}, 1);
    check(status.cmd_rejected == e0 + 1 && status.scrub_rate == 3, "bad checksum rejected");
    if (status.cmd_rejected == e0 + 1) m_cmd_reject++;

    // upset in one copy of the voted configuration
    command(0, OP_SCRUB_RATE, '{16'd1});
    seu_mask = '1; seu_upset = 3'b100; @(negedge clk); seu_upset = 0; @(negedge clk);
    check(status.scrub_rate == 1 && mode == MODE_IDLE, "upset outvoted");
    if (dut.u_ctrl.cfg_mismatch) m_seu_vote++;
    repeat (100) @(negedge clk);   // the voted register has been refreshed
    // upset in one copy of the segment table: segment 1's write pointer
    begin
      logic [25:0] wp1;
      wp1 = dut.seg_wp[1];
      dut.u_seg.cp[2].wp[1] = wp1 ^ 26'h15;
      #1;
      check(dut.u_seg.mismatch && dut.seg_wp[1] == wp1, "segment upset outvoted");
      if (dut.u_seg.mismatch) m_seu_vote++;
      @(negedge clk);
      check(!dut.u_seg.mismatch && dut.u_seg.cp[2].wp[1] == wp1, "segment copy refreshed");
      check(status.vote_upsets == 16'd2, "both upsets counted");
    end
    // upset in one copy of a map entry: found and repaired by the refresh walk
    repeat (3) @(negedge clk);     // a separate event, not merged with the last
    dut.u_map.map2[5] = 5'h1A;
    repeat (40) @(negedge clk);
    check(dut.u_map.map2[5] == 5'd5 && status.vote_upsets == 16'd3, "map upset repaired and counted");
    if (status.vote_upsets == 16'd3) m_seu_vote++;

    // scrubber: a pair error and an uncorrectable word in unused space
    poke(9'h150, word_t'(2'b11) << 8);
    poke(9'h0F0, word_t'(5));
    c0 = status.edac_corrected;
    repeat (2**(MOD_AW + 1) * 16 + 200) @(negedge clk);
    check(raw(9'h150) == '0 && status.edac_corrected >= c0 + 1, "scrub rewrote corrected word");
    if (raw(9'h150) == '0) m_scrub_fix++;
    check(status.errlog_count == 1 && dut.u_map.log_entry[0] == 9'h0F0, "uncorrectable word logged");
    if (status.errlog_count == 1) m_scrub_log++;
    check(status.scrub_passes >= 1, "scrub pass completed");
    command(0, OP_CLEAR_ERRLOG, '{});
    poke(9'h0F0, '0);

    // B side: data in/out B, telemetry B, bus B
    command(0, OP_PORTS, '{16'd7});
    command(1, OP_DEFINE_SEG, '{16'd2, 16'd0, 16'h0080, 16'd0, 16'h0090});
    command(1, OP_REC_SEG + 7'd2, '{});
    begin
      logic [31:0] w5[] = new[5];
      foreach (w5[i]) w5[i] = 32'hC0DE_0000 + 32'(i);
      data_in(1, w5);
      command(1, OP_PB_SEG + 7'd2, '{});
      data_out(1, 5, got);
      for (int i = 0; i < 5; i++) check(got[i] == w5[i], "B side playback");
      if (got[4] == w5[4] && status.ports == 7) m_side_b++;
    end

    m_refresh = int'(dut.g_mod[0].u_mem.refresh_row);
    check(m_refresh > 0, "refresh cycles reached the modules");

    // telemetry frame on line B
    tlm_frame(1, 60, fr);
    check(fr[0] == 8'hEB && fr[1] == 8'h90, "telemetry sync");
    check(fr[3][7:6] == 2'(MODE_IDLE) && fr[3][5:3] == 3'd7, "telemetry mode and ports");
    check({fr[6], fr[7]} == status.cmd_accepted && {fr[8], fr[9]} == 16'd1, "telemetry command counts");
    check({fr[15], fr[16]} == 16'd6, "telemetry overflow count");
    check({fr[19], fr[20]} == 16'd32, "telemetry blocks in service");
    check(fr[24 + 16 + 3] == 8'h20 && fr[24 + 16 + 7] == 8'h38 && fr[24 + 16 + 11] == 8'h38,
          "telemetry segment 1 pointers");
    if (fr[0] == 8'hEB) m_telemetry++;

    // EDAC report page: three pair corrections (word 0x1F2 on playback and
    // again when the scrubber rewrote it, then word 0x150), the last at 0x150
    command(1, OP_TLM_PAGE, '{16'd1});
    tlm_frame(1, 36, fr);
    check({fr[34], fr[35]} == 16'd3, "telemetry outvoted upsets");
    check(fr[23][7:6] == 2'd1 && {fr[24], fr[25]} == 16'd3 && status.edac_pair_corrected == 16'd3,
          "telemetry pair corrections");
    check({fr[26], fr[27], fr[28], fr[29]} == 32'h150, "telemetry last corrected word");
    // map page from logical block 0: block 3 lives in physical block 31
    command(1, OP_TLM_PAGE, '{16'd2, 16'd0});
    tlm_frame(1, 34, fr);
    check(fr[23][7:6] == 2'd2 && {fr[30], fr[31]} == 16'd31 && {fr[32], fr[33]} == 16'd4,
          "telemetry map page");
    if ({fr[30], fr[31]} == 16'd31) m_tlm_page++;

    check(m_bit > 0, "mechanism: built-in test");
    check(m_overflow > 0, "mechanism: overflow");
    check(m_remap > 0, "mechanism: remap");
    check(m_pb_correct > 0, "mechanism: playback correction");
    check(m_auto_idle > 0, "mechanism: return to idle");
    check(m_random_pb > 0, "mechanism: random playback");
    check(m_cmd_reject > 0, "mechanism: command reject");
    check(m_seu_vote > 0, "mechanism: majority vote");
    check(m_scrub_fix > 0, "mechanism: scrub correction");
    check(m_scrub_log > 0, "mechanism: error log");
    check(m_side_b > 0, "mechanism: B side");
    check(m_refresh > 0, "mechanism: refresh");
    check(m_telemetry > 0, "mechanism: telemetry");
    check(m_cmd_b > 0, "mechanism: command line B");
    check(m_tlm_page > 0, "mechanism: telemetry page");
    $display("mechanisms: bit=%0d overflow=%0d remap=%0d pb_correct=%0d auto_idle=%0d random_pb=%0d reject=%0d seu=%0d scrub_fix=%0d scrub_log=%0d side_b=%0d refresh=%0d tlm=%0d cmd_b=%0d tlm_page=%0d",
             m_bit, m_overflow, m_remap, m_pb_correct, m_auto_idle, m_random_pb, m_cmd_reject,
             m_seu_vote, m_scrub_fix, m_scrub_log, m_side_b, m_refresh, m_telemetry, m_cmd_b, m_tlm_page);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
