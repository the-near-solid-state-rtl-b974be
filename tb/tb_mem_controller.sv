// tb_mem_controller: the controller with two 2^6-word memory modules on
// bus A. Checks record writes and playback reads (data, two-cycle read
// latency from issue to rd_valid, one write every two cycles), refresh
// priority over a waiting write, scrub of a word holding a DRAM pair error
// (rewritten clean, counted as corrected and as a pair, its address
// reported), playback of a word with one flipped bit (corrected data, count
// and address), scrub of a word with two errors
// in one code word (logged with its address, left alone, counted), and the
// built-in test (passes, takes the expected number of cycles, and leaves
// the test words clean).
module tb_mem_controller;
  import ssdr_pkg::*;
  localparam int MOD_AW = 6, PA_W = 7, BITW = 16;
  logic clk = 0, rst_n = 1;
  logic wr_valid = 0, rd_en = 0, scrub_req = 0, refresh_req = 0, bit_start = 0;
  data_t wr_data = 0, rd_data;
  logic [PA_W-1:0] wr_pa = 0, rd_pa = 0, scrub_pa = 0, log_addr;
  logic wr_take, rd_issue, rd_valid, scrub_ack, refresh_ack, log_we;
  logic bit_busy, busy, bit_done, bit_pass;
  logic [15:0] bit_errors, corrected, uncorrectable, pair_corrected;
  logic [PA_W-1:0] last_corr_pa;
  bus_req_t bus;
  word_t rdata0, rdata1, bus_rdata;
  logic rv0, rv1;
  logic [11:0] row0, row1;
  data_t ref_d [128];
  int checks = 0, failures = 0, cyc = 0;

  mem_controller #(.NUM_MOD(2), .MOD_AW(MOD_AW), .BIT_WORDS(BITW)) dut (.clk, .rst_n,
    .wr_valid, .wr_data, .wr_pa, .wr_take, .rd_en, .rd_pa, .rd_issue, .rd_valid, .rd_data,
    .scrub_req, .scrub_pa, .scrub_ack, .refresh_req, .refresh_ack, .log_we, .log_addr,
    .bit_start, .bit_busy, .busy, .bit_done, .bit_pass, .bit_errors,
    .bus, .bus_rdata, .bus_rvalid(rv0 | rv1), .corrected, .uncorrectable,
    .pair_corrected, .last_corr_pa);

  memory_module #(.ADDR_W(MOD_AW), .MODULE_ID(0)) m0 (.clk, .rst_n, .bus_sel(1'b0), .bus_a(bus),
    .bus_b('0), .rdata(rdata0), .rvalid(rv0), .refresh_row(row0));
  memory_module #(.ADDR_W(MOD_AW), .MODULE_ID(1)) m1 (.clk, .rst_n, .bus_sel(1'b0), .bus_a(bus),
    .bus_b('0), .rdata(rdata1), .rvalid(rv1), .refresh_row(row1));
  assign bus_rdata = rv0 ? rdata0 : rdata1;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic word_t raw(int pa);
    return (pa >= 64) ? m1.mem[pa - 64] : m0.mem[pa];
  endfunction

  task automatic poke(int pa, word_t v);
    if (pa >= 64) m1.mem[pa - 64] = v; else m0.mem[pa] = v;
  endtask

  initial begin
    int t0, n;
    word_t clean;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // record 128 words (both modules)
    t0 = cyc;
    for (int a = 0; a < 128; a++) begin
      ref_d[a] = $urandom;
      wr_valid = 1; wr_data = ref_d[a]; wr_pa = 7'(a);
      do @(negedge clk); while (!wr_take);
    end
    wr_valid = 0;
    check(cyc - t0 <= 2 * 128 + 2, "write rate");
    // playback
    for (int i = 0; i < 40; i++) begin
      int a = $urandom_range(0, 127);
      rd_en = 1; rd_pa = 7'(a);
      @(negedge clk); rd_en = 0;
      check(rd_issue, "read issued");
      t0 = cyc;
      while (!rd_valid) @(negedge clk);
      check(cyc - t0 == 2 && rd_data == ref_d[a], "playback data and latency");
    end
    // refresh wins over a waiting write
    refresh_req = 1; wr_valid = 1; wr_data = ref_d[3]; wr_pa = 3;
    @(negedge clk);
    check(refresh_ack && !wr_take && bus.op == BUS_REFRESH, "refresh first");
    refresh_req = 0;
    do @(negedge clk); while (!wr_take);
    wr_valid = 0;
    check(row0 == 1 && row1 == 1, "refresh reached both modules");
    // scrub a pair error
    clean = raw(77);
    poke(77, clean ^ (word_t'(2'b11) << 20));
    scrub_req = 1; scrub_pa = 77;
    do @(negedge clk); while (!scrub_ack);
    scrub_req = 0; @(negedge clk);
    check(raw(77) == clean && corrected == 1, "scrub corrected pair error");
    check(pair_corrected == 1 && last_corr_pa == 77, "pair counted, address reported");
    // scrub an uncorrectable word
    clean = raw(10);
    poke(10, clean ^ 44'h5);     // stored bits 0 and 2: both in code word 0
    scrub_req = 1; scrub_pa = 10;
    n = 0;
    do begin @(negedge clk); if (log_we) n++; end while (!scrub_ack);
    scrub_req = 0; @(negedge clk);
    check(n == 1 && log_addr == 10 && uncorrectable == 1 && raw(10) == (clean ^ 44'h5), "uncorrectable logged");
    // playback of a word with one flipped bit: corrected on the way out
    poke(20, raw(20) ^ (word_t'(1) << 33));
    rd_en = 1; rd_pa = 7'd20; @(negedge clk); rd_en = 0;
    while (!rd_valid) @(negedge clk);
    check(rd_data == ref_d[20] && corrected == 2 && pair_corrected == 1 && last_corr_pa == 20,
          "playback single-bit correction reported");
    // built-in test
    bit_start = 1; @(negedge clk); bit_start = 0;
    t0 = cyc;
    while (!bit_done) @(negedge clk);
    check(cyc - t0 == BITW + 4 * BITW, "test duration");
    check(bit_pass && bit_errors == 0, "test passes");
    begin
      bit ok = 1;
      for (int i = 0; i < BITW; i++) begin
        int pa = i << 3;
        data_t p = (32'(i) * 32'h9E37_79B9) ^ 32'hA5A5_5A5A;
        rd_en = 1; rd_pa = 7'(pa); @(negedge clk); rd_en = 0;
        while (!rd_valid) @(negedge clk);
        if (rd_data != p) ok = 0;
      end
      check(ok && corrected == 2, "test words rewritten clean");
    end
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
