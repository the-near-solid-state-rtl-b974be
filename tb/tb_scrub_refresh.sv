// tb_scrub_refresh: with an acknowledging responder, checks the interval
// between refresh requests (REFRESH_BASE << rate) and between scrub
// requests (SCRUB_BASE << (rate-1)) in cycles, that scrub addresses step
// through the 2^6-word array and wrap with a pass count, that rate 0 stops
// scrubbing, and that an unacknowledged refresh is counted as missed.
module tb_scrub_refresh;
  logic clk = 0, rst_n = 1;
  logic [2:0] sr = 3'd1, rr = 3'd0;
  logic sreq, rreq, sack = 0, rack = 0, ack_on = 1;
  logic [5:0] saddr;
  logic [15:0] passes, missed;
  int checks = 0, failures = 0, cyc = 0;
  int last_s = -1, last_r = -1, n_s = 0, n_r = 0, bad_s = 0, bad_r = 0, exp_s, exp_r;
  logic [5:0] exp_addr = 0;

  scrub_refresh #(.PA_W(6), .SCRUB_BASE(8), .REFRESH_BASE(32)) dut (.clk, .rst_n,
    .scrub_rate(sr), .refresh_rate(rr), .scrub_req(sreq), .scrub_addr(saddr), .scrub_ack(sack),
    .refresh_req(rreq), .refresh_ack(rack), .scrub_passes(passes), .refresh_missed(missed));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  assign exp_s = 8 << (sr - 1);
  assign exp_r = 32 << rr;

  // responder acknowledges each new request the cycle it sees it
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sack <= 0; rack <= 0;
    if (rst_n && sreq && !sack) begin
      sack <= 1; n_s++;
      if (saddr != exp_addr) bad_s++;
      exp_addr <= exp_addr + 1;
      if (last_s >= 0 && cyc - last_s != exp_s) bad_s++;
      last_s = cyc;
    end
    if (rst_n && ack_on && rreq && !rack) begin
      rack <= 1; n_r++;
      if (last_r >= 0 && cyc - last_r != exp_r) bad_r++;
      last_r = cyc;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (8 * 130) @(negedge clk);
    check(bad_s == 0 && n_s >= 120, "scrub interval and address");
    check(bad_r == 0 && n_r >= 30, "refresh interval");
    check(passes >= 1, "scrub pass counted");
    sr = 3'd3; rr = 3'd2; last_s = -1; last_r = -1; bad_s = 0; bad_r = 0; n_s = 0;
    repeat (32 * 20) @(negedge clk);
    check(bad_s == 0 && n_s >= 18, "scrub rate 3");
    check(bad_r == 0, "refresh rate 2");
    sr = 3'd0; n_s = 0;
    repeat (4) @(negedge clk); n_s = 0;
    repeat (200) @(negedge clk);
    check(n_s == 0, "scrub off");
    ack_on = 0;
    repeat (128 * 3) @(negedge clk);
    check(missed >= 1, "missed refresh counted");
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
