// tb_serial_rx: shifts random 16-bit words in, MSB first, with the clock
// high and low for 6 system clocks each, and checks every received word.
// Also checks that dropping the gate in the middle of a word discards the
// partial word, and that the word arrives within 5 system clocks of the
// last rising edge.
module tb_serial_rx;
  logic clk = 0, rst_n = 1, sclk = 1, sdata = 0, sgate = 0;
  logic [15:0] word;
  logic wv, act;
  logic [15:0] exp_q[$];
  int checks = 0, failures = 0, got = 0;
  int last_rise, cyc = 0;

  serial_rx #(.W(16)) dut (.clk, .rst_n, .sclk, .sdata, .sgate, .word, .word_valid(wv), .active(act));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s word=%h exp=%h lat=%0d", what, word, exp_q.size() ? exp_q[0] : 0, cyc - last_rise); end
  endtask

  task automatic send_bits(logic [15:0] v, int n);
    for (int b = 15; b > 15 - n; b--) begin
      sclk = 0; sdata = v[b];
      repeat (6) @(negedge clk);
      sclk = 1; last_rise = cyc;
      repeat (6) @(negedge clk);
    end
  endtask

  always @(posedge clk) if (wv) begin
    got++;
    check(exp_q.size() > 0 && word == exp_q[0], "word value");
    check(cyc - last_rise <= 5, "latency");
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    sgate = 1;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      logic [15:0] v = $urandom;
      exp_q.push_back(v);
      send_bits(v, 16);
    end
    send_bits(16'hFFFF, 7);         // partial word
    sgate = 0; repeat (6) @(negedge clk);
    sgate = 1; repeat (6) @(negedge clk);
    exp_q.push_back(16'h1234);
    send_bits(16'h1234, 16);
    repeat (10) @(negedge clk);
    check(got == 21 && exp_q.size() == 0, "word count");
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
