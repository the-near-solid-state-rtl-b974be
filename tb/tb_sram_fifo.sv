// tb_sram_fifo: random pushes and pops against a queue reference model;
// checks the head word, empty/full/count every cycle, and that a push into
// a full buffer is refused with an overflow pulse. Depth 8.
module tb_sram_fifo;
  logic clk = 0, rst_n = 1, flush = 0, push = 0, pop = 0;
  logic [31:0] wd = 0, rd;
  logic empty, full, ovf;
  logic [3:0] count;
  logic [31:0] q[$];
  int checks = 0, failures = 0, ovf_seen = 0;
  bit exp_ovf;

  sram_fifo #(.W(32), .DEPTH(8)) dut (.clk, .rst_n, .flush, .push, .wdata(wd), .pop,
    .rdata(rd), .empty, .full, .overflow(ovf), .count);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(count == 4'(q.size()), "count");
      check(empty == (q.size() == 0) && full == (q.size() == 8), "flags");
      if (q.size() > 0) check(rd == q[0], "head");
      push = ($urandom_range(0, 99) < (i < 1000 ? 70 : 30));
      pop  = ($urandom_range(0, 99) < (i < 1000 ? 30 : 70));
      wd   = $urandom;
      exp_ovf = push && q.size() == 8;
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !exp_ovf) q.push_back(wd);
      #1;
      check(ovf == exp_ovf, "overflow pulse");
      if (ovf) ovf_seen++;
    end
    check(ovf_seen > 0, "overflow exercised");
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
