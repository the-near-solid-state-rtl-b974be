// tb_tmr_reg: checks the triplicated register. A written value appears on
// the voted output one cycle later; an upset in one copy leaves the output
// unchanged and raises `mismatch`; the periodic refresh (period 16 here)
// clears the upset within one period; upsets in two copies at once win the
// vote, as majority voting must allow.
module tb_tmr_reg;
  logic clk = 0, rst_n = 1, wr_en = 0;
  logic [7:0] wd = 0, mask = 0, q;
  logic [2:0] upset = 0;
  logic mm;
  int checks = 0, failures = 0, cyc = 0;

  tmr_reg #(.W(8), .RESET_VALUE(8'h5A), .REFRESH_PERIOD(16)) dut (
    .clk, .rst_n, .wr_en, .wr_data(wd), .upset, .upset_mask(mask), .q, .mismatch(mm));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s q=%h mm=%b", what, q, mm); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q == 8'h5A && !mm, "reset value");
    wr_en = 1; wd = 8'hC3; @(negedge clk); wr_en = 0;
    check(q == 8'hC3, "write");
    for (int c = 0; c < 3; c++) begin
      // wait until just after a refresh so the upset survives a few cycles
      while (dut.tick != 1) @(negedge clk);
      upset = 3'b001 << c; mask = 8'hFF; @(negedge clk); upset = 0;
      check(q == 8'hC3, "single upset outvoted");
      check(mm, "mismatch seen");
      repeat (16) @(negedge clk);
      check(!mm && q == 8'hC3, "refresh scrubs upset");
    end
    while (dut.tick != 1) @(negedge clk);
    upset = 3'b011; mask = 8'h0F; @(negedge clk); upset = 0;
    check(q == 8'hCC, "double upset wins vote");
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
