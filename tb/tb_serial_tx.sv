// tb_serial_tx: a receiver clocks 8-bit words out of the transmitter (clock
// high and low for 6 system clocks, sampling at rising edges) and checks
// them against the words offered; when nothing is offered a zero word and an
// underrun pulse must come instead.
module tb_serial_tx;
  logic clk = 0, rst_n = 1, sclk = 1, sgate = 0;
  logic sdata, lr, und, act;
  logic [7:0] ld;
  logic lv;
  logic [7:0] src[16];
  int n_src = 0, rd_i = 0;
  int checks = 0, failures = 0, unders = 0;

  serial_tx #(.W(8)) dut (.clk, .rst_n, .sclk, .sgate, .sdata, .load_data(ld), .load_valid(lv),
    .load_ready(lr), .underrun(und), .active(act));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  assign lv = rd_i < n_src;
  assign ld = lv ? src[rd_i[3:0]] : 8'h00;
  always @(posedge clk) if (lr) rd_i <= rd_i + 1;
  always @(posedge clk) if (und) unders++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s unders=%0d", what, unders); end
  endtask

  task automatic recv(output logic [7:0] v);
    for (int b = 7; b >= 0; b--) begin
      sclk = 0; repeat (6) @(negedge clk);
      sclk = 1; v[b] = sdata; repeat (6) @(negedge clk);
    end
  endtask

  initial begin
    logic [7:0] exp_w[$];
    logic [7:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin src[i] = 8'($urandom); exp_w.push_back(src[i]); end
    n_src = 16;
    sgate = 1; repeat (4) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      recv(v);
      check(v == exp_w[i], "word");
    end
    recv(v);
    check(v == 8'h00 && unders == 1, "underrun fill");
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
