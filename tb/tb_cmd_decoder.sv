// tb_cmd_decoder: feeds command words and checks the decoded commands:
// a header-only command, a command with fields and a correct checksum, a
// wrong checksum (rejected), an opcode above the 48 defined (rejected), a
// command with more fields than are kept, a frame abort in mid-command, and
// the accepted/rejected counters.
module tb_cmd_decoder;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 1, wv = 0, ab = 0;
  logic [15:0] w = 0, acc, rej;
  command_t cmd;
  logic cv, ce;
  int checks = 0, failures = 0, nvalid = 0, nerr = 0;
  command_t last;

  cmd_decoder dut (.clk, .rst_n, .word_valid(wv), .word(w), .frame_abort(ab),
    .cmd, .cmd_valid(cv), .cmd_error(ce), .accepted(acc), .rejected(rej));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) begin
    if (cv) begin nvalid++; last = cmd; end
    if (ce) nerr++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s op=%h nv=%0d ne=%0d acc=%0d rej=%0d", what, last.opcode, nvalid, nerr, acc, rej); end
  endtask

  task automatic put(logic [15:0] v);
    w = v; wv = 1; @(negedge clk); wv = 0; repeat (2) @(negedge clk);
  endtask

  task automatic send(logic [6:0] op, int n, bit sum, bit corrupt);
    logic [15:0] s, h;
    h = {sum, op, 1'b0, 7'(n)};
    s = h;
    put(h);
    for (int i = 0; i < n; i++) begin put(16'(i * 257 + 1)); s += 16'(i * 257 + 1); end
    if (sum) put(corrupt ? s ^ 16'h1 : s);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(OP_IDLE, 0, 0, 0);
    check(nvalid == 1 && last.opcode == OP_IDLE && last.nfields == 0, "header only");
    send(OP_DEFINE_SEG, 5, 1, 0);
    check(nvalid == 2 && last.opcode == OP_DEFINE_SEG && last.field[4] == 16'(4*257+1), "fields+sum");
    send(OP_SCRUB_RATE, 1, 1, 1);
    check(nvalid == 2 && nerr == 1, "bad checksum rejected");
    send(7'h30, 0, 1, 0);
    check(nvalid == 2 && nerr == 2, "undefined opcode rejected");
    send(7'h2F, 20, 1, 0);
    check(nvalid == 3 && last.opcode == 7'h2F && last.nfields == 20 && last.field[7] == 16'(7*257+1), "long command");
    put({1'b1, OP_MAP_WRITE, 8'd2});
    put(16'h0001);
    ab = 1; @(negedge clk); ab = 0;
    send(OP_BIT, 0, 1, 0);
    check(nvalid == 4 && last.opcode == OP_BIT && nerr == 2, "abort drops partial command");
    check(acc == 4 && rej == 2, "counters");
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
