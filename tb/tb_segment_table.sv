// tb_segment_table: 10-bit logical space. Checks the reset partition,
// defining a segment, sequential writes up to `full`, reads up to `empty`,
// random record/playback pointer moves with clamping, that segments are
// independent, and that an upset written into one of the three copies of
// the table is outvoted at once and repaired at the next clock.
module tb_segment_table;
  import ssdr_pkg::*;
  localparam int LA_W = 10;
  logic clk = 0, rst_n = 1;
  logic def_en = 0, set_wp_en = 0, set_rp_en = 0, wr_adv = 0, rd_adv = 0;
  logic [2:0] def_seg = 0, set_seg = 0, wr_seg = 0, rd_seg = 0;
  logic [LA_W-1:0] def_start = 0, set_addr = 0, wr_addr, rd_addr;
  logic [LA_W:0] def_limit = 0;
  logic full, empty, mismatch;
  logic [NSEG-1:0][LA_W:0] s_start, s_limit, s_wp, s_rp;
  int checks = 0, failures = 0;

  segment_table #(.LA_W(LA_W)) dut (.clk, .rst_n, .def_en, .def_seg, .def_start, .def_limit,
    .set_wp_en, .set_rp_en, .set_seg, .set_addr, .wr_seg, .wr_addr, .full, .wr_adv,
    .rd_seg, .rd_addr, .empty, .rd_adv, .seg_start(s_start), .seg_limit(s_limit),
    .seg_wp(s_wp), .seg_rp(s_rp), .mismatch);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s wa=%0d ra=%0d", what, wr_addr, rd_addr); end
  endtask

  task automatic define(int s, int st, int lim);
    def_en = 1; def_seg = 3'(s); def_start = LA_W'(st); def_limit = (LA_W+1)'(lim);
    @(negedge clk); def_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(s_limit[0] == 1024 && s_limit[1] == 0 && !full && empty, "reset partition");
    define(2, 100, 110);
    wr_seg = 2; rd_seg = 2; @(negedge clk);
    check(wr_addr == 100 && rd_addr == 100 && empty && !full, "defined");
    for (int i = 0; i < 12; i++) begin wr_adv = 1; @(negedge clk); end
    wr_adv = 0;
    check(full && wr_addr == 110 - 1024 + 1024 && s_wp[2] == 110, "fills to limit");
    for (int i = 0; i < 4; i++) begin
      check(rd_addr == LA_W'(100 + i), "read order");
      rd_adv = 1; @(negedge clk); rd_adv = 0;
    end
    set_rp_en = 1; set_seg = 2; set_addr = 108; @(negedge clk); set_rp_en = 0;
    check(rd_addr == 108, "random playback");
    set_rp_en = 1; set_addr = 500; @(negedge clk); set_rp_en = 0;
    check(rd_addr == 110 && empty, "random playback clamped");
    set_wp_en = 1; set_addr = 105; @(negedge clk); set_wp_en = 0;
    check(wr_addr == 105 && !full, "random record");
    set_wp_en = 1; set_addr = 5; @(negedge clk); set_wp_en = 0;
    check(wr_addr == 100, "random record clamped");
    wr_seg = 0; rd_seg = 0; @(negedge clk);
    check(wr_addr == 0 && empty, "segment 0 untouched");
    wr_adv = 1; @(negedge clk); wr_adv = 0;
    check(!empty && s_wp[0] == 1 && s_wp[2] == 100, "independent segments");
    check(!mismatch, "copies agree");
    dut.cp[1].wp[0] = 11'h3A5;       // upset in one copy
    dut.cp[2].limit[2] = 11'h000;    // and in another copy, another field
    #1;
    check(mismatch && s_wp[0] == 1 && wr_addr == 1 && s_limit[2] == 110, "upsets outvoted");
    @(negedge clk);
    check(!mismatch && dut.cp[1].wp[0] == 1 && dut.cp[2].limit[2] == 110, "copies refreshed");
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
