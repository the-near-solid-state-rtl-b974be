// tb_reconfig_map: 10-bit addresses, 16-word blocks (64 blocks), 4-entry
// error table. Checks identity translation after reset, remapping a logical
// block to a spare physical block, shrinking the in-service space, and the
// error table's logging, overflow count and clearing, the map read port used
// by telemetry, and that an upset in one copy of a map entry is outvoted and
// repaired by the refresh walk.
module tb_reconfig_map;
  logic clk = 0, rst_n = 1, map_we = 0, size_we = 0, log_clear = 0, log_we = 0;
  logic [5:0] lblk = 0, pblk = 0, rd_lblk = 0, rd_pblk;
  logic [6:0] size_b = 0, ins;
  logic [9:0] la = 0, pa, laddr = 0;
  logic ok, mm;
  logic [3:0][9:0] ent;
  logic [2:0] lcount;
  logic [15:0] lost;
  int checks = 0, failures = 0;

  reconfig_map #(.PA_W(10), .BLK_W(4), .ERR_DEPTH(4)) dut (.clk, .rst_n, .map_we,
    .map_lblk(lblk), .map_pblk(pblk), .size_we, .size_blocks(size_b), .log_clear,
    .la, .pa, .la_ok(ok), .in_service(ins), .log_we, .log_addr(laddr),
    .log_entry(ent), .log_count(lcount), .log_lost(lost),
    .rd_lblk, .rd_pblk, .mismatch(mm));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s pa=%h", what, pa); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      la = 10'($urandom); #1;
      check(pa == la && ok, "identity");
    end
    check(ins == 64, "all in service");
    map_we = 1; lblk = 6'd3; pblk = 6'd63; @(negedge clk); map_we = 0;
    size_we = 1; size_b = 7'd63; @(negedge clk); size_we = 0;
    la = 10'h035; #1;
    check(pa == 10'h3F5 && ok, "remapped block");
    la = 10'h045; #1;
    check(pa == 10'h045, "neighbour unchanged");
    la = 10'h3F0; #1;
    check(!ok && ins == 63, "outside in-service space");
    for (int i = 0; i < 6; i++) begin
      log_we = 1; laddr = 10'(100 + i); @(negedge clk);
    end
    log_we = 0;
    check(lcount == 4 && ent[0] == 100 && ent[3] == 103 && lost == 2, "error table");
    log_clear = 1; @(negedge clk); log_clear = 0;
    check(lcount == 0 && lost == 0, "cleared");
    rd_lblk = 6'd3; #1;
    check(rd_pblk == 6'd63, "map read port, remapped entry");
    rd_lblk = 6'd4; #1;
    check(rd_pblk == 6'd4, "map read port, identity entry");
    // upset in one copy of a map entry: outvoted, then refreshed by the walk
    dut.map1[3] = 6'h0A;
    la = 10'h035; rd_lblk = 6'd3; #1;
    check(pa == 10'h3F5 && rd_pblk == 6'd63, "map upset outvoted");
    begin
      int seen = 0;
      repeat (70) begin @(negedge clk); if (mm) seen++; end
      check(seen == 1 && dut.map1[3] == 6'd63 && !mm, "map copy refreshed, upset seen once");
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
