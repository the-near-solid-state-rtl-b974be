// tb_memory_module: module 1 of a 2^8-word instance. Writes random words
// over bus A, reads them back with the one-cycle read latency, checks that
// cycles addressed to module 0 are ignored, that after switching to bus B
// only bus B is obeyed, and that refresh cycles advance the refresh row.
module tb_memory_module;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 1, bus_sel = 0;
  bus_req_t ba, bb;
  word_t rdata;
  logic rvalid;
  logic [11:0] row;
  word_t ref_m [256];
  int checks = 0, failures = 0;

  memory_module #(.ADDR_W(8), .MODULE_ID(1)) dut (.clk, .rst_n, .bus_sel, .bus_a(ba), .bus_b(bb),
    .rdata, .rvalid, .refresh_row(row));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic bus_req_t req(bus_op_e op, logic [1:0] cs, int a, word_t d);
    bus_req_t r = '0;
    r.op = op; r.cs = cs; r.addr = MOD_AW_MAX'(a); r.wdata = d;
    return r;
  endfunction

  task automatic cyc_a(bus_req_t r);  ba = r; bb = '0; @(negedge clk); ba = '0; endtask
  task automatic cyc_b(bus_req_t r);  bb = r; ba = '0; @(negedge clk); bb = '0; endtask

  initial begin
    ba = '0; bb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      ref_m[a] = {$urandom, $urandom};
      cyc_a(req(BUS_WRITE, 2'b10, a, ref_m[a]));
    end
    // writes for module 0 must not land here
    for (int a = 0; a < 16; a++) cyc_a(req(BUS_WRITE, 2'b01, a, '0));
    for (int i = 0; i < 100; i++) begin
      int a = $urandom_range(0, 255);
      ba = req(BUS_READ, 2'b10, a, '0);
      @(negedge clk); ba = '0;
      check(rvalid && rdata == ref_m[a], "read back");
      @(negedge clk);
      check(!rvalid, "rvalid one cycle");
    end
    ba = req(BUS_READ, 2'b01, 3, '0); @(negedge clk); ba = '0;
    check(!rvalid, "other module read ignored");
    bus_sel = 1;
    cyc_a(req(BUS_WRITE, 2'b10, 5, '1));           // ignored: bus A not selected
    cyc_b(req(BUS_WRITE, 2'b10, 6, 44'h123));
    bb = req(BUS_READ, 2'b10, 5, '0); @(negedge clk); bb = '0;
    check(rvalid && rdata == ref_m[5], "bus A ignored when B selected");
    bb = req(BUS_READ, 2'b10, 6, '0); @(negedge clk); bb = '0;
    check(rvalid && rdata == 44'h123, "bus B write");
    for (int i = 0; i < 5; i++) cyc_b(req(BUS_REFRESH, 2'b11, 0, '0));
    check(row == 12'd5, "refresh rows");
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
