// tb_ssdr_full: the recorder at its full size (two modules of 2^24 words,
// 2^30 user bits, every parameter at its default). One complete operation:
// built-in test over the whole array, a segment defined across the boundary
// between the two memory modules, 16 words recorded into it, one planted DRAM
// pair error, playback of all 16 words with the correction counted, and the
// start of a telemetry frame.
module tb_ssdr_full;
  import ssdr_pkg::*;
  localparam int HALF = 6;
  localparam int MOD_AW = 24;

  logic clk = 0, rst_n = 1;
  logic cmd_a_sclk = 1, cmd_a_sdata = 0, cmd_a_sgate = 0;
  logic cmd_b_sclk = 1, cmd_b_sdata = 0, cmd_b_sgate = 0;
  logic din_a_sclk = 1, din_a_sdata = 0, din_a_sgate = 0;
  logic din_b_sclk = 1, din_b_sdata = 0, din_b_sgate = 0;
  logic dout_a_sclk = 1, dout_a_sgate = 0, dout_a_sdata;
  logic dout_b_sclk = 1, dout_b_sgate = 0, dout_b_sdata;
  logic tlm_a_sclk = 1, tlm_a_sgate = 0, tlm_a_sdata;
  logic tlm_b_sclk = 1, tlm_b_sgate = 0, tlm_b_sdata;
  logic [2:0] seu_upset = 0;
  logic [16:0] seu_mask = 0;
  mode_e mode;
  status_t status;
  int checks = 0, failures = 0;

  ssdr_top dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  `include "ssdr_tb_tasks.svh"

  logic [31:0] rec[] = new[16];
  logic [31:0] got[$];
  logic [7:0]  fr[$];

  initial begin
    int c0;
    for (int a = 0; a < 2**MOD_AW; a++) begin
      dut.g_mod[0].u_mem.mem[a] = '0;
      dut.g_mod[1].u_mem.mem[a] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    command(0, OP_BIT, '{});
    while (mode == MODE_BIT) @(negedge clk);
    check(status.bit_pass && status.bit_errors == 0, "built-in test passes");

    // segment 4: logical 0x00FFFFF8 .. 0x01000008, across the module boundary
    command(0, OP_DEFINE_SEG, '{16'd4, 16'h00FF, 16'hFFF8, 16'h0100, 16'h0008});
    command(0, OP_REC_SEG + 7'd4, '{});
    foreach (rec[i]) rec[i] = $urandom;
    data_in(0, rec);
    check(status.overflow == 0, "no overflow");
    check(dut.g_mod[0].u_mem.mem[24'hFFFFFF] != '0 && dut.g_mod[1].u_mem.mem[24'h000007] != '0,
          "words in both modules");
    dut.g_mod[1].u_mem.mem[3] ^= word_t'(2'b11) << 40;
    c0 = status.edac_corrected;
    command(0, OP_PB_SEG + 7'd4, '{});
    data_out(0, 16, got);
    for (int i = 0; i < 16; i++) check(got[i] == rec[i], "playback word");
    check(status.edac_corrected == c0 + 1, "pair error corrected");
    repeat (20) @(negedge clk);
    check(mode == MODE_IDLE, "idle after playback");
    tlm_frame(0, 24, fr);
    check(fr[0] == 8'hEB && fr[1] == 8'h90 && {fr[19], fr[20]} == 16'd512, "telemetry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
