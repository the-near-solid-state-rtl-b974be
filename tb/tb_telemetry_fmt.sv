// tb_telemetry_fmt: reads whole frames out byte by byte. Page 0: checks the
// sync bytes, status fields, segment pointers, error table, zero fill, the
// frame length (540 bytes, then byte_valid low) and the frame counter.
// Page 1: the EDAC report fields, the error table and zero fill. Page 2: 128
// map entries from a chosen base block, read through a model of the map.
module tb_telemetry_fmt;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 1, fs = 0, br = 0;
  status_t st;
  logic [NSEG-1:0][25:0] s_start, s_limit, s_wp, s_rp;
  logic [15:0][24:0] el;
  logic [7:0] b, frames;
  logic bv;
  logic [7:0] fr[600];
  logic [8:0] map_base = 0, map_idx, map_val;
  int n = 0, checks = 0, failures = 0;

  telemetry_fmt dut (.clk, .rst_n, .status(st), .seg_start(s_start), .seg_limit(s_limit),
    .seg_wp(s_wp), .seg_rp(s_rp), .errlog(el), .frame_start(fs), .byte_ready(br),
    .byte_data(b), .byte_valid(bv), .frames, .map_base, .map_idx, .map_val);

  assign map_val = 9'(map_idx * 5 + 1);   // stand-in for the map table

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] be32(int at);
    return {fr[at], fr[at+1], fr[at+2], fr[at+3]};
  endfunction

  task automatic read_frame();
    n = 0;
    fs = 1; @(negedge clk); fs = 0;
    while (bv && n < 600) begin
      fr[n] = b; n++;
      br = 1; @(negedge clk); br = 0; @(negedge clk);
    end
  endtask

  initial begin
    st = '0;
    st.mode = MODE_PLAYBACK; st.ports = 3'b101; st.scrub_rate = 3'd5; st.refresh_rate = 3'd2;
    st.cmd_accepted = 16'h1234; st.last_opcode = 7'h22; st.last_ok = 1;
    st.edac_corrected = 16'h00AB; st.errlog_count = 5'd3; st.bit_pass = 1; st.bit_done = 1;
    for (int s = 0; s < NSEG; s++) begin
      s_start[s] = 26'(s * 1000); s_limit[s] = 26'(s * 1000 + 999);
      s_wp[s] = 26'(s * 1000 + 7); s_rp[s] = 26'(s * 1000 + 3);
    end
    for (int e = 0; e < 16; e++) el[e] = 25'(e * 4096 + 17);
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!bv, "idle before first frame");
    read_frame();
    check(n == 540, "frame length");
    check(fr[0] == 8'hEB && fr[1] == 8'h90 && fr[2] == 8'd1, "sync and count");
    check(fr[3] == {2'd2, 3'b101, 1'b0, 1'b1, 1'b1}, "mode byte");
    check(fr[4] == 8'h52, "rates");
    check(fr[6] == 8'h12 && fr[7] == 8'h34 && fr[10] == 8'hA2, "command history");
    check(fr[11] == 8'h00 && fr[12] == 8'hAB && fr[23] == 8'd3, "edac and error count");
    for (int s = 0; s < NSEG; s++)
      check(be32(24 + 16*s) == s*1000 && be32(24+16*s+4) == s*1000+999 &&
            be32(24+16*s+8) == s*1000+7 && be32(24+16*s+12) == s*1000+3, "segment pointers");
    for (int e = 0; e < 16; e++) check(be32(152 + 4*e) == e*4096+17, "error table");
    begin
      bit z = 1;
      for (int i = 216; i < 540; i++) if (fr[i] != 0) z = 0;
      check(z, "zero fill");
    end
    fs = 1; @(negedge clk); fs = 0;
    check(bv && b == 8'hEB && frames == 2, "second frame restarts");
    // page 1: EDAC report
    st.tlm_page = 2'd1; st.edac_pair_corrected = 16'h0102; st.last_corrected_pa = 32'h0123_4567;
    st.errlog_lost = 16'h0009; st.refresh_missed = 16'h0A0B; st.vote_upsets = 16'h0C0D;
    read_frame();
    check(n == 540 && fr[2] == 8'd3 && fr[23] == {2'd1, 1'b0, 5'd3}, "page 1 header");
    check({fr[24], fr[25]} == 16'h0102 && be32(26) == 32'h0123_4567 &&
          {fr[30], fr[31]} == 16'h0009 && {fr[32], fr[33]} == 16'h0A0B &&
          {fr[34], fr[35]} == 16'h0C0D, "EDAC report");
    for (int e = 0; e < 16; e++) check(be32(152 + 4*e) == e*4096+17, "page 1 error table");
    begin
      bit z = 1;
      for (int i = 36; i < 152; i++) if (fr[i] != 0) z = 0;
      for (int i = 216; i < 540; i++) if (fr[i] != 0) z = 0;
      check(z, "page 1 zero fill");
    end
    // page 2: map window from block 450 (wraps past block 511)
    st.tlm_page = 2'd2; map_base = 9'd450;
    read_frame();
    check(n == 540 && fr[0] == 8'hEB && fr[23] == {2'd2, 1'b0, 5'd3}, "page 2 header");
    begin
      bit ok = 1, z = 1;
      for (int k = 0; k < 128; k++) begin
        logic [8:0] v;
        v = 9'((450 + k) * 5 + 1);
        if ({fr[24 + 2*k], fr[25 + 2*k]} != {7'd0, v}) ok = 0;
      end
      for (int i = 280; i < 540; i++) if (fr[i] != 0) z = 0;
      check(ok, "map entries");
      check(z, "page 2 zero fill");
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
