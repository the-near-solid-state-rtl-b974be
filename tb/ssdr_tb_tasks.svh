// ssdr_tb_tasks.svh: serial-line drivers shared by the recorder testbenches.
// Included inside a testbench module that declares clk, the ssdr_top port
// signals, `checks`, `failures` and the localparam HALF (system clocks per
// half period of a serial clock). All lines idle with the clock high; data
// are driven after a falling edge and sampled at a rising edge, MSB first.

task automatic check(bit cond, string what);
  checks++;
  if (!cond) begin
    failures++;
    if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
  end
endtask

// one 16-bit command word on line A (port 0) or B (port 1)
task automatic cmd_word(bit port, logic [15:0] w);
  if (port) cmd_b_sgate = 1; else cmd_a_sgate = 1;
  repeat (HALF) @(negedge clk);
  for (int b = 15; b >= 0; b--) begin
    if (port) begin cmd_b_sclk = 0; cmd_b_sdata = w[b]; end
    else      begin cmd_a_sclk = 0; cmd_a_sdata = w[b]; end
    repeat (HALF) @(negedge clk);
    if (port) cmd_b_sclk = 1; else cmd_a_sclk = 1;
    repeat (HALF) @(negedge clk);
  end
endtask

// a whole command: header, fields, checksum; the gate then closes
task automatic command(bit port, logic [6:0] op, logic [15:0] f[], bit corrupt = 0);
  logic [15:0] h, s;
  h = {1'b1, op, 1'b0, 7'(f.size())};
  s = h;
  cmd_word(port, h);
  foreach (f[i]) begin cmd_word(port, f[i]); s += f[i]; end
  cmd_word(port, corrupt ? ~s : s);
  repeat (HALF) @(negedge clk);
  if (port) cmd_b_sgate = 0; else cmd_a_sgate = 0;
  repeat (4 * HALF) @(negedge clk);
endtask

// 32-bit data words on data input A or B
task automatic data_in(bit port, logic [31:0] w[]);
  if (port) din_b_sgate = 1; else din_a_sgate = 1;
  repeat (HALF) @(negedge clk);
  foreach (w[i]) begin
    for (int b = 31; b >= 0; b--) begin
      if (port) begin din_b_sclk = 0; din_b_sdata = w[i][b]; end
      else      begin din_a_sclk = 0; din_a_sdata = w[i][b]; end
      repeat (HALF) @(negedge clk);
      if (port) din_b_sclk = 1; else din_a_sclk = 1;
      repeat (HALF) @(negedge clk);
    end
  end
  repeat (HALF) @(negedge clk);
  if (port) din_b_sgate = 0; else din_a_sgate = 0;
  repeat (4 * HALF) @(negedge clk);
endtask

// clock n 32-bit words out of data output A or B
task automatic data_out(bit port, int n, output logic [31:0] w[$]);
  w = {};
  if (port) dout_b_sgate = 1; else dout_a_sgate = 1;
  repeat (HALF) @(negedge clk);
  for (int i = 0; i < n; i++) begin
    logic [31:0] v;
    for (int b = 31; b >= 0; b--) begin
      if (port) dout_b_sclk = 0; else dout_a_sclk = 0;
      repeat (HALF) @(negedge clk);
      if (port) dout_b_sclk = 1; else dout_a_sclk = 1;
      v[b] = port ? dout_b_sdata : dout_a_sdata;
      repeat (HALF) @(negedge clk);
    end
    w.push_back(v);
  end
  if (port) dout_b_sgate = 0; else dout_a_sgate = 0;
  repeat (4 * HALF) @(negedge clk);
endtask

// clock n telemetry bytes out of telemetry output A or B
task automatic tlm_frame(bit port, int n, output logic [7:0] fr[$]);
  fr = {};
  if (port) tlm_b_sgate = 1; else tlm_a_sgate = 1;
  repeat (HALF) @(negedge clk);
  for (int i = 0; i < n; i++) begin
    logic [7:0] v;
    for (int b = 7; b >= 0; b--) begin
      if (port) tlm_b_sclk = 0; else tlm_a_sclk = 0;
      repeat (HALF) @(negedge clk);
      if (port) tlm_b_sclk = 1; else tlm_a_sclk = 1;
      v[b] = port ? tlm_b_sdata : tlm_a_sdata;
      repeat (HALF) @(negedge clk);
    end
    fr.push_back(v);
  end
  if (port) tlm_b_sgate = 0; else tlm_a_sgate = 0;
  repeat (4 * HALF) @(negedge clk);
endtask
