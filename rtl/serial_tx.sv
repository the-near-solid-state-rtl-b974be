// serial_tx: transmitter for one serial NRZ-L output (data out or telemetry).
//
// The receiving subsystem supplies the clock (sclk) and a gate (sgate); the
// recorder changes sdata after each falling edge of sclk so that the
// receiver can sample it at the next rising edge, most significant bit first.
// At the first falling edge of each word the next word is taken from the
// load interface (valid/ready); if none is waiting, a word of zeros is sent
// and `underrun` pulses. A low gate ends the transfer and drops the partial
// word.
//
// Timing: sclk high and low times of at least six system clocks; sdata
// changes three to four system clocks after the falling edge. The NRZ-L
// format is the document's; the handshake, bit order and fill word are this
// design's choices.
module serial_tx #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sclk,
  input  logic         sgate,
  output logic         sdata,
  input  logic [W-1:0] load_data,
  input  logic         load_valid,
  output logic         load_ready,   // one-cycle pulse: word taken
  output logic         underrun,
  output logic         active        // gate seen high (synchronised)
);

  logic [2:0] sclk_s;
  logic [1:0] gate_s;
  logic [W-1:0] shreg;
  logic [$clog2(W+1)-1:0] left;      // bits still to send of the current word
  logic fall;

  assign active = gate_s[1];
  assign fall = sclk_s[2] && !sclk_s[1] && gate_s[1];
  assign load_ready = fall && (left == '0) && load_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '1; gate_s <= '0; shreg <= '0; left <= '0;
      sdata <= 1'b0; underrun <= 1'b0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      gate_s <= {gate_s[0], sgate};
      underrun <= 1'b0;
      if (!gate_s[1]) begin
        left <= '0;
      end else if (fall) begin
        if (left == '0) begin
          shreg    <= load_valid ? (load_data << 1) : '0;
          sdata    <= load_valid ? load_data[W-1] : 1'b0;
          underrun <= !load_valid;
          left     <= $bits(left)'(W - 1);
        end else begin
          sdata <= shreg[W-1];
          shreg <= shreg << 1;
          left  <= left - 1'b1;
        end
      end
    end
  end

endmodule
