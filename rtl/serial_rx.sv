// serial_rx: receiver for one serial NRZ-L input (a command or data line).
//
// The spacecraft supplies a clock (sclk), the data line (sdata) and a gate
// (sgate) that is high while a transfer is in progress. All three are brought
// into the system clock domain through two flip-flops. Data are sampled at
// each rising edge of sclk while the gate is high, most significant bit
// first; after W bits the word is presented on `word` with a one-cycle
// `word_valid` pulse. A falling gate discards any partial word.
//
// Timing: sclk idles high and must stay high and low for at least four system clocks each;
// `word_valid` comes three to four system clocks after the last rising edge.
// The document gives the NRZ-L format; the clock/gate lines and bit order are
// this design's choices.
module serial_rx #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sclk,
  input  logic         sdata,
  input  logic         sgate,
  output logic [W-1:0] word,
  output logic         word_valid,
  output logic         active        // gate seen high (synchronised)
);

  logic [2:0] sclk_s;
  logic [1:0] data_s, gate_s;
  logic [W-1:0] shreg;
  logic [$clog2(W+1)-1:0] nbits;

  assign active = gate_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '1; data_s <= '0; gate_s <= '0;
      shreg <= '0; nbits <= '0; word <= '0; word_valid <= 1'b0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      data_s <= {data_s[0], sdata};
      gate_s <= {gate_s[0], sgate};
      word_valid <= 1'b0;
      if (!gate_s[1]) begin
        nbits <= '0;
      end else if (sclk_s[1] && !sclk_s[2]) begin
        if (nbits == $bits(nbits)'(W - 1)) begin
          word       <= {shreg[W-2:0], data_s[1]};
          word_valid <= 1'b1;
          nbits      <= '0;
        end else begin
          nbits <= nbits + 1'b1;
        end
        shreg <= {shreg[W-2:0], data_s[1]};
      end
    end
  end

endmodule
