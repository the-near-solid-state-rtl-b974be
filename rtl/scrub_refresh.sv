// scrub_refresh: the DRAM scrub and refresh scheduler.
//
// Refresh: a request is raised every REFRESH_BASE << refresh_rate cycles and
// held until the memory controller acknowledges it; a request that is still
// pending when the next one falls due is counted in `refresh_missed`.
// Scrub: when scrub_rate is non-zero a request for the next physical word is
// raised every SCRUB_BASE << (scrub_rate - 1) cycles; the controller reads,
// corrects and writes the word back and acknowledges. The scrub address walks
// the whole physical array and wraps; each wrap counts one scrub pass.
// Rate 0 turns scrubbing off.
//
// The document says scrubbing reads, corrects and rewrites every location
// periodically at one of several commandable rates; the rate codes, base
// intervals and the request/acknowledge protocol are this design's choices.
module scrub_refresh #(
  parameter int unsigned PA_W         = 25,   // physical word address bits
  parameter int unsigned SCRUB_BASE   = 64,   // cycles between scrubs at rate 1
  parameter int unsigned REFRESH_BASE = 256   // cycles between refreshes at rate 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      scrub_rate,
  input  logic [2:0]      refresh_rate,
  output logic            scrub_req,
  output logic [PA_W-1:0] scrub_addr,
  input  logic            scrub_ack,
  output logic            refresh_req,
  input  logic            refresh_ack,
  output logic [15:0]     scrub_passes,
  output logic [15:0]     refresh_missed
);

  localparam int unsigned TW = 32;
  logic [TW-1:0] scrub_t, refresh_t;
  logic [TW-1:0] scrub_period, refresh_period;

  assign scrub_period   = TW'(SCRUB_BASE) << ((scrub_rate == 3'd0) ? 3'd0 : scrub_rate - 3'd1);
  assign refresh_period = TW'(REFRESH_BASE) << refresh_rate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scrub_t <= '0; refresh_t <= '0;
      scrub_req <= 1'b0; refresh_req <= 1'b0;
      scrub_addr <= '0; scrub_passes <= '0; refresh_missed <= '0;
    end else begin
      // refresh timer
      if (refresh_t + 1'b1 >= refresh_period) begin
        refresh_t <= '0;
        if (refresh_req && !refresh_ack) refresh_missed <= refresh_missed + 1'b1;
        refresh_req <= 1'b1;
      end else begin
        refresh_t <= refresh_t + 1'b1;
        if (refresh_ack) refresh_req <= 1'b0;
      end
      // scrub timer
      if (scrub_ack) begin
        scrub_req  <= 1'b0;
        scrub_addr <= scrub_addr + 1'b1;
        if (scrub_addr == '1) scrub_passes <= scrub_passes + 1'b1;
      end
      if (scrub_rate == 3'd0) begin
        scrub_t <= '0;
      end else if (scrub_t + 1'b1 >= scrub_period) begin
        scrub_t <= '0;
        if (!scrub_req || scrub_ack) scrub_req <= 1'b1;
      end else begin
        scrub_t <= scrub_t + 1'b1;
      end
    end
  end

endmodule
