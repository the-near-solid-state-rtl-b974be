// tmr_reg: a critical register held in three copies with a bitwise majority
// vote on the output, so that an upset in any one copy is outvoted.
//
// Every copy is loaded together when wr_en is high. In addition, every
// REFRESH_PERIOD cycles all three copies are rewritten with the voted value,
// which removes an upset before a second one can land in another copy.
// The `upset` input flips the bit pattern `upset_mask` into the chosen copies;
// it models a single-event upset so that the voting can be exercised, and is
// tied to zero in normal use.
//
// Timing: the voted output follows a write one cycle later. Triplication,
// voting and periodic refresh follow the document; the refresh period is
// this design's choice.
module tmr_reg #(
  parameter int unsigned W              = 8,
  parameter logic [W-1:0] RESET_VALUE   = '0,
  parameter int unsigned REFRESH_PERIOD = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic [2:0]   upset,        // copies to corrupt (test and fault injection)
  input  logic [W-1:0] upset_mask,
  output logic [W-1:0] q,            // voted value
  output logic         mismatch      // copies currently disagree
);

  logic [2:0][W-1:0] copy;
  logic [$clog2(REFRESH_PERIOD+1)-1:0] tick;
  logic refresh;

  assign q = (copy[0] & copy[1]) | (copy[1] & copy[2]) | (copy[0] & copy[2]);
  assign mismatch = (copy[0] != copy[1]) || (copy[1] != copy[2]);
  assign refresh = (tick == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copy <= {3{RESET_VALUE}};
      tick <= '0;
    end else begin
      tick <= (tick == $bits(tick)'(REFRESH_PERIOD - 1)) ? '0 : tick + 1'b1;
      for (int c = 0; c < 3; c++) begin
        if (wr_en)          copy[c] <= wr_data;
        else if (refresh)   copy[c] <= q;
        else if (upset[c])  copy[c] <= copy[c] ^ upset_mask;
      end
    end
  end

endmodule
