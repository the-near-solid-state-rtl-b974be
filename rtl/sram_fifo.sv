// sram_fifo: the SRAM buffer between a serial port and the DRAM bus.
//
// A first-in first-out queue of DEPTH words kept in a memory array (an SRAM
// in the original) with write and read pointers. `push` when not full stores
// wdata; `pop` when not empty drops the head word, which is always visible on
// `rdata` (show-ahead). A push into a full buffer is refused and counted in
// `dropped` by the caller through `overflow`, which pulses.
//
// Timing: a pushed word is visible at the head one cycle later. The document
// says only that incoming data are latched into SRAM buffers; the queue
// discipline and depth are this design's choices.
module sram_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic         overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign empty = (count == '0);
  assign full  = (count == $bits(count)'(DEPTH));
  assign rdata = mem[rp];

  function automatic logic [AW-1:0] next(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else if (flush) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      logic do_push, do_pop;
      do_push  = push && !full;
      do_pop   = pop && !empty;
      overflow <= push && full;
      if (do_push) wp <= next(wp);
      if (do_pop)  rp <= next(rp);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

endmodule
