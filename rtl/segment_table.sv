// segment_table: the partition of the recorder's logical memory into up to
// NSEG segments, each with a record (write) pointer and a playback (read)
// pointer.
//
// A segment spans logical word addresses [start, limit). Defining a segment
// sets its bounds and empties it (both pointers to start). A random record or
// random playback command moves the write or read pointer to a given address
// (clamped to the segment). The record side writes at wr_addr of segment
// wr_seg and advances with wr_adv; `full` says the write pointer has reached
// the limit. The playback side reads at rd_addr of rd_seg and advances with
// rd_adv; `empty` says the read pointer has caught up with the write pointer.
// After reset segment 0 spans the whole logical space and the others are
// empty.
//
// The table is critical state and is kept in three copies. Every output and
// every update uses the bitwise majority of the copies, and all three copies
// are rewritten from the updated majority each cycle, so an upset in one copy
// lasts at most one cycle and never shows at the outputs. The three copies
// are written alike, so a synthesis flow merges them unless told to preserve
// them (a tool-specific setting, not part of this RTL). Timing: pointer
// moves and definitions take effect one cycle after the strobe.
//
// The document gives eight or fewer segments, sequential and random access,
// read/write pointers in telemetry, and triplication with refresh for
// critical registers; bounds-by-command, the clamping and the per-cycle
// refresh are this design's choices.
module segment_table
  import ssdr_pkg::*;
#(
  parameter int unsigned LA_W = 25
) (
  input  logic            clk,
  input  logic            rst_n,
  // commands
  input  logic            def_en,
  input  logic [2:0]      def_seg,
  input  logic [LA_W-1:0] def_start,
  input  logic [LA_W:0]   def_limit,
  input  logic            set_wp_en,
  input  logic            set_rp_en,
  input  logic [2:0]      set_seg,
  input  logic [LA_W-1:0] set_addr,
  // record side
  input  logic [2:0]      wr_seg,
  output logic [LA_W-1:0] wr_addr,
  output logic            full,
  input  logic            wr_adv,
  // playback side
  input  logic [2:0]      rd_seg,
  output logic [LA_W-1:0] rd_addr,
  output logic            empty,
  input  logic            rd_adv,
  // state, for telemetry
  output logic [NSEG-1:0][LA_W:0] seg_start,
  output logic [NSEG-1:0][LA_W:0] seg_limit,
  output logic [NSEG-1:0][LA_W:0] seg_wp,
  output logic [NSEG-1:0][LA_W:0] seg_rp,
  output logic            mismatch       // the three copies differ
);

  // the whole table, held in three copies
  typedef struct packed {
    logic [NSEG-1:0][LA_W:0] start, limit, wp, rp;
  } table_t;

  table_t cp [3];
  table_t v, nxt;

  assign v = (cp[0] & cp[1]) | (cp[1] & cp[2]) | (cp[0] & cp[2]);   // bitwise vote
  assign seg_start = v.start;
  assign seg_limit = v.limit;
  assign seg_wp    = v.wp;
  assign seg_rp    = v.rp;
  assign mismatch  = (cp[0] != cp[1]) || (cp[1] != cp[2]);

  assign wr_addr = v.wp[wr_seg][LA_W-1:0];
  assign rd_addr = v.rp[rd_seg][LA_W-1:0];
  assign full    = v.wp[wr_seg] >= v.limit[wr_seg];
  assign empty   = v.rp[rd_seg] >= v.wp[rd_seg];

  function automatic logic [LA_W:0] clamp(logic [LA_W:0] a, logic [LA_W:0] lo, logic [LA_W:0] hi);
    return (a < lo) ? lo : (a > hi) ? hi : a;
  endfunction

  always_comb begin
    nxt = v;
    if (wr_adv && !full)  nxt.wp[wr_seg] = v.wp[wr_seg] + 1'b1;
    if (rd_adv && !empty) nxt.rp[rd_seg] = v.rp[rd_seg] + 1'b1;
    if (set_wp_en)
      nxt.wp[set_seg] = clamp({1'b0, set_addr}, v.start[set_seg], v.limit[set_seg]);
    if (set_rp_en)
      nxt.rp[set_seg] = clamp({1'b0, set_addr}, v.start[set_seg], v.wp[set_seg]);
    if (def_en) begin
      nxt.start[def_seg] = {1'b0, def_start};
      nxt.limit[def_seg] = (def_limit < {1'b0, def_start}) ? {1'b0, def_start} : def_limit;
      nxt.wp[def_seg]    = {1'b0, def_start};
      nxt.rp[def_seg]    = {1'b0, def_start};
    end
  end

  // every copy is rewritten from the voted value each cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 3; c++) begin
        cp[c] <= '0;
        cp[c].limit[0] <= (LA_W+1)'(1) << LA_W;
      end
    end else begin
      for (int c = 0; c < 3; c++) cp[c] <= nxt;
    end
  end

endmodule
