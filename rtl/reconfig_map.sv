// reconfig_map: the memory reconfiguration tables.
//
// In-service table: the logical memory is a list of physical blocks of
// 2^BLK_W words. Logical block i lives in physical block map[i]; only the
// first `in_service` logical blocks are in use, so that by rewriting the
// table a damaged block can be taken out and the logical memory stays
// contiguous and error-free. After reset the map is the identity and every
// block is in service. Translation is combinational.
//
// The map and the in-service count are critical and held in three copies.
// Every read is a bitwise majority vote of the copies. The count is
// rewritten from its vote every cycle; the map is refreshed one entry per
// cycle by a walking index, so every entry is rewritten from its vote once
// every 2^(PA_W-BLK_W) cycles. `mismatch` pulses when the entry being
// refreshed, or the count, disagrees between copies.
//
// Error table: each uncorrectable error found by the scrubber is logged with
// its physical word address and which code words failed, up to ERR_DEPTH
// entries; later ones are only counted. Both tables are visible to telemetry:
// the error table as a whole, the map through a second read port.
//
// The document describes both tables, their use by command, and voting with
// periodic refresh for critical registers; the block size, table depth, the
// translation scheme and the refresh walk are this design's choices.
module reconfig_map #(
  parameter int unsigned PA_W      = 25,
  parameter int unsigned BLK_W     = 16,   // log2 words per block
  parameter int unsigned ERR_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // table commands
  input  logic            map_we,
  input  logic [PA_W-BLK_W-1:0] map_lblk,
  input  logic [PA_W-BLK_W-1:0] map_pblk,
  input  logic            size_we,
  input  logic [PA_W-BLK_W:0]   size_blocks,
  input  logic            log_clear,
  // translation
  input  logic [PA_W-1:0] la,
  output logic [PA_W-1:0] pa,
  output logic            la_ok,              // inside the in-service space
  output logic [PA_W-BLK_W:0] in_service,
  output logic            mismatch,           // an upset found by the refresh
  // table read-out for telemetry
  input  logic [PA_W-BLK_W-1:0] rd_lblk,   // logical block to read out
  output logic [PA_W-BLK_W-1:0] rd_pblk,   // its physical block
  // error logging
  input  logic            log_we,
  input  logic [PA_W-1:0] log_addr,
  output logic [ERR_DEPTH-1:0][PA_W-1:0] log_entry,
  output logic [$clog2(ERR_DEPTH+1)-1:0] log_count,
  output logic [15:0]     log_lost
);

  localparam int unsigned NB_W = PA_W - BLK_W;
  localparam int unsigned NBLK = 1 << NB_W;

  logic [NB_W-1:0] map0 [NBLK], map1 [NBLK], map2 [NBLK];
  logic [NB_W:0]   ins [3];
  logic [NB_W-1:0] ref_idx, ref_vote;

  function automatic logic [NB_W-1:0] vote(logic [NB_W-1:0] a, logic [NB_W-1:0] b,
                                           logic [NB_W-1:0] c);
    return (a & b) | (b & c) | (a & c);
  endfunction

  function automatic logic [NB_W-1:0] map_rd(logic [NB_W-1:0] i);
    return vote(map0[i], map1[i], map2[i]);
  endfunction

  assign in_service = (ins[0] & ins[1]) | (ins[1] & ins[2]) | (ins[0] & ins[2]);
  assign pa       = {map_rd(la[PA_W-1:BLK_W]), la[BLK_W-1:0]};
  assign la_ok    = {1'b0, la[PA_W-1:BLK_W]} < in_service;
  assign rd_pblk  = map_rd(rd_lblk);
  assign ref_vote = map_rd(ref_idx);
  assign mismatch = map0[ref_idx] != map1[ref_idx] || map1[ref_idx] != map2[ref_idx] ||
                    ins[0] != ins[1] || ins[1] != ins[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBLK; i++) begin
        map0[i] <= NB_W'(i); map1[i] <= NB_W'(i); map2[i] <= NB_W'(i);
      end
      for (int c = 0; c < 3; c++) ins[c] <= (NB_W+1)'(NBLK);
      ref_idx <= '0;
    end else begin
      // refresh one entry per cycle; a command write to the same entry wins
      ref_idx <= ref_idx + 1'b1;
      map0[ref_idx] <= ref_vote; map1[ref_idx] <= ref_vote; map2[ref_idx] <= ref_vote;
      if (map_we) begin
        map0[map_lblk] <= map_pblk; map1[map_lblk] <= map_pblk; map2[map_lblk] <= map_pblk;
      end
      for (int c = 0; c < 3; c++)
        ins[c] <= !size_we ? in_service :
                  (size_blocks > (NB_W+1)'(NBLK)) ? (NB_W+1)'(NBLK) : size_blocks;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      log_entry <= '0; log_count <= '0; log_lost <= '0;
    end else if (log_clear) begin
      log_entry <= '0; log_count <= '0; log_lost <= '0;
    end else if (log_we) begin
      if (log_count < $bits(log_count)'(ERR_DEPTH)) begin
        log_entry[log_count] <= log_addr;
        log_count <= log_count + 1'b1;
      end else if (log_lost != '1) begin
        log_lost <= log_lost + 1'b1;
      end
    end
  end

endmodule
