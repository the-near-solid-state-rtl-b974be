// telemetry_fmt: builds the recorder's status frame, TLM_BYTES bytes long,
// and feeds it byte by byte to the telemetry transmitter. Bytes 0-23 are the
// same in every frame; the rest depends on the page chosen by command
// (status.tlm_page): 0 the default status, 1 the EDAC report, 2 a window of
// the reconfiguration map.
//
// `frame_start` (the telemetry gate opening) rewinds to byte 0 and counts a
// frame; each `byte_ready` moves to the next byte; after the last byte
// `byte_valid` drops and the transmitter sends fill. Byte layout (multi-byte
// values most significant byte first):
//   0-1   sync 0xEB 0x90          2     frame count
//   3     mode[7:6] ports[5:3] bit_done[1] bit_pass[0]
//   4     scrub_rate[6:4] refresh_rate[2:0]
//   5     record segment[6:4] playback segment[2:0]
//   6-7   commands accepted       8-9   commands rejected
//   10    last opcode[6:0], bit 7 set if it was accepted
//   11-12 EDAC words corrected    13-14 EDAC words uncorrectable
//   15-16 record overflows        17-18 scrub passes
//   19-20 blocks in service       21-22 built-in test errors
//   23    page[7:6], error-table entries[4:0]
// page 0 (default status):
//   24-151  per segment s (16 bytes at 24+16s): start, limit, write and read
//           pointer, 4 bytes each
// page 1 (EDAC report):
//   24-25 pair corrections (both code words at once: DRAM latch upsets)
//   26-29 physical word of the latest correction
//   30-31 uncorrectable errors not logged (table full)
//   32-33 refreshes missed
//   34-35 upsets outvoted in the triplicated registers
// page 2 (map window): 24-279: for k = 0..127 the physical block of logical
//   block map_base + k, 2 bytes each, read through map_idx/map_val
// pages 0 and 1:
//   152-215 error table: 16 physical word addresses, 4 bytes each
// all other bytes are zero.
// The document lists the contents (mode, pointers, segment configuration,
// command validity and history, scrub and refresh rates, test results, EDAC
// reports) and a size of more than 540 bytes; the layout is this design's.
module telemetry_fmt
  import ssdr_pkg::*;
#(
  parameter int unsigned TLM_BYTES = 540,
  parameter int unsigned LA_W      = 25,
  parameter int unsigned PA_W      = 25,
  parameter int unsigned ERR_DEPTH = 16,
  parameter int unsigned NB_W      = 9      // map block number bits
) (
  input  logic       clk,
  input  logic       rst_n,
  input  status_t    status,
  input  logic [NSEG-1:0][LA_W:0] seg_start,
  input  logic [NSEG-1:0][LA_W:0] seg_limit,
  input  logic [NSEG-1:0][LA_W:0] seg_wp,
  input  logic [NSEG-1:0][LA_W:0] seg_rp,
  input  logic [ERR_DEPTH-1:0][PA_W-1:0] errlog,
  input  logic [NB_W-1:0] map_base,     // first logical block of the map window
  output logic [NB_W-1:0] map_idx,      // logical block being sent
  input  logic [NB_W-1:0] map_val,      // its physical block
  input  logic       frame_start,
  input  logic       byte_ready,
  output logic [7:0] byte_data,
  output logic       byte_valid,
  output logic [7:0] frames
);

  logic [$clog2(TLM_BYTES+1)-1:0] idx;

  assign byte_valid = idx < $bits(idx)'(TLM_BYTES);

  function automatic logic [7:0] byte_of32(logic [31:0] v, int unsigned k);
    return v[8*(3-k) +: 8];
  endfunction

  always_comb begin
    int unsigned i;
    i = 32'(idx);
    byte_data = 8'h00;
    if (i < 24) begin
      unique case (i)
        0:  byte_data = 8'hEB;
        1:  byte_data = 8'h90;
        2:  byte_data = frames;
        3:  byte_data = {status.mode, status.ports, 1'b0, status.bit_done, status.bit_pass};
        4:  byte_data = {1'b0, status.scrub_rate, 1'b0, status.refresh_rate};
        5:  byte_data = {1'b0, status.rec_seg, 1'b0, status.pb_seg};
        6:  byte_data = status.cmd_accepted[15:8];
        7:  byte_data = status.cmd_accepted[7:0];
        8:  byte_data = status.cmd_rejected[15:8];
        9:  byte_data = status.cmd_rejected[7:0];
        10: byte_data = {status.last_ok, status.last_opcode};
        11: byte_data = status.edac_corrected[15:8];
        12: byte_data = status.edac_corrected[7:0];
        13: byte_data = status.edac_uncorrectable[15:8];
        14: byte_data = status.edac_uncorrectable[7:0];
        15: byte_data = status.overflow[15:8];
        16: byte_data = status.overflow[7:0];
        17: byte_data = status.scrub_passes[15:8];
        18: byte_data = status.scrub_passes[7:0];
        19: byte_data = status.blocks_in_service[15:8];
        20: byte_data = status.blocks_in_service[7:0];
        21: byte_data = status.bit_errors[15:8];
        22: byte_data = status.bit_errors[7:0];
        default: byte_data = {status.tlm_page, 1'b0, status.errlog_count};
      endcase
    end else if (status.tlm_page == 2'd2) begin
      if (i < 24 + 2 * 128) byte_data = ((i - 24) % 2 == 0) ? 8'(16'(map_val) >> 8) : 8'(map_val);
    end else if (status.tlm_page == 2'd1 && i < 36) begin
      unique case (i)
        24: byte_data = status.edac_pair_corrected[15:8];
        25: byte_data = status.edac_pair_corrected[7:0];
        26, 27, 28, 29: byte_data = byte_of32(status.last_corrected_pa, i - 26);
        30: byte_data = status.errlog_lost[15:8];
        31: byte_data = status.errlog_lost[7:0];
        32: byte_data = status.refresh_missed[15:8];
        33: byte_data = status.refresh_missed[7:0];
        34: byte_data = status.vote_upsets[15:8];
        default: byte_data = status.vote_upsets[7:0];
      endcase
    end else if (status.tlm_page == 2'd0 && i < 24 + 16 * NSEG) begin
      int unsigned s, f, k;
      logic [31:0] v;
      s = (i - 24) / 16;
      f = ((i - 24) % 16) / 4;
      k = (i - 24) % 4;
      unique case (f)
        0:       v = 32'(seg_start[s]);
        1:       v = 32'(seg_limit[s]);
        2:       v = 32'(seg_wp[s]);
        default: v = 32'(seg_rp[s]);
      endcase
      byte_data = byte_of32(v, k);
    end else if (status.tlm_page != 2'd3 && i >= 24 + 16 * NSEG && i < 24 + 16 * NSEG + 4 * ERR_DEPTH) begin
      int unsigned e;
      e = (i - 24 - 16 * NSEG) / 4;
      byte_data = byte_of32(32'(errlog[e]), (i - 24 - 16 * NSEG) % 4);
    end
  end

  assign map_idx = map_base + NB_W'((32'(idx) - 24) / 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx    <= $bits(idx)'(TLM_BYTES);
      frames <= '0;
    end else if (frame_start) begin
      idx    <= '0;
      frames <= frames + 1'b1;
    end else if (byte_ready && byte_valid) begin
      idx <= idx + 1'b1;
    end
  end

endmodule
