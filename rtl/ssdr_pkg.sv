// ssdr_pkg: types and constants shared by the solid-state data recorder.
//
// The recorder stores 32-bit user words. The external EDAC splits each word
// into its even bits and its odd bits and protects each 16-bit half with a
// modified (SEC-DED) Hamming code of 22 bits, so one stored word is 44 bits
// wide: eleven 4-bit DRAMs side by side. The 32-of-44 ratio is what makes
// 44 DRAMs of 16 Mb hold 2^29 user bits per memory module.
//
// Opcodes: 48 commands (0x00..0x2F). Eight "record segment n", eight
// "random record segment n", eight "playback segment n" and eight "random
// playback segment n" commands carry the segment number in the opcode; the
// sixteen opcodes below 0x10 are housekeeping. The numbering is this design's
// own.
package ssdr_pkg;

  localparam int unsigned DATA_W     = 32;  // user word
  localparam int unsigned HALF_W     = 16;  // data bits per code word
  localparam int unsigned CW_W       = 22;  // 16 data + 5 Hamming + 1 overall parity
  localparam int unsigned WORD_W     = 44;  // stored word, two interleaved code words
  localparam int unsigned NUM_MOD_MAX = 2;  // memory modules per recorder
  localparam int unsigned MOD_AW_MAX = 24;  // word address bits inside one module
  localparam int unsigned NSEG       = 8;   // segments
  localparam int unsigned CMD_W      = 16;  // command word
  localparam int unsigned NUM_OPCODES = 48;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [WORD_W-1:0] word_t;

  typedef enum logic [1:0] {
    MODE_IDLE     = 2'd0,
    MODE_RECORD   = 2'd1,
    MODE_PLAYBACK = 2'd2,
    MODE_BIT      = 2'd3
  } mode_e;

  typedef enum logic [1:0] {
    BUS_NOP     = 2'd0,
    BUS_READ    = 2'd1,
    BUS_WRITE   = 2'd2,
    BUS_REFRESH = 2'd3
  } bus_op_e;

  // One cycle on the internal bus from the controller to the memory modules.
  typedef struct packed {
    bus_op_e                   op;
    logic [NUM_MOD_MAX-1:0]    cs;     // module select (refresh: all)
    logic [MOD_AW_MAX-1:0]     addr;   // word address inside the module
    word_t                     wdata;
  } bus_req_t;

  // Housekeeping opcodes
  localparam logic [6:0] OP_NOP          = 7'h00;
  localparam logic [6:0] OP_IDLE         = 7'h01;
  localparam logic [6:0] OP_BIT          = 7'h02;
  localparam logic [6:0] OP_RESET        = 7'h03;
  localparam logic [6:0] OP_SCRUB_RATE   = 7'h04; // f0[2:0]: 0 off, 1..7
  localparam logic [6:0] OP_REFRESH_RATE = 7'h05; // f0[2:0]
  localparam logic [6:0] OP_PORTS        = 7'h06; // f0[0] tlm, [1] data, [2] bus
  localparam logic [6:0] OP_DEFINE_SEG   = 7'h07; // f0 seg, f1:f2 start, f3:f4 end
  localparam logic [6:0] OP_MAP_WRITE    = 7'h08; // f0 logical block, f1 physical block
  localparam logic [6:0] OP_MAP_SIZE     = 7'h09; // f0 blocks in service
  localparam logic [6:0] OP_CLEAR_ERRLOG = 7'h0A;
  localparam logic [6:0] OP_TLM_PAGE     = 7'h0B; // f0 page, f1 first map block
  // Segment commands: base + segment number
  localparam logic [6:0] OP_REC_SEG      = 7'h10;
  localparam logic [6:0] OP_REC_RAND     = 7'h18; // f0:f1 word address
  localparam logic [6:0] OP_PB_SEG       = 7'h20;
  localparam logic [6:0] OP_PB_RAND      = 7'h28; // f0:f1 word address

  // A decoded command as handed from the command decoder to the controller.
  localparam int unsigned MAX_FIELDS = 8;
  typedef struct packed {
    logic [6:0]                        opcode;
    logic [6:0]                        nfields;
    logic [MAX_FIELDS-1:0][CMD_W-1:0]  field;
  } command_t;

  // Status gathered for the telemetry frame.
  typedef struct packed {
    mode_e        mode;
    logic [2:0]   ports;
    logic [2:0]   scrub_rate;
    logic [2:0]   refresh_rate;
    logic [2:0]   rec_seg;
    logic [2:0]   pb_seg;
    logic         bit_done;
    logic         bit_pass;
    logic [15:0]  bit_errors;
    logic [15:0]  cmd_accepted;
    logic [15:0]  cmd_rejected;
    logic [6:0]   last_opcode;
    logic         last_ok;
    logic [15:0]  edac_corrected;
    logic [15:0]  edac_uncorrectable;
    logic [15:0]  overflow;
    logic [15:0]  scrub_passes;
    logic [15:0]  blocks_in_service;
    logic [4:0]   errlog_count;
    // EDAC report page
    logic [15:0]  edac_pair_corrected;   // both code words corrected at once
    logic [31:0]  last_corrected_pa;     // physical word of the last correction
    logic [15:0]  errlog_lost;
    logic [15:0]  refresh_missed;
    // page selection
    logic [1:0]   tlm_page;
    logic [15:0]  vote_upsets;           // upsets outvoted in a triplicated register
  } status_t;

endpackage
