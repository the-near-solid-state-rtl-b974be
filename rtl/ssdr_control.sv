// ssdr_control: the recorder's command executive. It carries out each
// accepted command and holds the critical configuration - operating mode,
// scrub and refresh rates, port and bus selection, record and playback
// segment - in one triplicated, majority-voted, periodically refreshed
// register (tmr_reg).
//
// Modes are idle, record, playback and built-in test. Record-segment and
// playback-segment commands (plain or random, the segment number in the
// opcode) select the segment and enter record or playback; the random forms
// first move the segment's write or read pointer to the address in fields
// 0 (high half) and 1 (low half). The test command starts the built-in test
// and returns to idle when it finishes. Playback returns to idle by itself
// when the segment has been played out (`playback_done`). Reset restores the
// default configuration and flushes the buffers; recorded data stay.
// Segment and table commands are passed to the segment table and the
// reconfiguration tables as one-cycle strobes. The telemetry page and map
// window (not critical) are plain registers.
//
// Timing: a command takes effect the cycle after cmd_valid. The four modes,
// the command classes and triplication come from the document; opcode
// numbers, field layouts and the default rates are this design's choices.
module ssdr_control
  import ssdr_pkg::*;
#(
  parameter int unsigned LA_W  = 25,
  parameter int unsigned NB_W  = 9,       // block number bits
  parameter logic [2:0]  DEFAULT_SCRUB_RATE   = 3'd3,
  parameter logic [2:0]  DEFAULT_REFRESH_RATE = 3'd0,
  parameter int unsigned TMR_REFRESH_PERIOD   = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  command_t        cmd,
  input  logic            cmd_valid,
  // configuration (voted)
  output mode_e           mode,
  output logic [2:0]      scrub_rate,
  output logic [2:0]      refresh_rate,
  output logic [2:0]      ports,          // [0] telemetry, [1] data, [2] bus: 0 = A
  output logic [2:0]      rec_seg,
  output logic [2:0]      pb_seg,
  output logic            cfg_mismatch,
  input  logic [2:0]      seu_upset,
  input  logic [16:0]     seu_mask,
  // segment table
  output logic            def_en,
  output logic [2:0]      def_seg,
  output logic [LA_W-1:0] def_start,
  output logic [LA_W:0]   def_limit,
  output logic            set_wp_en,
  output logic            set_rp_en,
  output logic [2:0]      set_seg,
  output logic [LA_W-1:0] set_addr,
  // reconfiguration tables
  output logic            map_we,
  output logic [NB_W-1:0] map_lblk,
  output logic [NB_W-1:0] map_pblk,
  output logic            size_we,
  output logic [NB_W:0]   size_blocks,
  output logic            log_clear,
  // others
  output logic            flush,
  output logic            bit_start,
  input  logic            bit_done,
  input  logic            playback_done,
  output logic [6:0]      last_opcode,
  output logic [1:0]      tlm_page,       // telemetry page
  output logic [NB_W-1:0] tlm_map_base    // first block of the map window
);

  typedef struct packed {
    mode_e      mode;
    logic [2:0] scrub_rate;
    logic [2:0] refresh_rate;
    logic [2:0] ports;
    logic [2:0] rec_seg;
    logic [2:0] pb_seg;
  } cfg_t;

  localparam cfg_t CFG_DEFAULT = '{mode: MODE_IDLE, scrub_rate: DEFAULT_SCRUB_RATE,
                                   refresh_rate: DEFAULT_REFRESH_RATE, ports: 3'd0,
                                   rec_seg: 3'd0, pb_seg: 3'd0};

  cfg_t cfg, cfg_next;
  logic cfg_we;

  tmr_reg #(.W($bits(cfg_t)), .RESET_VALUE(CFG_DEFAULT),
            .REFRESH_PERIOD(TMR_REFRESH_PERIOD)) u_cfg (
    .clk, .rst_n,
    .wr_en     (cfg_we),
    .wr_data   (cfg_next),
    .upset     (seu_upset),
    .upset_mask(seu_mask),
    .q         (cfg),
    .mismatch  (cfg_mismatch)
  );

  assign mode         = cfg.mode;
  assign scrub_rate   = cfg.scrub_rate;
  assign refresh_rate = cfg.refresh_rate;
  assign ports        = cfg.ports;
  assign rec_seg      = cfg.rec_seg;
  assign pb_seg       = cfg.pb_seg;

  logic [31:0] addr01, addr12, addr34;
  assign addr01 = {cmd.field[0], cmd.field[1]};
  assign addr12 = {cmd.field[1], cmd.field[2]};
  assign addr34 = {cmd.field[3], cmd.field[4]};

  // next configuration and strobes
  always_comb begin
    cfg_next = cfg;
    cfg_we   = 1'b0;
    def_en = 1'b0; def_seg = cmd.field[0][2:0];
    def_start = LA_W'(addr12); def_limit = (LA_W+1)'(addr34);
    set_wp_en = 1'b0; set_rp_en = 1'b0;
    set_seg = cmd.opcode[2:0]; set_addr = LA_W'(addr01);
    map_we = 1'b0; map_lblk = NB_W'(cmd.field[0]); map_pblk = NB_W'(cmd.field[1]);
    size_we = 1'b0; size_blocks = (NB_W+1)'(cmd.field[0]);
    log_clear = 1'b0; flush = 1'b0; bit_start = 1'b0;
    if (cmd_valid) begin
      cfg_we = 1'b1;
      if (cmd.opcode >= OP_PB_RAND) begin
        set_rp_en = 1'b1;
        cfg_next.pb_seg = cmd.opcode[2:0]; cfg_next.mode = MODE_PLAYBACK;
      end else if (cmd.opcode >= OP_PB_SEG) begin
        cfg_next.pb_seg = cmd.opcode[2:0]; cfg_next.mode = MODE_PLAYBACK;
      end else if (cmd.opcode >= OP_REC_RAND) begin
        set_wp_en = 1'b1;
        cfg_next.rec_seg = cmd.opcode[2:0]; cfg_next.mode = MODE_RECORD;
      end else if (cmd.opcode >= OP_REC_SEG) begin
        cfg_next.rec_seg = cmd.opcode[2:0]; cfg_next.mode = MODE_RECORD;
      end else begin
        unique case (cmd.opcode)
          OP_IDLE:         cfg_next.mode = MODE_IDLE;
          OP_BIT:          begin cfg_next.mode = MODE_BIT; bit_start = 1'b1; end
          OP_RESET:        begin cfg_next = CFG_DEFAULT; flush = 1'b1; end
          OP_SCRUB_RATE:   cfg_next.scrub_rate   = cmd.field[0][2:0];
          OP_REFRESH_RATE: cfg_next.refresh_rate = cmd.field[0][2:0];
          OP_PORTS:        cfg_next.ports        = cmd.field[0][2:0];
          OP_DEFINE_SEG:   def_en  = 1'b1;
          OP_MAP_WRITE:    map_we  = 1'b1;
          OP_MAP_SIZE:     size_we = 1'b1;
          OP_CLEAR_ERRLOG: log_clear = 1'b1;
          OP_TLM_PAGE:     cfg_we = 1'b0;   // telemetry page, below
          default:         cfg_we = 1'b0;   // no operation
        endcase
      end
      // a test or reset in progress is not interrupted by segment commands
      if (cfg.mode == MODE_BIT && cmd.opcode != OP_RESET) begin
        cfg_we = 1'b0; bit_start = 1'b0;
        set_wp_en = 1'b0; set_rp_en = 1'b0;
      end
    end else if (cfg.mode == MODE_BIT && bit_done) begin
      cfg_we = 1'b1; cfg_next.mode = MODE_IDLE;
    end else if (cfg.mode == MODE_PLAYBACK && playback_done) begin
      cfg_we = 1'b1; cfg_next.mode = MODE_IDLE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_opcode <= '0; tlm_page <= '0; tlm_map_base <= '0;
    end else if (cmd_valid) begin
      last_opcode <= cmd.opcode;
      if (cmd.opcode == OP_TLM_PAGE) begin
        tlm_page     <= cmd.field[0][1:0];
        tlm_map_base <= NB_W'(cmd.field[1]);
      end else if (cmd.opcode == OP_RESET) begin
        tlm_page <= '0;
      end
    end
  end

endmodule
