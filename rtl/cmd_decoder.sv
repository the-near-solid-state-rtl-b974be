// cmd_decoder: parses the serial command stream into commands.
//
// A command is a run of 16-bit words. The header word holds a checksum flag
// (bit 15), the 7-bit opcode (bits 14:8) and the number of fields that
// follow, 0 to 127 (bits 6:0). After the fields comes, when the flag is set,
// a checksum word: the sum modulo 2^16 of the header and all fields. A
// command is accepted (cmd_valid pulse with the opcode and its first
// MAX_FIELDS fields) when the checksum matches and the opcode is one of the
// 48 defined; otherwise cmd_error pulses. `frame_abort` (the command gate falling)
// drops a partial command.
//
// Timing: cmd_valid one cycle after the last word. Words, opcode, 0..127
// fields and a usual checksum are the document's; the bit layout and the
// checksum rule are this design's choices.
module cmd_decoder
  import ssdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        word_valid,
  input  logic [15:0] word,
  input  logic        frame_abort,
  output command_t    cmd,
  output logic        cmd_valid,
  output logic        cmd_error,
  output logic [15:0] accepted,
  output logic [15:0] rejected
);

  typedef enum logic [1:0] {S_HDR, S_FIELD, S_SUM} state_e;
  state_e      state;
  logic        has_sum;
  logic [6:0]  left, idx;
  logic [15:0] sum;

  function automatic logic opcode_ok(logic [6:0] op);
    return op < 7'(NUM_OPCODES);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HDR; has_sum <= 1'b0; left <= '0; idx <= '0; sum <= '0;
      cmd <= '0; cmd_valid <= 1'b0; cmd_error <= 1'b0;
      accepted <= '0; rejected <= '0;
    end else begin
      logic done, good;
      done = 1'b0;
      good = 1'b0;
      cmd_valid <= 1'b0;
      cmd_error <= 1'b0;
      if (frame_abort) begin
        state <= S_HDR;
      end else if (word_valid) begin
        unique case (state)
          S_HDR: begin
            cmd.opcode  <= word[14:8];
            cmd.nfields <= word[6:0];
            cmd.field   <= '0;
            has_sum <= word[15];
            sum     <= word;
            left    <= word[6:0];
            idx     <= '0;
            if (word[6:0] != '0)  state <= S_FIELD;
            else if (word[15])    state <= S_SUM;
            else begin done = 1'b1; good = opcode_ok(word[14:8]); end
          end
          S_FIELD: begin
            if (idx < 7'(MAX_FIELDS)) cmd.field[idx[2:0]] <= word;
            idx  <= idx + 1'b1;
            sum  <= sum + word;
            left <= left - 1'b1;
            if (left == 7'd1) begin
              if (has_sum) state <= S_SUM;
              else begin state <= S_HDR; done = 1'b1; good = opcode_ok(cmd.opcode); end
            end
          end
          S_SUM: begin
            state <= S_HDR;
            done = 1'b1;
            good = (word == sum) && opcode_ok(cmd.opcode);
          end
          default: state <= S_HDR;
        endcase
        if (done) begin
          cmd_valid <= good;
          cmd_error <= !good;
          if (good) accepted <= accepted + 1'b1;
          else      rejected <= rejected + 1'b1;
        end
      end
    end
  end

endmodule
