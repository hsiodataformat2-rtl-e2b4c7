// ocb_command: opcode block for COMMAND (0x0030) and RESET_OCB (0x00F0).
//
// COMMAND carries one or two 16-bit masks. Each set bit of word 0 becomes a
// one-cycle pulse on cmd_pulse (bit 0 L1 trigger, 1 BCR, 2 ECR, 5 BCID
// reset, 6 L1ID reset, 8 trigger-burst start, 12 sequencer go, 13 sequencer
// reset, 14 RAWCOM pattern playback, 15 TWOWIRE playback). Each set bit of
// the optional word 1 becomes a one-cycle pulse on rst_pulse (bit 0
// readout, 1 trigger, 2 opcode blocks, 3 front-end outputs, 4 display,
// 5 network TX, 6 network RX). RESET_OCB pulses rst_pulse bit 2 whatever
// its payload. A pulse is issued in the cycle after its word is accepted.
// Both opcodes are answered with a one-word reply, 0xACAC.
// The bit meanings follow the protocol; the 0xACAC reply to these two
// opcodes is this design's choice.
module ocb_command
  import hsio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] pkt_seq,
  input  logic        op_valid,
  output logic        op_ready,
  input  logic        op_hdr,
  input  logic        op_last,
  input  logic [15:0] op_data,
  input  logic [15:0] op_id,
  input  logic [15:0] op_seq,
  input  logic        op_timeout,
  output logic        rep_valid,
  input  logic        rep_ready,
  output word_t       rep,
  output logic [15:0] cmd_pulse,
  output logic [6:0]  rst_pulse
);

  typedef enum logic [1:0] {S_IDLE, S_RX, S_START, S_REPLY} state_e;
  state_e      state;
  logic [15:0] cur_seq, cur_id, wi, idx;
  logic        rg_busy;

  wire logic is_mine = op_id == OP_COMMAND || op_id == OP_RESET_OCB;
  wire logic take    = op_valid && op_ready;

  always_comb op_ready = (state == S_RX) || (state == S_IDLE && op_hdr && is_mine && !op_timeout);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_seq   <= '0;
      cur_id    <= '0;
      wi        <= '0;
      cmd_pulse <= '0;
      rst_pulse <= '0;
    end else begin
      cmd_pulse <= '0;
      rst_pulse <= '0;
      unique case (state)
        S_IDLE: if (take) begin
          cur_seq <= op_seq;
          cur_id  <= op_id;
          wi      <= '0;
          if (op_id == OP_RESET_OCB) rst_pulse[2] <= 1'b1;
          state   <= op_last ? S_START : S_RX;
        end
        S_RX: if (take) begin
          wi <= wi + 1'b1;
          if (cur_id == OP_COMMAND) begin
            if (wi == 16'd0) cmd_pulse <= op_data;
            if (wi == 16'd1) rst_pulse <= op_data[6:0];
          end
          if (op_last) state <= S_START;
        end
        S_START: state <= S_REPLY;
        S_REPLY: if (!rg_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  ocb_reply u_reply (
    .clk, .rst_n,
    .start  (state == S_START),
    .pkt_seq,
    .id     (cur_id),
    .seq    (cur_seq),
    .nwords (16'd1),
    .busy   (rg_busy),
    .idx,
    .pay    (ACK_WORD),
    .rep_valid, .rep_ready, .rep
  );

endmodule
