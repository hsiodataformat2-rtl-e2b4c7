// ocb_stream: opcode block for the per-stream opcodes.
//
//   STRM_CONF_WR   (0x0050) bit mask, then (stream id, data) pairs
//   STRM_REQ_STATS (0x0051) 9 stream-mask words (streams 0..143)
//   BSTRM_CONF_WR  (0x0052) 9 stream-mask words, bit mask, data
//   STRM_COMMAND   (0x005c) (stream id, command mask) pairs
//   BSTRM_COMMAND  (0x005e) 9 stream-mask words, command mask
// A config write reaches the selected streams as one cycle of cfg_we with
// cfg_sel (one bit per stream), cfg_mask and cfg_data; each stream then
// replaces the config bits selected by cfg_mask. A command reaches them as
// one cycle of cmd_we with cmd_sel and cmd_data. A status request raises
// stat_req for one cycle for every masked stream once the whole mask has
// arrived; each such stream then sends its own status packet. Every one of
// these opcodes is answered with the one-word reply 0xACAC.
// The write happens in the cycle after the word that completes it is taken.
// Payload layouts, stream masks and the 0xACAC reply follow the protocol.
// Where the protocol gives BSTRM_CONF_WR both with and without the bit-mask
// word, both are accepted: with 10 payload words word 9 is the data and
// all bits are written, with 11 words word 9 is the bit mask and word 10
// the data.
module ocb_stream
  import hsio_pkg::*;
#(
  parameter int unsigned N_STREAMS = 144
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [15:0]          pkt_seq,
  input  logic                 op_valid,
  output logic                 op_ready,
  input  logic                 op_hdr,
  input  logic                 op_last,
  input  logic [15:0]          op_data,
  input  logic [15:0]          op_id,
  input  logic [15:0]          op_seq,
  input  logic                 op_timeout,
  output logic                 rep_valid,
  input  logic                 rep_ready,
  output word_t                rep,
  output logic                 cfg_we,
  output logic [N_STREAMS-1:0] cfg_sel,
  output logic [15:0]          cfg_mask,
  output logic [15:0]          cfg_data,
  output logic                 cmd_we,
  output logic [N_STREAMS-1:0] cmd_sel,
  output logic [15:0]          cmd_data,
  output logic [N_STREAMS-1:0] stat_req
);

  localparam int MW = N_MASK_WORDS * 16;

  typedef enum logic [1:0] {S_IDLE, S_RX, S_START, S_REPLY} state_e;
  state_e      state;
  logic [15:0] cur_seq, cur_id, wi, idx, bitmask, sid;
  logic [MW-1:0] smask;
  logic        rg_busy;

  wire logic is_mine = op_id == OP_STRM_CONF_WR || op_id == OP_STRM_REQ_STATS ||
                       op_id == OP_BSTRM_CONF_WR || op_id == OP_STRM_COMMAND ||
                       op_id == OP_BSTRM_COMMAND;
  wire logic take    = op_valid && op_ready;

  always_comb op_ready = (state == S_RX) || (state == S_IDLE && op_hdr && is_mine && !op_timeout);

  function automatic logic [N_STREAMS-1:0] onehot(input logic [15:0] id);
    logic [N_STREAMS-1:0] v;
    v = '0;
    if (id < 16'(N_STREAMS)) v[id] = 1'b1;
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur_seq  <= '0;
      cur_id   <= '0;
      wi       <= '0;
      bitmask  <= '0;
      sid      <= '0;
      smask    <= '0;
      cfg_we   <= 1'b0;
      cfg_sel  <= '0;
      cfg_mask <= '0;
      cfg_data <= '0;
      cmd_we   <= 1'b0;
      cmd_sel  <= '0;
      cmd_data <= '0;
      stat_req <= '0;
    end else begin
      cfg_we   <= 1'b0;
      cmd_we   <= 1'b0;
      stat_req <= '0;
      unique case (state)
        S_IDLE: if (take) begin
          cur_seq <= op_seq;
          cur_id  <= op_id;
          wi      <= '0;
          smask   <= '0;
          state   <= op_last ? S_START : S_RX;
        end
        S_RX: if (take) begin
          wi <= wi + 1'b1;
          if (wi < 16'(N_MASK_WORDS)) smask[wi*16 +: 16] <= op_data;
          unique case (cur_id)
            OP_STRM_CONF_WR: begin
              if (wi == 16'd0) bitmask <= op_data;
              else if (wi[0]) sid <= op_data;
              else begin
                cfg_we   <= 1'b1;
                cfg_sel  <= onehot(sid);
                cfg_mask <= bitmask;
                cfg_data <= op_data;
              end
            end
            OP_STRM_COMMAND: begin
              if (!wi[0]) sid <= op_data;
              else begin
                cmd_we   <= 1'b1;
                cmd_sel  <= onehot(sid);
                cmd_data <= op_data;
              end
            end
            OP_BSTRM_CONF_WR: begin
              if (wi == 16'(N_MASK_WORDS)) begin
                bitmask <= op_data;
                if (op_last) begin
                  cfg_we   <= 1'b1;
                  cfg_sel  <= smask[N_STREAMS-1:0];
                  cfg_mask <= 16'hffff;
                  cfg_data <= op_data;
                end
              end else if (wi == 16'(N_MASK_WORDS + 1)) begin
                cfg_we   <= 1'b1;
                cfg_sel  <= smask[N_STREAMS-1:0];
                cfg_mask <= bitmask;
                cfg_data <= op_data;
              end
            end
            OP_BSTRM_COMMAND: begin
              if (wi == 16'(N_MASK_WORDS)) begin
                cmd_we   <= 1'b1;
                cmd_sel  <= smask[N_STREAMS-1:0];
                cmd_data <= op_data;
              end
            end
            default: ;
          endcase
          if (op_last) state <= S_START;
        end
        S_START: begin
          if (cur_id == OP_STRM_REQ_STATS) stat_req <= smask[N_STREAMS-1:0];
          state <= S_REPLY;
        end
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
