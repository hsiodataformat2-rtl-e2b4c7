// ocb_status: opcode block for StatusBlockRead (STATREAD, 0x0019).
//
// On a STATREAD opcode (any payload is drained and ignored) it replies with
// the 32 status words supplied on the status input, word 0 first. The
// status words are read at the moment each reply word is sent.
// The opcode and the 32-word status list follow the protocol; what fills
// each status word is decided where the block is instantiated.
module ocb_status
  import hsio_pkg::*;
#(
  parameter int unsigned N_STATUS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] pkt_seq,
  input  logic        op_valid,
  output logic        op_ready,
  input  logic        op_hdr,
  input  logic        op_last,
  input  logic [15:0] op_id,
  input  logic [15:0] op_seq,
  input  logic        op_timeout,
  output logic        rep_valid,
  input  logic        rep_ready,
  output word_t       rep,
  input  logic [N_STATUS-1:0][15:0] status
);

  localparam int SW = $clog2(N_STATUS);

  typedef enum logic [1:0] {S_IDLE, S_RX, S_START, S_REPLY} state_e;
  state_e      state;
  logic [15:0] cur_seq, idx, pay;
  logic        rg_busy;

  wire logic take = op_valid && op_ready;

  always_comb op_ready = (state == S_RX) || (state == S_IDLE && op_hdr && op_id == OP_STATREAD && !op_timeout);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur_seq <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (take) begin
          cur_seq <= op_seq;
          state   <= op_last ? S_START : S_RX;
        end
        S_RX:    if (take && op_last) state <= S_START;
        S_START: state <= S_REPLY;
        S_REPLY: if (!rg_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb pay = (idx < 16'(N_STATUS)) ? status[idx[SW-1:0]] : 16'h0;

  ocb_reply u_reply (
    .clk, .rst_n,
    .start  (state == S_START),
    .pkt_seq,
    .id     (16'(OP_STATREAD)),
    .seq    (cur_seq),
    .nwords (16'(N_STATUS)),
    .busy   (rg_busy),
    .idx, .pay,
    .rep_valid, .rep_ready, .rep
  );

endmodule
