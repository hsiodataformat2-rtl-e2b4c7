// ocb_echo: opcode block for ECHO (0x0003) and for unhandled opcodes.
//
// An ECHO opcode is returned to the host unchanged in a reply packet. An
// opcode that no other block has accepted when the packet handler's
// timeout expires (op_timeout) is grabbed here too and returned with the
// top nibble of its opcode id replaced by 0xB ("unrecognised opcode").
// The reply body is: packet sequence, opcode count 1, opcode id, opcode
// sequence, payload size, payload words. The five header words are sent
// first, the opcode's header beat is consumed together with the fifth, and
// the payload then streams straight from the opcode bus to the reply
// stream, one word per cycle when neither side stalls.
// The ECHO and 0xBnnn behaviour follow the protocol; streaming the payload
// through without a buffer is this design's choice.
module ocb_echo
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
  input  logic [15:0] op_size,
  input  logic        op_timeout,
  output logic        rep_valid,
  input  logic        rep_ready,
  output word_t       rep,
  output logic        unrecog_pulse   // one cycle per grabbed unhandled opcode
);

  typedef enum logic [2:0] {S_IDLE, S_H0, S_H1, S_H2, S_H3, S_H4, S_PAY} state_e;
  state_e state;
  logic   grabbed;

  wire logic mine = op_valid && op_hdr && (op_id == OP_ECHO || op_timeout);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      grabbed <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (mine) begin
          state   <= S_H0;
          grabbed <= (op_id != OP_ECHO);
        end
        S_H0: if (rep_ready) state <= S_H1;
        S_H1: if (rep_ready) state <= S_H2;
        S_H2: if (rep_ready) state <= S_H3;
        S_H3: if (rep_ready) state <= S_H4;
        S_H4: if (rep_ready) state <= op_last ? S_IDLE : S_PAY;
        S_PAY: if (rep_ready && op_valid && op_last) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rep_valid = 1'b0;
    rep       = '{last: 1'b0, data: 16'h0};
    op_ready  = 1'b0;
    unique case (state)
      S_H0: begin rep_valid = 1'b1; rep.data = pkt_seq; end
      S_H1: begin rep_valid = 1'b1; rep.data = 16'd1; end
      S_H2: begin rep_valid = 1'b1; rep.data = grabbed ? {UNRECOG_NIBBLE, op_id[11:0]} : op_id; end
      S_H3: begin rep_valid = 1'b1; rep.data = op_seq; end
      S_H4: begin
        rep_valid = 1'b1;
        rep.data  = op_size;
        rep.last  = op_last;
        op_ready  = rep_ready;
      end
      S_PAY: begin
        rep_valid = op_valid;
        rep.data  = op_data;
        rep.last  = op_last;
        op_ready  = rep_ready;
      end
      default: ;
    endcase
  end

  assign unrecog_pulse = (state == S_H4) && rep_ready && grabbed;

endmodule
