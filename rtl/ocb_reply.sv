// ocb_reply: reply-body sequencer shared by the register, status, command
// and stream opcode blocks.
//
// A start pulse latches the packet sequence, opcode id, opcode sequence and
// payload length (in words). The block then sends the reply body
//   packet sequence, 1 (opcode count), id, sequence, size in bytes,
//   payload word 0 .. payload word nwords-1
// on a valid/ready word stream, asking its parent for each payload word
// through idx/pay (pay is read combinationally in the same cycle). busy is
// high from the cycle after start until the last word is accepted.
// The reply layout mirrors the request layout as the protocol requires;
// sharing one sequencer is this design's choice.
module ocb_reply
  import hsio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] pkt_seq,
  input  logic [15:0] id,
  input  logic [15:0] seq,
  input  logic [15:0] nwords,
  output logic        busy,
  output logic [15:0] idx,
  input  logic [15:0] pay,
  output logic        rep_valid,
  input  logic        rep_ready,
  output word_t       rep
);

  logic [15:0] cnt, r_pseq, r_id, r_seq, r_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      r_pseq <= '0;
      r_id   <= '0;
      r_seq  <= '0;
      r_n    <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        cnt    <= '0;
        r_pseq <= pkt_seq;
        r_id   <= id;
        r_seq  <= seq;
        r_n    <= nwords;
      end
    end else if (rep_ready) begin
      cnt <= cnt + 1'b1;
      if (rep.last) busy <= 1'b0;
    end
  end

  always_comb begin
    idx       = cnt - 16'd5;
    rep_valid = busy;
    rep.last  = (cnt == r_n + 16'd4);
    unique case (cnt)
      16'd0:   rep.data = r_pseq;
      16'd1:   rep.data = 16'd1;
      16'd2:   rep.data = r_id;
      16'd3:   rep.data = r_seq;
      16'd4:   rep.data = r_n << 1;
      default: rep.data = pay;
    endcase
  end

endmodule
