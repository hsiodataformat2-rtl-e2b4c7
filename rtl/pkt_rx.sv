// pkt_rx: network packet handler of the HSIO core.
//
// Receives one raw Ethernet frame at a time as 16-bit words (destination
// MAC, source MAC, type/magic, sequence, length, opcode count, opcodes,
// CRC) into a frame buffer. A frame whose type field is not the magic
// number 0x8765 is dropped. A good frame is then walked opcode by opcode
// and each opcode is offered on the opcode bus: first a header beat
// (op_hdr=1, op_data = opcode id), then one beat per 16-bit payload word.
// op_id/op_seq/op_size stay valid for the whole opcode so that every opcode
// block can decide from op_id whether the opcode is its own. If no block
// accepts the header beat within TIMEOUT_CYCLES, op_timeout rises and the
// echo block grabs the opcode. After the last opcode a network Ack body
// (packet sequence, opcode count 0) is issued on the ack stream.
// The source MAC of the last good frame is kept as the reply address.
//
// Frames arriving while a frame is still being dispatched are dropped and
// counted. The packet CRC is not checked here (the Ethernet FCS already
// protects the frame). The frame buffer, the single-frame buffering, the
// Ack body layout and the opcode-bus handshake are this design's choices;
// the packet and opcode layout, the magic number, the Ack and the timeout
// echo follow the protocol definition.
module pkt_rx
  import hsio_pkg::*;
#(
  parameter int unsigned BUF_WORDS      = 768,        // 1.5 kB frame
  parameter int unsigned TIMEOUT_CYCLES = 40_000_000  // 1 s at 40 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  // frame input from the MAC, one word per valid cycle, last on final word
  input  logic        rx_valid,
  input  word_t       rx,
  // header of the frame being processed
  output logic [47:0] peer_mac,
  output logic [15:0] pkt_seq,
  // opcode bus
  output logic        op_valid,
  input  logic        op_ready,
  output logic        op_hdr,
  output logic        op_last,
  output logic [15:0] op_data,
  output logic [15:0] op_id,
  output logic [15:0] op_seq,
  output logic [15:0] op_size,
  output logic        op_timeout,
  // network Ack body
  output logic        ack_valid,
  input  logic        ack_ready,
  output word_t       ack,
  // statistics
  output logic [15:0] rx_dropped,
  output logic [15:0] rx_good
);

  localparam int AW = $clog2(BUF_WORDS);
  localparam int FIRST_OP = 10;

  typedef enum logic [2:0] {S_RECV, S_NEXT, S_HDR, S_PAY, S_ACK0, S_ACK1} state_e;
  state_e state;

  logic [15:0] mem [BUF_WORDS];
  logic [15:0] widx, nwords, rptr, ops_left, pay_left;
  logic [15:0] magic;
  logic [47:0] src_mac;
  logic [31:0] tcnt;

  wire logic [AW-1:0] raddr = rptr[AW-1:0];
  wire logic [15:0]   rword = (rptr < nwords && rptr < 16'(BUF_WORDS)) ? mem[raddr] : 16'h0;

  always_ff @(posedge clk) begin
    if (state == S_RECV && rx_valid && widx < 16'(BUF_WORDS))
      mem[widx[AW-1:0]] <= rx.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RECV;
      widx       <= '0;
      nwords     <= '0;
      rptr       <= '0;
      ops_left   <= '0;
      pay_left   <= '0;
      magic      <= '0;
      src_mac    <= '0;
      peer_mac   <= '0;
      pkt_seq    <= '0;
      op_id      <= '0;
      op_seq     <= '0;
      op_size    <= '0;
      op_timeout <= 1'b0;
      tcnt       <= '0;
      rx_dropped <= '0;
      rx_good    <= '0;
    end else begin
      if (state != S_RECV && rx_valid && rx.last) rx_dropped <= rx_dropped + 1'b1;
      unique case (state)
        S_RECV: if (rx_valid) begin
          case (widx)
            16'd3: src_mac[47:32] <= rx.data;
            16'd4: src_mac[31:16] <= rx.data;
            16'd5: src_mac[15:0]  <= rx.data;
            16'd6: magic          <= rx.data;
            16'd7: pkt_seq        <= rx.data;
            16'd9: ops_left       <= rx.data;
            default: ;
          endcase
          widx <= widx + 1'b1;
          if (rx.last) begin
            widx <= '0;
            if (widx >= 16'(FIRST_OP - 1) && magic == MAGIC) begin
              nwords   <= (widx + 1'b1 > 16'(BUF_WORDS)) ? 16'(BUF_WORDS) : widx + 1'b1;
              rptr     <= 16'(FIRST_OP);
              peer_mac <= src_mac;
              rx_good  <= rx_good + 1'b1;
              state    <= S_NEXT;
            end else begin
              rx_dropped <= rx_dropped + 1'b1;
            end
          end
        end
        S_NEXT: begin
          op_timeout <= 1'b0;
          tcnt       <= '0;
          if (ops_left == 0 || rptr + 16'd3 > nwords) begin
            state <= S_ACK0;
          end else begin
            op_id    <= rword;
            op_seq   <= (rptr + 16'd1 < nwords) ? mem[AW'(rptr + 16'd1)] : 16'h0;
            op_size  <= (rptr + 16'd2 < nwords) ? mem[AW'(rptr + 16'd2)] : 16'h0;
            pay_left <= (((rptr + 16'd2 < nwords) ? mem[AW'(rptr + 16'd2)] : 16'h0) + 16'd1) >> 1;
            rptr     <= rptr + 16'd3;
            state    <= S_HDR;
          end
        end
        S_HDR: begin
          if (op_ready) begin
            if (pay_left == 0) begin
              ops_left <= ops_left - 1'b1;
              state    <= S_NEXT;
            end else begin
              state <= S_PAY;
            end
          end else if (!op_timeout) begin
            tcnt <= tcnt + 1'b1;
            if (tcnt >= TIMEOUT_CYCLES - 1) op_timeout <= 1'b1;
          end
        end
        S_PAY: if (op_ready) begin
          rptr     <= rptr + 1'b1;
          pay_left <= pay_left - 1'b1;
          if (pay_left == 16'd1) begin
            ops_left <= ops_left - 1'b1;
            state    <= S_NEXT;
          end
        end
        S_ACK0: if (ack_ready) state <= S_ACK1;
        S_ACK1: if (ack_ready) state <= S_RECV;
        default: state <= S_RECV;
      endcase
    end
  end

  always_comb begin
    op_valid  = (state == S_HDR) || (state == S_PAY);
    op_hdr    = (state == S_HDR);
    op_data   = (state == S_HDR) ? op_id : rword;
    op_last   = (state == S_HDR) ? (pay_left == 0) : (pay_left == 16'd1);
    ack_valid = (state == S_ACK0) || (state == S_ACK1);
    ack.data  = (state == S_ACK0) ? pkt_seq : 16'h0000;
    ack.last  = (state == S_ACK1);
  end

endmodule
