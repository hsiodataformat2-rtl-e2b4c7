// pkt_tx_builder: turns a reply or data body into a complete network frame.
//
// Input is a packet body on a valid/ready word stream:
//   word 0 = packet sequence number, word 1 = opcode count, then the opcodes
//   (id, sequence, payload size in bytes, payload words), last on the final word.
// The body is collected in a buffer (one Ethernet payload, 750 words) and
// then sent as a frame:
//   destination MAC (3 words, the source MAC of the last received frame),
//   own MAC (3 words), magic 0x8765, sequence, length in bytes, opcode
//   count, opcodes, zero padding, 16-bit CRC trailer.
// Frames are padded with zeros so that they are at least 64 bytes long
// counted from the destination MAC. The length field counts the bytes from
// the magic word to the CRC, padding included. The CRC is CRC-16-CCITT
// (polynomial 0x1021, preset 0xFFFF, most significant bit first) over the
// words from the magic word to the end of the padding.
// Frame layout, padding and the CRC trailer follow the protocol; the CRC
// polynomial, the span the length counts and the own MAC are this design's
// choices. Latency: the frame starts the cycle after the body's last word.
module pkt_tx_builder
  import hsio_pkg::*;
#(
  parameter int unsigned BUF_WORDS       = 750,   // 1500-byte Ethernet payload
  parameter int unsigned MIN_FRAME_WORDS = 32,    // 64-byte minimum frame
  parameter logic [47:0] OWN_MAC         = 48'h02_48_53_49_4f_00
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in,
  input  logic [47:0] peer_mac,
  output logic        tx_valid,
  input  logic        tx_ready,
  output word_t       tx
);

  localparam int AW = $clog2(BUF_WORDS);

  logic [15:0] mem [BUF_WORDS];
  logic [15:0] n, k, total, crc;
  logic        sending;

  function automatic logic [15:0] crc16_word(input logic [15:0] c, input logic [15:0] d);
    logic [15:0] r;
    r = c;
    for (int i = 15; i >= 0; i--) begin
      if (r[15] ^ d[i]) r = (r << 1) ^ 16'h1021;
      else              r = r << 1;
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!sending && in_valid && n < 16'(BUF_WORDS)) mem[n[AW-1:0]] <= in.data;
  end

  // body length including the word being accepted, and the resulting frame length
  logic [15:0] n_next, frame_len;
  always_comb begin
    n_next    = (n < 16'(BUF_WORDS)) ? n + 16'd1 : n;
    frame_len = (n_next + 16'd9 < 16'(MIN_FRAME_WORDS)) ? 16'(MIN_FRAME_WORDS) : n_next + 16'd9;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n       <= '0;
      k       <= '0;
      total   <= '0;
      crc     <= 16'hffff;
      sending <= 1'b0;
    end else if (!sending) begin
      if (in_valid) begin
        n <= n_next;
        if (in.last) begin
          sending <= 1'b1;
          k       <= '0;
          crc     <= 16'hffff;
          total   <= frame_len;
        end
      end
    end else if (tx_ready) begin
      if (k >= 16'd6 && k < total - 1'b1) crc <= crc16_word(crc, tx.data);
      if (k == total - 1'b1) begin
        sending <= 1'b0;
        n       <= '0;
      end
      k <= k + 1'b1;
    end
  end

  logic [15:0] word_k;
  always_comb begin
    case (1'b1)
      (k == 16'd0): word_k = peer_mac[47:32];
      (k == 16'd1): word_k = peer_mac[31:16];
      (k == 16'd2): word_k = peer_mac[15:0];
      (k == 16'd3): word_k = OWN_MAC[47:32];
      (k == 16'd4): word_k = OWN_MAC[31:16];
      (k == 16'd5): word_k = OWN_MAC[15:0];
      (k == 16'd6): word_k = MAGIC;
      (k == 16'd7): word_k = mem[0];
      (k == 16'd8): word_k = (total - 16'd6) << 1;
      (k == 16'd9): word_k = (n > 16'd1) ? mem[1] : 16'h0;
      (k == total - 16'd1): word_k = crc;
      (k < n + 16'd8): word_k = mem[AW'(k - 16'd8)];
      default: word_k = 16'h0000;
    endcase
  end

  always_comb begin
    in_ready = !sending;
    tx_valid = sending;
    tx.data  = word_k;
    tx.last  = sending && (k == total - 1'b1);
  end

endmodule
