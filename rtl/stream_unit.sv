// stream_unit: one readout stream of the HSIO.
//
// Holds the stream's 16-bit StreamConfig word (bit 0 enable, 3:1 data
// source, 5:4 deserialiser mode, 6 busy-on-delta enable, 7 busy-on-FIFO
// enable), updated by masked config writes (cfg_we/cfg_sel/cfg_mask/
// cfg_data), and takes StreamCommand pulses (bit 15 stream reset).
// Data sources: 0 = the stream's input bit line through the deserialiser
// (header/trailer or capture mode); 4 and 5 = counter data generators 0
// and 1, which on each trigger produce an event of len0 / len1 words
// holding a running 16-bit count. Other sources give no data.
// Events go into the stream FIFO; a packetizer turns each FIFO entry into
// a data packet body (opcode 0xD0mm, first payload word = stream id in the
// upper byte and fragment number in the lower byte, then the event words),
// each FIFO error into a 0xF0mm packet (that header word and the error
// code), and each status request into a 0x0051 packet (header word,
// StreamConfig word, StreamStatus word 1). mm is 0x04 in capture mode and
// 0x00 otherwise. Each packet carries the stream's own sequence number.
// Busy: a 6-bit "delta" counter goes up on every trigger and down on every
// event header seen; busy_delta is delta > 15 (fixed), busy_fifo is the
// FIFO at least half full; busy = enabled ones of the two, while the
// stream is enabled.
// StreamStatus word 1: 15:12 dropped headers, 11:10 lengths-FIFO quarters,
// 9:8 data-FIFO quarters, 7 busy_fifo, 6 busy_delta, 5:0 delta.
// A stream reset empties FIFO and deserialiser and clears delta once no
// packet is being sent. Histogram readout (command bit 0) has no
// histogrammer here and is ignored.
// Config/command/status layouts, sources, busy rules and packet opcodes
// follow the protocol; packet header word layout, generator data pattern
// and status packet id are this design's choices.
module stream_unit
  import hsio_pkg::*;
#(
  parameter logic [7:0]  STREAM_ID  = 8'd0,
  parameter int unsigned FIFO_WORDS = 768,
  parameter int unsigned LEN_DEPTH  = 16,
  parameter int unsigned FRAG_WORDS = 742,
  parameter int unsigned TRAILER_TO = 40_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [15:0] cfg_mask,
  input  logic [15:0] cfg_data,
  input  logic        cmd_we,
  input  logic [15:0] cmd_data,
  input  logic        stat_req,
  input  logic        trig,
  input  logic        cap_go,
  input  logic        bit_en,
  input  logic        bit_in,
  input  logic [15:0] len0,
  input  logic [15:0] len1,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out,
  output logic        busy,
  output logic [15:0] cfg,
  output logic [15:0] status1,
  output logic        hdr_seen   // one cycle per event header
);

  // ---------------- config and command ----------------
  logic srst_pend, clr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg       <= '0;
      srst_pend <= 1'b0;
    end else begin
      if (cfg_we) cfg <= (cfg & ~cfg_mask) | (cfg_data & cfg_mask);
      if (cmd_we && cmd_data[15]) srst_pend <= 1'b1;
      else if (clr) srst_pend <= 1'b0;
    end
  end

  wire logic       enable   = cfg[SC_ENABLE];
  wire logic [2:0] src      = cfg[3:1];
  wire logic [1:0] dmode    = cfg[5:4];
  wire logic       src_pin  = (src == 3'd0);
  wire logic       src_gen  = (src == 3'd4) || (src == 3'd5);

  // ---------------- counter data generator ----------------
  logic        gen_active, gen_first;
  logic [15:0] gen_left, gen_cnt;
  logic        g_valid, g_sof, g_eof;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_active <= 1'b0;
      gen_first  <= 1'b0;
      gen_left   <= '0;
      gen_cnt    <= '0;
    end else if (clr) begin
      gen_active <= 1'b0;
    end else if (!gen_active) begin
      if (trig && enable && src_gen && ((src[0] ? len1 : len0) != 0)) begin
        gen_active <= 1'b1;
        gen_first  <= 1'b1;
        gen_left   <= src[0] ? len1 : len0;
      end
    end else begin
      gen_cnt   <= gen_cnt + 1'b1;
      gen_first <= 1'b0;
      gen_left  <= gen_left - 1'b1;
      if (gen_left == 16'd1) gen_active <= 1'b0;
    end
  end
  always_comb begin
    g_valid = gen_active;
    g_sof   = gen_active && gen_first;
    g_eof   = gen_active && gen_left == 16'd1;
  end

  // ---------------- deserialiser ----------------
  logic        d_valid, d_sof, d_eof, d_hdr;
  logic [15:0] d_data;
  stream_deser u_deser (
    .clk, .rst_n, .clr,
    .mode    (dmode),
    .bit_en  (bit_en && enable && src_pin),
    .bit_in,
    .go      (cap_go && enable && src_pin),
    .cap_len (len0),
    .w_valid (d_valid), .w_data (d_data), .w_sof (d_sof), .w_eof (d_eof),
    .hdr_pulse (d_hdr)
  );

  // ---------------- FIFO ----------------
  logic        ev_valid, ev_frag, ev_trunc, ev_pop, rd_pop;
  logic [15:0] ev_len, rd_data, data_level, len_level;
  logic        err_valid, err_frag, err_ack, busy_fifo;
  deser_err_e  err_code;
  logic [3:0]  dropped;

  stream_fifo #(
    .FIFO_WORDS (FIFO_WORDS), .LEN_DEPTH (LEN_DEPTH),
    .FRAG_WORDS (FRAG_WORDS), .TRAILER_TO (TRAILER_TO)
  ) u_fifo (
    .clk, .rst_n, .clr,
    .w_valid (g_valid || (d_valid && enable)),
    .w_data  (g_valid ? gen_cnt : d_data),
    .w_sof   (g_valid ? g_sof : d_sof),
    .w_eof   (g_valid ? g_eof : d_eof),
    .ev_valid, .ev_len, .ev_frag, .ev_trunc, .ev_pop, .rd_pop, .rd_data,
    .err_valid, .err_code, .err_frag, .err_ack,
    .data_level, .len_level, .dropped, .busy_fifo
  );

  // ---------------- busy ----------------
  // fill level in quarters of the full size (0..3)
  function automatic logic [1:0] quarters(input logic [15:0] level, input int unsigned size);
    if (32'(level) * 4 >= 3 * size) return 2'd3;
    if (32'(level) * 4 >= 2 * size) return 2'd2;
    if (32'(level) * 4 >= size)     return 2'd1;
    return 2'd0;
  endfunction

  logic [5:0] delta;
  logic       busy_delta;
  assign hdr_seen = d_hdr || g_sof;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) delta <= '0;
    else if (clr) delta <= '0;
    else begin
      unique case ({trig && enable, hdr_seen})
        2'b10:   if (delta != 6'h3f) delta <= delta + 1'b1;
        2'b01:   if (delta != 6'h00) delta <= delta - 1'b1;
        default: ;
      endcase
    end
  end
  always_comb begin
    busy_delta = delta > 6'd15;
    busy       = enable && ((cfg[SC_BUSY_DELTA] && busy_delta) || (cfg[SC_BUSY_FIFO] && busy_fifo));
    status1    = {dropped,
                  quarters(len_level, LEN_DEPTH),
                  quarters(data_level, FIFO_WORDS),
                  busy_fifo, busy_delta, delta};
  end

  // ---------------- packetizer ----------------
  typedef enum logic [1:0] {P_IDLE, P_STAT, P_ERR, P_DATA} pstate_e;
  pstate_e     pstate;
  logic        stat_pend;
  logic [15:0] k, tx_seq, plen;
  logic        pfrag;
  logic [7:0]  mm;

  always_comb clr = srst_pend && pstate == P_IDLE;

  wire logic hs = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate    <= P_IDLE;
      stat_pend <= 1'b0;
      k         <= '0;
      tx_seq    <= '0;
      plen      <= '0;
      pfrag     <= 1'b0;
      mm        <= '0;
    end else begin
      if (stat_req) stat_pend <= 1'b1;
      unique case (pstate)
        P_IDLE: begin
          k  <= '0;
          mm <= (dmode == 2'b01) ? MODE_CAPTURE : MODE_NORMAL;
          if (srst_pend) ;
          else if (stat_pend || stat_req) begin
            pstate    <= P_STAT;
            stat_pend <= 1'b0;
          end else if (err_valid) begin
            pstate <= P_ERR;
            pfrag  <= err_frag;
          end else if (ev_valid) begin
            pstate <= P_DATA;
            plen   <= ev_len;
            pfrag  <= ev_frag;
          end
        end
        default: if (hs) begin
          k <= k + 1'b1;
          if (out.last) begin
            pstate <= P_IDLE;
            tx_seq <= tx_seq + 1'b1;
          end
        end
      endcase
    end
  end

  logic [15:0] size_b, dh;
  always_comb begin
    unique case (pstate)
      P_STAT:  size_b = 16'd6;
      P_ERR:   size_b = 16'd4;
      default: size_b = (plen + 16'd1) << 1;
    endcase
    dh        = {STREAM_ID, 7'd0, (pstate == P_STAT) ? 1'b0 : pfrag};
    out_valid = pstate != P_IDLE;
    out.last  = 1'b0;
    unique case (k)
      16'd0: out.data = tx_seq;
      16'd1: out.data = 16'd1;
      16'd2: unique case (pstate)
               P_STAT:  out.data = OP_STRM_REQ_STATS;
               P_ERR:   out.data = {DESERR_PREFIX, mm};
               default: out.data = {DATA_PREFIX, mm};
             endcase
      16'd3: out.data = tx_seq;
      16'd4: out.data = size_b;
      16'd5: begin
        out.data = dh;
        out.last = (pstate == P_DATA) && plen == 0;
      end
      default: begin
        unique case (pstate)
          P_STAT: begin
            out.data = (k == 16'd6) ? cfg : status1;
            out.last = (k == 16'd7);
          end
          P_ERR: begin
            out.data = 16'(err_code);
            out.last = 1'b1;
          end
          default: begin
            out.data = rd_data;
            out.last = (k == plen + 16'd5);
          end
        endcase
      end
    endcase
    rd_pop  = hs && pstate == P_DATA && k >= 16'd6;
    ev_pop  = hs && pstate == P_DATA && out.last;
    err_ack = hs && pstate == P_ERR && out.last;
  end

  logic unused;
  assign unused = ev_trunc ^ (^cmd_data[14:0]);

endmodule
