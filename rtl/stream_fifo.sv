// stream_fifo: event buffer of one readout stream.
//
// Event words (w_valid with w_sof/w_eof framing) are written into a data
// FIFO of FIFO_WORDS words (1.5 kB, one network packet). A lengths FIFO
// holds one entry per packet to be sent: word count, fragment number and a
// truncated flag. The reader (the stream's packetizer) sees the oldest entry
// on ev_*, reads its words with rd_pop/rd_data and frees the entry with
// ev_pop.
// Rules while writing an event:
//  * An event is started only if the lengths FIFO has room for two entries;
//    otherwise it is dropped, the dropped-header counter counts it and a
//    LEN_FIFO_FULL error is raised.
//  * An event longer than FRAG_WORDS (what fits in one packet) is split:
//    the first FRAG_WORDS words form fragment 0, the rest fragment 1.
//  * If the data FIFO fills, or fragment 1 would also exceed FRAG_WORDS,
//    the event is truncated: what was stored is closed as an entry with the
//    truncated flag, and everything up to the event's trailer (w_eof) is
//    discarded before the next header is accepted.
//  * While waiting for that trailer a counter runs; after TRAILER_TO cycles
//    one error is raised: TRUNCEV_TRAILER_TO, FRAGEV_TRAILER_TO or, if
//    nothing of the event was stored, EMPTYEV_TRAILER_TO. The wait for the
//    trailer itself has no limit.
// An error waits on err_valid/err_code until err_ack; a further error
// arriving meanwhile is not reported. busy_fifo is high while the data FIFO
// is at least half full. clr empties everything.
// The truncation, two-fragment limit, single error packet and error codes
// follow the protocol; the lengths-FIFO depth, the timeout length and the
// single pending error are this design's choices.
module stream_fifo
  import hsio_pkg::*;
#(
  parameter int unsigned FIFO_WORDS = 768,     // 1.5 kB
  parameter int unsigned LEN_DEPTH  = 16,
  parameter int unsigned FRAG_WORDS = 742,     // data words in one 1500-byte packet
  parameter int unsigned TRAILER_TO = 40_000   // 1 ms at 40 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  // event words in
  input  logic        w_valid,
  input  logic [15:0] w_data,
  input  logic        w_sof,
  input  logic        w_eof,
  // oldest complete entry
  output logic        ev_valid,
  output logic [15:0] ev_len,
  output logic        ev_frag,
  output logic        ev_trunc,
  input  logic        ev_pop,
  input  logic        rd_pop,
  output logic [15:0] rd_data,
  // error report
  output logic        err_valid,
  output deser_err_e  err_code,
  output logic        err_frag,
  input  logic        err_ack,
  // levels
  output logic [15:0] data_level,
  output logic [15:0] len_level,
  output logic [3:0]  dropped,
  output logic        busy_fifo
);

  localparam int AW = $clog2(FIFO_WORDS);
  localparam int LW = $clog2(LEN_DEPTH);

  typedef struct packed {
    logic        trunc;
    logic        frag;
    logic [15:0] len;
  } len_entry_t;

  typedef enum logic [1:0] {W_IDLE, W_IN, W_DROP} wstate_e;
  wstate_e     wstate;

  logic [15:0] dmem [FIFO_WORDS];
  len_entry_t  lmem [LEN_DEPTH];
  logic [AW-1:0] dwp, drp;
  logic [LW-1:0] lwp, lrp;
  logic [15:0] cur_len;
  logic        cur_frag, to_reported;
  logic [31:0] to_cnt;
  deser_err_e  to_code;

  logic        d_push, l_push;
  len_entry_t  l_in;

  wire logic d_full   = data_level == 16'(FIFO_WORDS);
  wire logic l_room2  = len_level + 16'd2 <= 16'(LEN_DEPTH);

  function automatic logic [AW-1:0] dinc(input logic [AW-1:0] p);
    return (p == AW'(FIFO_WORDS - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    ev_valid = len_level != 0;
    ev_len   = lmem[lrp].len;
    ev_frag  = lmem[lrp].frag;
    ev_trunc = lmem[lrp].trunc;
    rd_data  = dmem[drp];
    busy_fifo = data_level >= 16'(FIFO_WORDS / 2);
  end

  // write-side decisions
  always_comb begin
    d_push = 1'b0;
    l_push = 1'b0;
    l_in   = '{trunc: 1'b0, frag: cur_frag, len: cur_len};
    if (w_valid && !clr) begin
      unique case (wstate)
        W_IDLE: if (w_sof && l_room2 && !d_full) begin
          d_push = 1'b1;
          if (w_eof) begin
            l_push = 1'b1;
            l_in   = '{trunc: 1'b0, frag: 1'b0, len: 16'd1};
          end
        end
        W_IN: begin
          if (d_full || (cur_frag && cur_len == 16'(FRAG_WORDS))) begin
            l_push = 1'b1;
            l_in   = '{trunc: 1'b1, frag: cur_frag, len: cur_len};
          end else begin
            d_push = 1'b1;
            if (w_eof) begin
              l_push = 1'b1;
              l_in   = '{trunc: 1'b0, frag: cur_frag, len: cur_len + 1'b1};
            end else if (!cur_frag && cur_len + 1'b1 == 16'(FRAG_WORDS)) begin
              l_push = 1'b1;
              l_in   = '{trunc: 1'b0, frag: 1'b0, len: 16'(FRAG_WORDS)};
            end
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (d_push) dmem[dwp] <= w_data;
    if (l_push) lmem[lwp] <= l_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate      <= W_IDLE;
      dwp         <= '0;
      drp         <= '0;
      lwp         <= '0;
      lrp         <= '0;
      data_level  <= '0;
      len_level   <= '0;
      cur_len     <= '0;
      cur_frag    <= 1'b0;
      to_reported <= 1'b0;
      to_cnt      <= '0;
      to_code     <= ERR_TRUNCEV_TRAILER_TO;
      dropped     <= '0;
      err_valid   <= 1'b0;
      err_code    <= ERR_TRUNCEV_TRAILER_TO;
      err_frag    <= 1'b0;
    end else if (clr) begin
      wstate     <= W_IDLE;
      dwp        <= '0;
      drp        <= '0;
      lwp        <= '0;
      lrp        <= '0;
      data_level <= '0;
      len_level  <= '0;
      dropped    <= '0;
      err_valid  <= 1'b0;
    end else begin
      // pointers and levels
      if (d_push) dwp <= dinc(dwp);
      if (rd_pop && data_level != 0) drp <= dinc(drp);
      data_level <= data_level + 16'(d_push) - 16'(rd_pop && data_level != 0);
      if (l_push) lwp <= lwp + 1'b1;
      if (ev_pop && len_level != 0) lrp <= lrp + 1'b1;
      len_level <= len_level + 16'(l_push) - 16'(ev_pop && len_level != 0);

      if (err_ack) err_valid <= 1'b0;

      unique case (wstate)
        W_IDLE: if (w_valid && w_sof) begin
          cur_frag <= 1'b0;
          if (!l_room2) begin
            dropped <= dropped + 1'b1;
            if (!err_valid) begin
              err_valid <= 1'b1;
              err_code  <= ERR_LEN_FIFO_FULL;
              err_frag  <= 1'b0;
            end
            if (!w_eof) begin
              wstate      <= W_DROP;
              to_reported <= 1'b1;     // already reported
              to_cnt      <= '0;
            end
          end else if (d_full) begin
            if (!w_eof) begin
              wstate      <= W_DROP;
              to_reported <= 1'b0;
                      to_code     <= ERR_EMPTYEV_TRAILER_TO;
              to_cnt      <= '0;
            end
          end else if (!w_eof) begin
            wstate  <= W_IN;
            cur_len <= 16'd1;
          end
        end
        W_IN: if (w_valid) begin
          if (d_full || (cur_frag && cur_len == 16'(FRAG_WORDS))) begin
            wstate      <= w_eof ? W_IDLE : W_DROP;
            to_reported <= 1'b0;
            to_cnt      <= '0;
            to_code     <= cur_frag ? ERR_FRAGEV_TRAILER_TO : ERR_TRUNCEV_TRAILER_TO;
          end else if (w_eof) begin
            wstate <= W_IDLE;
          end else if (!cur_frag && cur_len + 1'b1 == 16'(FRAG_WORDS)) begin
            cur_frag <= 1'b1;
            cur_len  <= '0;
          end else begin
            cur_len <= cur_len + 1'b1;
          end
        end
        W_DROP: begin
          if (w_valid && w_eof) wstate <= W_IDLE;
          if (!to_reported) begin
            if (to_cnt >= TRAILER_TO - 1) begin
              to_reported <= 1'b1;
              if (!err_valid || err_ack) begin
                err_valid <= 1'b1;
                err_code  <= to_code;
                err_frag  <= cur_frag;
              end
            end else begin
              to_cnt <= to_cnt + 1'b1;
            end
          end
        end
        default: wstate <= W_IDLE;
      endcase
    end
  end

endmodule
