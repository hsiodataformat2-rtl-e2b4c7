// tb_stream_fifo: small FIFO (32 words, 8 entries, 10-word fragments,
// trailer timeout 20 cycles). Checks a plain event, an event split into
// two fragments, an event too long for two fragments (truncated, with a
// FRAGEV_TRAILER_TO error when its trailer is late), a full lengths FIFO
// (event dropped, LEN_FIFO_FULL, dropped-header count), a FIFO overflow
// (truncated, TRUNCEV_TRAILER_TO), an event arriving at a full FIFO
// (EMPTYEV_TRAILER_TO), the half-full busy, and that the words read back
// are exactly the words stored.
// Fragmentation, truncation and error codes follow the protocol; the
// small sizes, lengths-FIFO depth and timeout are chosen for the test.
module tb_stream_fifo;
  import hsio_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr = 1'b0, w_valid = 1'b0, w_sof = 1'b0, w_eof = 1'b0;
  logic [15:0] w_data = '0;
  logic        ev_valid, ev_frag, ev_trunc, ev_pop, rd_pop, err_valid, err_frag, err_ack, busy_fifo;
  logic [15:0] ev_len, rd_data, data_level, len_level;
  deser_err_e  err_code;
  logic [3:0]  dropped;

  stream_fifo #(.FIFO_WORDS(32), .LEN_DEPTH(8), .FRAG_WORDS(10), .TRAILER_TO(20)) dut (
    .clk, .rst_n, .clr, .w_valid, .w_data, .w_sof, .w_eof,
    .ev_valid, .ev_len, .ev_frag, .ev_trunc, .ev_pop, .rd_pop, .rd_data,
    .err_valid, .err_code, .err_frag, .err_ack, .data_level, .len_level, .dropped, .busy_fifo);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // errors are collected as they appear
  deser_err_e errs [$];
  assign err_ack = err_valid;
  always @(posedge clk) if (rst_n && err_valid) errs.push_back(err_code);

  logic [15:0] cnt = 16'h100;
  logic [15:0] stored [$];    // words the FIFO should keep
  bit          half_seen = 1'b0;
  always @(posedge clk) if (rst_n && busy_fifo) half_seen = 1'b1;

  // send an event of n words; the first 'keep' words are expected to be
  // stored; the last word (trailer) comes 'gap' idle cycles late
  task automatic send_event(input int n, input int keep, input int gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (i == n - 1) begin
        w_valid = 1'b0;
        repeat (gap) @(negedge clk);
      end
      w_valid = 1'b1;
      w_sof   = (i == 0);
      w_eof   = (i == n - 1);
      w_data  = cnt;
      if (i < keep) stored.push_back(cnt);
      cnt++;
    end
    @(negedge clk);
    w_valid = 1'b0; w_sof = 1'b0; w_eof = 1'b0;
  endtask

  // read all entries, checking every word against what was stored
  typedef struct { int len; bit frag; bit trunc; } ent_t;
  task automatic drain(output ent_t e [$]);
    e = {};
    @(negedge clk);
    while (ev_valid) begin
      e.push_back('{int'(ev_len), ev_frag, ev_trunc});
      for (int i = 0; i < int'(ev_len); i++) begin
        check(stored.size() > 0 && rd_data == stored[0], $sformatf("read word %04h", rd_data));
        if (stored.size() > 0) void'(stored.pop_front());
        rd_pop = 1'b1;
        @(negedge clk);
        rd_pop = 1'b0;
      end
      ev_pop = 1'b1;
      @(negedge clk);
      ev_pop = 1'b0;
      @(negedge clk);
    end
  endtask

  initial begin
    ent_t e [$];
    rd_pop = 1'b0; ev_pop = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send_event(5, 5, 0);
    drain(e);
    check(e.size() == 1 && e[0].len == 5 && !e[0].frag && !e[0].trunc, "plain event");
    send_event(15, 15, 0);
    drain(e);
    check(e.size() == 2 && e[0].len == 10 && !e[0].frag && e[1].len == 5 && e[1].frag && !e[1].trunc,
          "two fragments");
    send_event(25, 20, 30);
    drain(e);
    check(e.size() == 2 && e[1].len == 10 && e[1].frag && e[1].trunc, "truncated after two fragments");
    check(errs.size() == 1 && errs[0] == ERR_FRAGEV_TRAILER_TO, "FRAGEV_TRAILER_TO once");
    // lengths FIFO: 7 one-word events fit (two entries are kept free), the 8th is dropped
    repeat (7) send_event(1, 1, 0);
    send_event(1, 0, 0);
    repeat (2) @(posedge clk);
    check(dropped == 4'd1, "dropped header counted");
    check(errs.size() == 2 && errs[1] == ERR_LEN_FIFO_FULL, $sformatf("LEN_FIFO_FULL %p", errs));
    drain(e);
    check(e.size() == 7, "seven one-word entries");
    // overflow: no reading, 9 + 9 + 9 + 10 words into 32
    send_event(9, 9, 0);
    send_event(9, 9, 0);
    send_event(9, 9, 0);
    send_event(10, 5, 30);
    check(half_seen, "busy_fifo at half full");
    check(errs.size() == 3 && errs[2] == ERR_TRUNCEV_TRAILER_TO, "TRUNCEV_TRAILER_TO");
    send_event(3, 0, 30);
    repeat (2) @(posedge clk);
    check(errs.size() == 4 && errs[3] == ERR_EMPTYEV_TRAILER_TO, "EMPTYEV_TRAILER_TO");
    drain(e);
    check(e.size() == 4 && e[3].len == 5 && e[3].trunc && !e[0].trunc, "overflow entries");
    check(stored.size() == 0 && data_level == 0, "all stored words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
