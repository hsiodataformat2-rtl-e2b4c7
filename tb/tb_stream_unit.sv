// tb_stream_unit: one stream (id 0x42) with a 64-word FIFO and 20-word
// fragments. Checks the masked config write, counter-generator events
// turned into 0xD000 data packets (including a fragmented one), a status
// request packet with the StreamConfig and StreamStatus words, the delta
// busy (16 triggers without headers raise it, a header from the input pin
// clears it), a deserialised event from the input pin, and the stream
// reset command. Output back-pressure is random.
// StreamConfig bits, sources and the busy rule follow the protocol;
// the packet header word and generator data are this design's choices.
module tb_stream_unit;
  import hsio_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cfg_we = 0, cmd_we = 0, stat_req = 0, trig = 0, cap_go = 0, bit_en = 0, bit_in = 0;
  logic [15:0] cfg_mask = 0, cfg_data = 0, cmd_data = 0, len0 = 0, len1 = 0;
  logic        out_valid, out_ready = 1, busy, hdr_seen;
  word_t       out;
  logic [15:0] cfg, status1;

  stream_unit #(.STREAM_ID(8'h42), .FIFO_WORDS(64), .LEN_DEPTH(8), .FRAG_WORDS(20), .TRAILER_TO(50)) dut (
    .clk, .rst_n, .cfg_we, .cfg_mask, .cfg_data, .cmd_we, .cmd_data, .stat_req, .trig, .cap_go,
    .bit_en, .bit_in, .len0, .len1, .out_valid, .out_ready, .out, .busy, .cfg, .status1, .hdr_seen);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= 1'($urandom_range(0, 3) != 0);

  logic [15:0] pk [$][$];
  logic [15:0] cur [$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    cur.push_back(out.data);
    if (out.last) begin pk.push_back(cur); cur = {}; end
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0;
  endtask

  task automatic write_cfg(input logic [15:0] m, input logic [15:0] d);
    @(negedge clk); cfg_we = 1; cfg_mask = m; cfg_data = d; @(negedge clk); cfg_we = 0;
  endtask

  task automatic send_bits(input bit b [$]);
    foreach (b[i]) begin @(negedge clk); bit_en = 1; bit_in = b[i]; end
    @(negedge clk); bit_en = 0;
  endtask

  function automatic bit pk_is(input logic [15:0] a [$], input logic [15:0] b [$]);
    return a == b;
  endfunction

  initial begin
    logic [15:0] exp [$];
    bit ev [$];
    int seq;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    write_cfg(16'hffff, 16'hff00);
    write_cfg(16'h00ff, 16'h0049);      // enable, generator 0, busy on delta
    check(cfg == 16'hff49, "masked config write");
    write_cfg(16'hff00, 16'h0000);
    len0 = 16'd5;
    pulse(trig);
    wait (pk.size() == 1);
    exp = '{16'd0, 16'd1, 16'hd000, 16'd0, 16'd12, 16'h4200, 16'd0, 16'd1, 16'd2, 16'd3, 16'd4};
    check(pk_is(pk[0], exp), $sformatf("generator packet %p", pk[0]));
    // fragmented event: 30 words -> 20 + 10
    len0 = 16'd30;
    pulse(trig);
    wait (pk.size() == 3);
    check(pk[1].size() == 26 && pk[1][4] == 16'd42 && pk[1][5] == 16'h4200 && pk[1][6] == 16'd5 && pk[1][25] == 16'd24,
          "fragment 0");
    check(pk[2].size() == 16 && pk[2][5] == 16'h4201 && pk[2][6] == 16'd25 && pk[2][15] == 16'd34 && pk[2][0] == 16'd2,
          "fragment 1");
    // status request
    pulse(stat_req);
    wait (pk.size() == 4);
    check(pk_is(pk[3], '{16'd3, 16'd1, 16'h0051, 16'd3, 16'd6, 16'h4200, 16'h0049, 16'h0000}),
          $sformatf("status packet %p", pk[3]));
    // delta busy: switch to the input pin, 16 triggers and no headers
    write_cfg(16'h000e, 16'h0000);
    repeat (15) pulse(trig);
    check(!busy, "not busy at delta 15");
    pulse(trig);
    check(busy && status1[5:0] == 6'd16 && status1[6], "busy at delta 16");
    // an event on the input pin: header 11101, 11 payload bits, trailer
    ev = '{1, 1, 1, 0, 1, 1, 0, 1, 1, 0, 0, 1, 0, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    send_bits(ev);
    repeat (3) @(posedge clk);
    check(!busy && status1[5:0] == 6'd15, "header lowers delta");
    wait (pk.size() == 5);
    check(pk_is(pk[4], '{16'd4, 16'd1, 16'hd000, 16'd4, 16'd6, 16'h4200, 16'b1110_1101_1001_0111, 16'h8000}),
          $sformatf("deserialised packet %p", pk[4]));
    // stream reset clears delta
    @(negedge clk); cmd_we = 1; cmd_data = 16'h8000; @(negedge clk); cmd_we = 0;
    repeat (3) @(posedge clk);
    check(status1[5:0] == 6'd0, "stream reset clears delta");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
