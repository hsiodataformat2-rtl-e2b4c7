// tb_pkt_rx: feeds frames into the packet handler and plays the opcode
// blocks with random back-pressure. Checks the beats of every opcode
// (header beat, payload words, odd byte sizes, last flags), the opcode
// sideband, the reply MAC address, the network Ack after the last opcode,
// the timeout on an opcode nobody takes (and the number of cycles it
// takes), and that a frame with a wrong magic number is dropped.
// Frame and opcode layout, magic, Ack and timeout echo follow the
// protocol; the Ack body and the reduced timeout are this design's choices.
module tb_pkt_rx;
  import hsio_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int TO = 40;

  logic        rx_valid = 1'b0;
  word_t       rx;
  logic [47:0] peer_mac;
  logic [15:0] pkt_seq, op_data, op_id, op_seq, op_size, rx_dropped, rx_good;
  logic        op_valid, op_ready, op_hdr, op_last, op_timeout, ack_valid, ack_ready;
  word_t       ack;

  pkt_rx #(.BUF_WORDS(64), .TIMEOUT_CYCLES(TO)) dut (
    .clk, .rst_n, .rx_valid, .rx, .peer_mac, .pkt_seq,
    .op_valid, .op_ready, .op_hdr, .op_last, .op_data, .op_id, .op_seq, .op_size, .op_timeout,
    .ack_valid, .ack_ready, .ack, .rx_dropped, .rx_good);

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

  // opcode blocks: take any known opcode with random stalls; take 0x0777
  // only once the timeout flag is up
  logic rnd;
  always @(negedge clk) rnd <= 1'($urandom_range(0, 2) != 0);
  assign op_ready  = op_valid && rnd && (op_id != 16'h0777 || op_timeout);
  assign ack_ready = rnd;

  logic [15:0] beats [$];
  int          hdr_wait = 0, waiting = 0;
  logic [15:0] acks [$];
  always @(posedge clk) begin
    if (op_valid && op_hdr && op_id == 16'h0777 && !op_timeout) waiting++;
    if (op_valid && op_ready) begin
      beats.push_back(op_data);
      if (op_hdr) beats.push_back(op_seq);
      if (op_hdr) beats.push_back(op_size);
      if (op_last) beats.push_back(16'hffff);   // marks the end of an opcode
      if (op_hdr && op_id == 16'h0777) hdr_wait = waiting;
    end
    if (ack_valid && ack_ready) acks.push_back(ack.data);
  end

  task automatic send_frame(input logic [15:0] f [$]);
    foreach (f[i]) begin
      @(negedge clk);
      rx_valid = 1'b1;
      rx.data  = f[i];
      rx.last  = (i == f.size() - 1);
    end
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  initial begin
    logic [15:0] f [$], exp [$];
    rx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // good frame with three opcodes
    f = '{16'h0002, 16'h4853, 16'h494f, 16'h00aa, 16'h11bb, 16'h22cc, MAGIC, 16'h0101, 16'd50, 16'd3,
          16'h0010, 16'h0001, 16'd4, 16'd23, 16'h40a0,
          16'h0003, 16'h0002, 16'd3, 16'habcd, 16'hef00,
          16'h0777, 16'h0003, 16'd0,
          16'h1d0f};
    send_frame(f);
    wait (acks.size() == 2);
    exp = '{16'h0010, 16'h0001, 16'd4, 16'd23, 16'h40a0, 16'hffff,
            16'h0003, 16'h0002, 16'd3, 16'habcd, 16'hef00, 16'hffff,
            16'h0777, 16'h0003, 16'd0, 16'hffff};
    check(beats == exp, $sformatf("opcode beats %p", beats));
    check(acks[0] == 16'h0101 && acks[1] == 16'h0000, "network ack body");
    check(peer_mac == 48'h00aa_11bb_22cc, "reply address");
    check(hdr_wait == TO, $sformatf("timeout after %0d cycles", hdr_wait));
    check(rx_good == 1 && rx_dropped == 0, "frame counted good");
    // bad magic
    beats = {};
    f[6] = 16'h1234;
    send_frame(f);
    repeat (50) @(posedge clk);
    check(beats.size() == 0 && acks.size() == 2, "bad-magic frame ignored");
    check(rx_dropped == 1, "bad-magic frame counted as dropped");
    // opcode count larger than the frame: stops at the frame end
    f = '{16'h0002, 16'h4853, 16'h494f, 16'h00aa, 16'h11bb, 16'h22cc, MAGIC, 16'h0102, 16'd20, 16'd5,
          16'h0030, 16'h0009, 16'd2, 16'h0001, 16'h0000};
    send_frame(f);
    wait (acks.size() == 4);
    check(beats.size() == 5 && beats[0] == 16'h0030 && beats[3] == 16'h0001, $sformatf("short frame %p", beats));
    check(acks[2] == 16'h0102, "second ack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
