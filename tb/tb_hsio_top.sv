// tb_hsio_top: end-to-end test of the HSIO core at reduced sizes (4 top,
// 4 bottom and 4 IDC streams, 64-word stream FIFOs, 40-word fragments,
// short timeouts). The testbench acts as the host: it builds request
// frames (with the CRC it computes itself), sends them, and decodes every
// frame the core transmits, checking addresses, magic, length field and CRC
// trailer. It drives the serial input of stream 64 bit by bit with events
// made of the header pattern, data and the trailer, watches the COM, L1R
// and busy lines, and leaves the two-wire buses without devices. Each
// mechanism is counted and must happen: network Ack, dropped frame, ECHO,
// unrecognised-opcode timeout, register write and block read, status read,
// COMMAND pulses (trigger, BCR, stream reset, burst start), stream config,
// stream status request, generator data, deserialised data, fragmentation,
// truncation with its trailer-timeout error packet, busy raised by missing
// headers and the trigger veto it causes, the burst sequencer, COM and L1R
// output, and a TWOWIRE transaction aborted on a missing acknowledge.
// Frame layout, opcodes, replies and stream rules checked are the
// protocol's; the CRC polynomial, the Ack layout, the header/trailer
// patterns and the reduced sizes are this design's choices.
module tb_hsio_top;
  import hsio_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [47:0] HOST = 48'h0a0b_0c0d_0e0f;
  localparam logic [47:0] OWN  = 48'h02_48_53_49_4f_00;

  logic              rx_valid = 1'b0, tx_valid, tx_ready = 1'b1, hold_tx = 1'b0;
  word_t             rx, tx;
  logic [4:0][15:0]  net_status;
  logic              stream_bit_en = 1'b0;
  logic [143:0]      stream_bits = '0;
  logic              ext_trig = 1'b0, ext_bcr = 1'b0, ext_ecr = 1'b0;
  logic              com, l1r, busy;
  logic [15:0]       i2c_scl_oe, i2c_sda_oe, i2c_sda_in;
  logic [31:0][15:0] ctrl_regs;
  logic [15:0]       cmd_pulse;
  logic [6:0]        rst_pulse;

  assign net_status = {16'h0005, 16'h0004, 16'h0003, 16'h0002, 16'h0001};
  // open-drain buses with pull-ups and no device attached
  assign i2c_sda_in = ~i2c_sda_oe;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [15:0] crc_ref(input logic [15:0] w [$], input int from, input int upto);
    logic [15:0] c;
    c = 16'hffff;
    for (int i = from; i <= upto; i++)
      for (int b = 15; b >= 0; b--) begin
        logic fb;
        fb = c[15] ^ w[i][b];
        c = {c[14:0], 1'b0};
        if (fb) c = c ^ 16'h1021;
      end
    return c;
  endfunction

  // ---------- received-frame bookkeeping ----------
  int n_frames = 0, n_bad = 0, n_ack = 0, n_echo = 0, n_unrec = 0, n_regw = 0, n_regrd = 0;
  int n_stat = 0, n_cmd = 0, n_strm_ack = 0, n_strm_status = 0, n_data = 0, n_frag = 0;
  int n_err = 0, n_tw = 0, n_trunc_err = 0;
  logic [15:0] last_ack_seq = 16'hffff;
  logic [15:0] echo_pay [8], regrd_pay [32], stat_pay [32], tw_pay [8], unrec_id, sstat_pay [3];
  int          data_words [int];   // words of data packets per stream id
  logic [15:0] err_code;

  task automatic take_frame(input logic [15:0] f [$]);
    int n, p, cnt;
    n = f.size();
    n_frames++;
    if (n < 32 || f[0] != HOST[47:32] || f[1] != HOST[31:16] || f[2] != HOST[15:0] ||
        f[3] != OWN[47:32] || f[5] != OWN[15:0] || f[6] != MAGIC ||
        f[8] != 16'((n - 6) * 2) || f[n-1] != crc_ref(f, 6, n - 2)) begin
      n_bad++;
      $display("bad frame of %0d words: %p", n, f);
      return;
    end
    cnt = f[9];
    if (cnt == 0) begin
      n_ack++;
      last_ack_seq = f[7];
      return;
    end
    p = 10;
    for (int k = 0; k < cnt; k++) begin
      logic [15:0] id, sz;
      id = f[p]; sz = f[p+2];
      p += 3;
      if (id == OP_ECHO) begin
        n_echo++;
        for (int i = 0; i < 8 && i < sz / 2; i++) echo_pay[i] = f[p+i];
      end else if (id[15:12] == 4'hb) begin
        n_unrec++; unrec_id = id;
      end else if (id == OP_REGWRITE) n_regw++;
      else if (id == OP_REGBLOCK_RD) begin
        n_regrd++;
        for (int i = 0; i < 32; i++) regrd_pay[i] = f[p+i];
      end else if (id == OP_STATREAD) begin
        n_stat++;
        for (int i = 0; i < 32; i++) stat_pay[i] = f[p+i];
      end else if (id == OP_COMMAND) n_cmd++;
      else if (id == OP_STRM_REQ_STATS && sz == 6) begin
        n_strm_status++;
        for (int i = 0; i < 3; i++) sstat_pay[i] = f[p+i];
      end else if (id[15:8] == 8'h00 && id[7:4] == 4'h5) n_strm_ack++;
      else if (id == OP_TWOWIRE) begin
        n_tw++;
        for (int i = 0; i < 8 && i < sz / 2; i++) tw_pay[i] = f[p+i];
      end else if (id[15:8] == DATA_PREFIX) begin
        n_data++;
        if (f[p][7:0] != 0) n_frag++;
        if (!data_words.exists(int'(f[p][15:8]))) data_words[int'(f[p][15:8])] = 0;
        data_words[int'(f[p][15:8])] += sz / 2 - 1;
      end else if (id[15:8] == DESERR_PREFIX) begin
        n_err++;
        err_code = f[p+1];
        if (f[p+1] == ERR_TRUNCEV_TRAILER_TO || f[p+1] == ERR_FRAGEV_TRAILER_TO) n_trunc_err++;
      end
      p += sz / 2;
    end
  endtask

  always @(negedge clk) tx_ready <= !hold_tx && ($urandom_range(0, 7) != 0);

  initial begin
    logic [15:0] f [$];
    forever begin
      @(posedge clk);
      if (rst_n && tx_valid && tx_ready) begin
        f.push_back(tx.data);
        if (tx.last) begin
          take_frame(f);
          f = {};
        end
      end
    end
  end

  // ---------- sending ----------
  // ops: concatenated opcodes (id, seq, size in bytes, payload)
  task automatic send_frame(input logic [15:0] seq, input int nops, input logic [15:0] ops [$],
                            input logic [15:0] magic = MAGIC);
    logic [15:0] w [$];
    w = '{OWN[47:32], OWN[31:16], OWN[15:0], HOST[47:32], HOST[31:16], HOST[15:0], magic, seq,
          16'((ops.size() + 3) * 2), 16'(nops)};
    foreach (ops[i]) w.push_back(ops[i]);
    w.push_back(crc_ref(w, 6, w.size() - 1));
    foreach (w[i]) begin
      @(negedge clk);
      rx_valid = 1'b1;
      rx.data  = w[i];
      rx.last  = (i == w.size() - 1);
    end
    @(negedge clk);
    rx_valid = 1'b0;
    rx.last  = 1'b0;
  endtask

  task automatic wait_ack(input logic [15:0] seq, input int max_cycles);
    int t;
    t = 0;
    while (last_ack_seq != seq && t < max_cycles) begin @(posedge clk); t++; end
    check(last_ack_seq == seq, $sformatf("network ack for packet %0d", seq));
  endtask

  task automatic transact(input logic [15:0] seq, input int nops, input logic [15:0] ops [$]);
    send_frame(seq, nops, ops);
    wait_ack(seq, 20000);
    repeat (50) @(posedge clk);
  endtask


  hsio_top #(
    .N_TOP (4), .N_BOT (4), .N_IDC (4),
    .FIFO_WORDS (64), .FRAG_WORDS (40),
    .TIMEOUT_CYCLES (2000), .TRAILER_TO (300),
    .CLK_HZ (1_600_000), .TB_TICK (4)
  ) dut (.*);

  // ---------- line monitors ----------
  int com_rises = 0, l1r_rises = 0, busy_cycles = 0;
  logic com_d = 1'b0, l1r_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (com && !com_d) com_rises++;
    if (l1r && !l1r_d) l1r_rises++;
    if (busy) busy_cycles++;
    com_d <= com;
    l1r_d <= l1r;
  end

  // serial bits into stream 64
  task automatic put_bits(input logic [63:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge clk);
      stream_bit_en = 1'b1;
      stream_bits[64] = v[i];
    end
    @(negedge clk);
    stream_bit_en = 1'b0;
  endtask

  task automatic pulse_ext_trig;
    @(negedge clk); ext_trig = 1'b1;
    @(negedge clk); ext_trig = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ops [$], m [$];
    int l1r_before, trig_total, nd, cnt_drop;
    rx = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. ECHO
    transact(16'd1, 1, '{OP_ECHO, 16'h0101, 16'd6, 16'h1111, 16'h2222, 16'h3333});
    check(n_echo == 1 && echo_pay[0] == 16'h1111 && echo_pay[2] == 16'h3333, "echo reply");

    // 2. a frame with the wrong type field is dropped: no ack, no reply
    send_frame(16'd99, 1, '{OP_ECHO, 16'h0102, 16'd2, 16'h4444}, 16'h0800);
    repeat (300) @(posedge clk);
    check(n_echo == 1 && last_ack_seq == 16'd1, "frame with wrong magic dropped");
    cnt_drop = (n_echo == 1) ? 1 : 0;

    // 3. register writes, several opcodes in one frame, then a block read
    ops = '{};
    begin
      logic [15:0] rw [11][2];
      rw = '{'{16'd0, 16'h0001}, '{16'd1, 16'h0007}, '{16'd2, 16'h0007}, '{16'd7, 16'd5},
             '{16'd8, 16'd50}, '{16'd24, 16'd3}, '{16'd25, 16'd2}, '{16'd26, 16'd2},
             '{16'd27, 16'd5}, '{16'd28, 16'd3}, '{16'd23, 16'h0000}};
      foreach (rw[i]) ops = {ops, OP_REGWRITE, 16'(16'h0200 + i), 16'd4, rw[i][0], rw[i][1]};
      ops = {ops, OP_REGBLOCK_RD, 16'h0220, 16'd0};
      transact(16'd2, 12, ops);
      repeat (200) @(posedge clk);
      check(n_regw == 11, $sformatf("register write replies %0d", n_regw));
      check(n_regrd == 1 && regrd_pay[1] == 16'h0007 && regrd_pay[8] == 16'd50 && regrd_pay[28] == 16'd3
            && regrd_pay[3] == 16'd0, "block read returns written registers");
      check(ctrl_regs[2] == 16'h0007 && ctrl_regs[7] == 16'd5, "control register outputs");
    end

    // 4. status read
    transact(16'd3, 1, '{OP_STATREAD, 16'h0301, 16'd0});
    repeat (100) @(posedge clk);
    check(n_stat == 1 && stat_pay[0] == 16'h0c02 && stat_pay[1] == 16'ha510 && stat_pay[2] == 16'h4182
          && stat_pay[3] == 16'd3 && stat_pay[10] == 16'h0001 && stat_pay[14] == 16'h0005
          && stat_pay[16] == 16'h0001 && stat_pay[20] == 16'h0001, "status words");

    // 5. stream config: 0 = generator 0, 1 = generator 1, 64 = input pin with busy on delta
    transact(16'd4, 1, '{OP_STRM_CONF_WR, 16'h0401, 16'd14, 16'h00ff,
                        16'd0, 16'h0009, 16'd1, 16'h000b, 16'd64, 16'h0041});
    check(n_strm_ack == 1, "stream config acknowledged");

    // 6. COMMAND: L1 trigger and BCR -> generator events on 0 and 1
    transact(16'd5, 1, '{OP_COMMAND, 16'h0501, 16'd2, 16'h0003});
    repeat (3000) @(posedge clk);
    check(n_cmd == 1, "command reply");
    check(com_rises == 4, $sformatf("COM carried trigger 110 and BCR 1010010 (%0d rising edges)", com_rises));
    check(data_words.exists(0) && data_words[0] == 5, "generator 0 event of LEN0 words");
    check(data_words.exists(1) && data_words[1] == 50, "generator 1 event of LEN1 words");
    check(n_frag >= 1, "event longer than a packet sent in two fragments");

    // 7. status request for stream 0
    m = '{16'h0001, 0, 0, 0, 0, 0, 0, 0, 0};
    transact(16'd6, 1, {OP_STRM_REQ_STATS, 16'h0601, 16'd18, m});
    repeat (300) @(posedge clk);
    check(n_strm_status == 1 && sstat_pay[0][15:8] == 8'd0 && sstat_pay[1] == 16'h0009, "stream status packet");

    // 8. an event on stream 64's input: header 11101, two words, trailer
    put_bits(64'b11101_1010101010101010_1100110011001100_1000000000000000, 5 + 48);
    repeat (500) @(posedge clk);
    check(data_words.exists(64) && data_words[64] >= 3, "deserialised event from the input line");

    // 9. a runaway event: header then only ones -> fragment 0 full, fragment 1
    // full, truncated in fragment 1, FRAGEV trailer timeout error
    nd = n_err;
    put_bits(64'b11101, 5);
    for (int i = 0; i < 100; i++) put_bits(64'hffff, 16);
    repeat (600) @(posedge clk);
    check(n_err > nd && n_trunc_err >= 1, $sformatf("truncated event, trailer timeout error (code %h)", err_code));
    put_bits(64'h8000, 16);
    repeat (500) @(posedge clk);

    // 10. switch generators off, triggers to L1R, then external triggers until busy
    transact(16'd7, 2, '{OP_STRM_CONF_WR, 16'h0701, 16'd10, 16'h0001, 16'd0, 16'h0000, 16'd1, 16'h0000,
                         OP_REGWRITE, 16'h0702, 16'd4, 16'd23, 16'h1000});
    l1r_before = l1r_rises;
    for (int i = 0; i < 40 && !busy; i++) pulse_ext_trig();
    check(busy, "busy raised by triggers without event headers");
    l1r_before = l1r_rises;
    repeat (3) pulse_ext_trig();
    check(l1r_rises == l1r_before, "external triggers vetoed while busy");
    check(com_rises == 4, "triggers went to L1R, not COM");

    // 11. stream reset through COMMAND word 1 clears busy
    transact(16'd8, 1, '{OP_COMMAND, 16'h0801, 16'd4, 16'h0000, 16'h0001});
    repeat (10) @(posedge clk);
    check(!busy, "stream reset clears busy");

    // 12. burst sequencer: 2 bursts of 3 triggers
    l1r_before = l1r_rises;
    transact(16'd9, 1, '{OP_COMMAND, 16'h0901, 16'd2, 16'h0100});
    repeat (2000) @(posedge clk);
    check(l1r_rises - l1r_before == 6, $sformatf("burst sequencer triggers %0d", l1r_rises - l1r_before));
    transact(16'd10, 1, '{OP_STATREAD, 16'h0a01, 16'd0});
    repeat (100) @(posedge clk);
    trig_total = 1 + l1r_rises;
    check(stat_pay[6][2] == 1'b1 && stat_pay[5] == 0, "burst sequencer finished");
    check(stat_pay[8] == 16'(trig_total), $sformatf("L1ID %0d counts all %0d triggers", stat_pay[8], trig_total));

    // 13. TWOWIRE with no device: address byte not acknowledged
    transact(16'd11, 1, '{OP_TWOWIRE, 16'h0b01, 16'd4, 16'h0004, 16'h0c44});
    repeat (100) @(posedge clk);
    check(n_tw == 1 && tw_pay[0] == 16'h0004 && tw_pay[1] == TW_ABORT, "twowire abort reply");

    // 14. unknown opcode: nobody takes it, echoed as 0xB777 after the timeout
    send_frame(16'd12, 1, '{16'h0777, 16'h0c01, 16'd2, 16'h5555});
    wait_ack(16'd12, 5000);
    repeat (100) @(posedge clk);
    check(n_unrec == 1 && unrec_id == 16'hb777, "unrecognised opcode reply");

    // mechanism counts
    $display("frames %0d acks %0d echo %0d unrec %0d regw %0d regrd %0d stat %0d cmd %0d strm_ack %0d",
             n_frames, n_ack, n_echo, n_unrec, n_regw, n_regrd, n_stat, n_cmd, n_strm_ack);
    $display("strm_status %0d data %0d frag %0d err %0d tw %0d com %0d l1r %0d busy_cycles %0d",
             n_strm_status, n_data, n_frag, n_err, n_tw, com_rises, l1r_rises, busy_cycles);
    check(n_bad == 0, "all transmitted frames well formed");
    check(n_ack == 12, "one ack per good frame");
    check(cnt_drop == 1, "dropped frame happened");
    check(n_data >= 4 && n_err >= 1 && n_frag >= 1 && busy_cycles > 0 && com_rises > 0 && l1r_rises > 0,
          "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
