// tb_hsio_top_full: one complete operation of the HSIO core at its full
// default size (48 + 48 + 8 streams, 768-word stream FIFOs, 742-word
// fragments). The testbench acts as the host: it echoes a packet, sets
// LEN0/LEN1 and the interrupt enables, configures stream 0 (top), stream
// 64 (bottom) and stream 128 (IDC) as counter generators, fires one L1
// trigger with COMMAND and checks that each of the three streams delivers
// its event in correctly framed packets (the 800-word event of stream 64
// in two fragments), that COM carried the trigger, and that every frame's
// length and CRC are right.
// Sizes are the protocol's (1.5 kB FIFOs, 48/48/8 streams); the frame
// CRC and the generator data pattern are this design's choices.
module tb_hsio_top_full;
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


  hsio_top dut (.*);

  int com_rises = 0;
  logic com_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (com && !com_d) com_rises++;
    com_d <= com;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    transact(16'd1, 1, '{OP_ECHO, 16'h0101, 16'd4, 16'hbeef, 16'h1234});
    check(n_echo == 1 && echo_pay[0] == 16'hbeef && echo_pay[1] == 16'h1234, "echo reply");
    transact(16'd2, 4, '{OP_REGWRITE, 16'h0201, 16'd4, 16'd1, 16'h0007,
                         OP_REGWRITE, 16'h0202, 16'd4, 16'd2, 16'h0007,
                         OP_REGWRITE, 16'h0203, 16'd4, 16'd7, 16'd100,
                         OP_REGWRITE, 16'h0204, 16'd4, 16'd8, 16'd800});
    check(n_regw == 4, "register writes");
    transact(16'd3, 1, '{OP_STRM_CONF_WR, 16'h0301, 16'd14, 16'h00ff,
                        16'd0, 16'h0009, 16'd64, 16'h000b, 16'd128, 16'h0009});
    transact(16'd4, 1, '{OP_STATREAD, 16'h0401, 16'd0});
    repeat (100) @(posedge clk);
    check(n_stat == 1 && stat_pay[3] == 16'd26 && stat_pay[16] == 16'h0fff && stat_pay[20] == 16'h0003,
          "status words at full size");
    transact(16'd5, 1, '{OP_COMMAND, 16'h0501, 16'd2, 16'h0001});
    repeat (8000) @(posedge clk);
    check(com_rises == 1, "trigger on COM");
    check(data_words.exists(0) && data_words[0] == 100, "top stream event");
    check(data_words.exists(64) && data_words[64] == 800 && n_frag == 1, "bottom stream event in two fragments");
    check(data_words.exists(128) && data_words[128] == 100, "IDC stream event");
    check(n_bad == 0 && n_ack == 5, "frames well formed, one ack per request");
    $display("frames %0d data packets %0d", n_frames, n_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
