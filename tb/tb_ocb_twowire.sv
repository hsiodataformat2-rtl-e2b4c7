// tb_ocb_twowire: runs a TWOWIRE opcode against a behavioural I2C slave
// (7-bit address 0x22, as written 0x44/0x45) on channel 4: a register
// write with start and stop, a read of two bytes and one byte with stop, a
// packetlet separator, then a second packetlet at 10 kHz addressing a
// missing slave, which must abort and fill the rest of the reply with
// 0xF00B. Checks the reply, the bytes the slave received, the master's
// acknowledge/no-acknowledge on reads and the bit period of both clocks.
// Word layouts, separator and 0xF00B fill are the protocol's; the
// slave model, its address and the reduced clock are the testbench's own.
module tb_ocb_twowire;
  import hsio_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [15:0] pkt_seq = 16'h5a5a;
  logic        op_valid = 1'b0, op_hdr = 1'b0, op_last = 1'b0, op_timeout = 1'b0;
  logic [15:0] op_data = '0, op_id = '0, op_seq = '0, op_size = '0;
  logic        op_ready;
  logic        rep_valid, rep_ready = 1'b1;
  word_t       rep;
  logic [15:0] got [$];
  bit          stall_rep = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // offer one opcode on the bus: header beat then payload words
  task automatic send_op(input logic [15:0] id, input logic [15:0] seq,
                         input logic [15:0] pay [$], input int nbytes);
    for (int b = 0; b <= pay.size(); b++) begin
      @(negedge clk);
      op_id    = id;
      op_seq   = seq;
      op_size  = 16'(nbytes);
      op_valid = 1'b1;
      op_hdr   = (b == 0);
      op_data  = (b == 0) ? id : pay[b-1];
      op_last  = (b == pay.size());
      #1;
      while (!op_ready) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
    end
    @(negedge clk);
    op_valid = 1'b0;
    op_hdr   = 1'b0;
    op_last  = 1'b0;
  endtask

  // collect one reply body (up to its last word)
  task automatic get_reply(output logic [15:0] body [$], input int max_cycles);
    body = {};
    for (int c = 0; c < max_cycles; c++) begin
      @(posedge clk);
      if (rep_valid && rep_ready) begin
        body.push_back(rep.data);
        if (rep.last) return;
      end
    end
    failures++;
    $display("FAIL: reply timed out");
  endtask

  always @(negedge clk) rep_ready <= stall_rep ? 1'($urandom_range(0, 1)) : 1'b1;

  function automatic bit body_is(input logic [15:0] a [$], input logic [15:0] b [$]);
    if (a.size() != b.size()) return 1'b0;
    foreach (a[i]) if (a[i] !== b[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic string show(input logic [15:0] a [$]);
    string s;
    s = "";
    foreach (a[i]) s = {s, $sformatf(" %04h", a[i])};
    return s;
  endfunction

  localparam int CLK = 1_600_000;   // 100 kHz -> 16 cycles per bit
  logic [15:0] scl_oe, sda_oe, sda_in;
  ocb_twowire #(.N_CH(16), .CLK_HZ(CLK)) dut (
    .clk, .rst_n, .pkt_seq, .op_valid, .op_ready, .op_hdr, .op_last, .op_data, .op_id, .op_seq, .op_size,
    .op_timeout, .rep_valid, .rep_ready, .rep, .scl_oe, .sda_oe, .sda_in);

  // ---- behavioural I2C slave on channel 4 ----
  logic s_pull = 1'b0;
  wire  scl = !scl_oe[4];
  wire  sda = !(sda_oe[4] || s_pull);
  always_comb begin
    sda_in    = '1;
    sda_in[4] = sda;
  end
  typedef enum {SL_IDLE, SL_ADDR, SL_WRITE, SL_READ} sl_e;
  sl_e        sl = SL_IDLE;
  int         bitcnt = 0;
  logic [7:0] sh = 0, txb = 8'ha0;
  bit         rw = 0, mack = 0, acking = 0;
  logic [7:0] written [$];
  int         n_mack = 0, n_mnack = 0, n_start = 0, n_stop = 0;
  int         t_now = 0, last_rise = 0, periods [$];
  always @(posedge clk) t_now++;

  always @(negedge sda) if (scl && rst_n) begin sl = SL_ADDR; bitcnt = 0; s_pull = 0; n_start++; end
  always @(posedge sda) if (scl && rst_n) begin sl = SL_IDLE; s_pull = 0; n_stop++; end
  always @(posedge scl) begin
    periods.push_back(t_now - last_rise);
    last_rise = t_now;
    bitcnt++;
    if (bitcnt <= 8 && (sl == SL_ADDR || sl == SL_WRITE)) sh = {sh[6:0], sda};
    if (bitcnt == 9 && sl == SL_READ) begin
      mack = !sda;
      if (mack) n_mack++; else n_mnack++;
    end
  end
  always @(negedge scl) begin
    if (sl == SL_ADDR && bitcnt == 8) begin
      rw = sh[0];
      acking = (sh[7:1] == 7'h22);
      s_pull = acking;
      if (!acking) sl = SL_IDLE;
    end else if (sl == SL_WRITE && bitcnt == 8) begin
      written.push_back(sh);
      s_pull = 1;
    end else if (bitcnt == 9 && (sl == SL_ADDR || sl == SL_WRITE)) begin
      s_pull = 0;
      bitcnt = 0;
      if (sl == SL_ADDR && rw) begin sl = SL_READ; s_pull = !txb[7]; end
      else if (sl == SL_ADDR) sl = SL_WRITE;
    end else if (sl == SL_READ) begin
      if (bitcnt < 8) s_pull = !txb[7 - bitcnt];
      else if (bitcnt == 8) s_pull = 0;
      else begin
        bitcnt = 0;
        txb++;
        if (mack) s_pull = !txb[7]; else begin s_pull = 0; sl = SL_IDLE; end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r [$];
    logic [15:0] req [$];
    logic [15:0] exp [$];
    int p100, p10;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    req = '{16'h0004, 16'h0c44, 16'h0402, 16'h14f8, 16'h0c45, 16'h0200, 16'h1100,
            16'he000, 16'h0014, 16'h0c50, 16'h0200};
    fork send_op(16'h0080, 16'h0009, req, 22); get_reply(r, 300000); join
    exp = '{16'h5a5a, 16'd1, 16'h0080, 16'h0009, 16'd22,
            16'h0004, 16'h0c44, 16'h0402, 16'h14f8, 16'h0c45, 16'ha0a1, 16'h00a2,
            16'he000, 16'h0014, 16'hf00b, 16'hf00b};
    check(body_is(r, exp), {"twowire reply", show(r)});
    check(written.size() == 2 && written[0] == 8'h02 && written[1] == 8'hf8, $sformatf("slave received %p", written));
    check(n_mack == 2 && n_mnack == 1, $sformatf("master ack %0d nack %0d", n_mack, n_mnack));
    check(n_start == 3 && n_stop == 3, $sformatf("starts %0d stops %0d", n_start, n_stop));
    p100 = 0; p10 = 0;
    foreach (periods[i]) begin
      if (periods[i] == 16) p100++;
      if (periods[i] == 160) p10++;
    end
    check(p100 > 20 && p10 > 5, $sformatf("bit periods 100k:%0d 10k:%0d", p100, p10));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
