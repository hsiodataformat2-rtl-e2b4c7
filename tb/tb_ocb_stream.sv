// tb_ocb_stream: drives every per-stream opcode and checks the config
// writes, command pulses and status requests that reach the streams (by id
// and by broadcast mask), and the 0xACAC replies.
// Payload layouts, stream masks and 0xACAC follow the protocol; both
// forms of BSTRM_CONF_WR are accepted by this design's choice.
module tb_ocb_stream;
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

  logic         cfg_we, cmd_we;
  logic [143:0] cfg_sel, cmd_sel, stat_req;
  logic [15:0]  cfg_mask, cfg_data, cmd_data;
  logic [15:0]  model [144];
  logic [15:0]  lastcmd [144];
  int           nreq [144];
  ocb_stream dut (.clk, .rst_n, .pkt_seq, .op_valid, .op_ready, .op_hdr, .op_last, .op_data,
                  .op_id, .op_seq, .op_timeout, .rep_valid, .rep_ready, .rep,
                  .cfg_we, .cfg_sel, .cfg_mask, .cfg_data, .cmd_we, .cmd_sel, .cmd_data, .stat_req);
  // a model of the streams' config registers fed by the block's outputs
  always @(posedge clk) begin
    for (int i = 0; i < 144; i++) begin
      if (cfg_we && cfg_sel[i]) model[i] <= (model[i] & ~cfg_mask) | (cfg_data & cfg_mask);
      if (cmd_we && cmd_sel[i]) lastcmd[i] <= cmd_data;
      if (stat_req[i]) nreq[i]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r [$];
    logic [15:0] m [$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    foreach (model[i]) begin model[i] = '0; lastcmd[i] = '0; nreq[i] = 0; end
    fork send_op(16'h0050, 16'h0031, '{16'h00ff, 16'd3, 16'h00c1, 16'd130, 16'hffff}, 10); get_reply(r, 1000); join
    check(body_is(r, '{16'h5a5a, 16'd1, 16'h0050, 16'h0031, 16'd2, 16'hacac}), {"conf_wr reply", show(r)});
    repeat (2) @(posedge clk);
    check(model[3] == 16'h00c1 && model[130] == 16'h00ff && model[4] == 0, "conf write by id with bit mask");
    // broadcast: streams 0, 17, 143 ; bit mask 0x0030, data 0x0010 (capture mode)
    m = '{16'h0001, 16'h0002, 0, 0, 0, 0, 0, 0, 16'h8000, 16'h0030, 16'h0010};
    fork send_op(16'h0052, 16'h0032, m, 22); get_reply(r, 1000); join
    repeat (2) @(posedge clk);
    check(model[0] == 16'h0010 && model[17] == 16'h0010 && model[143] == 16'h0010 && model[3] == 16'h00c1,
          $sformatf("broadcast conf write %h %h %h %h", model[0], model[17], model[143], model[3]));
    // broadcast without bit mask word: all bits written
    m = '{16'h0008, 0, 0, 0, 0, 0, 0, 0, 0, 16'h1234};
    fork send_op(16'h0052, 16'h0033, m, 20); get_reply(r, 1000); join
    repeat (2) @(posedge clk);
    check(model[3] == 16'h1234 && model[0] == 16'h0010, "broadcast conf write, 10-word form");
    fork send_op(16'h005c, 16'h0034, '{16'd64, 16'h8000, 16'd65, 16'h0001}, 8); get_reply(r, 1000); join
    repeat (2) @(posedge clk);
    check(lastcmd[64] == 16'h8000 && lastcmd[65] == 16'h0001 && lastcmd[66] == 0, "stream command by id");
    m = '{0, 0, 0, 0, 16'h0001, 0, 0, 0, 16'h0001, 16'h8000};
    fork send_op(16'h005e, 16'h0035, m, 20); get_reply(r, 1000); join
    repeat (2) @(posedge clk);
    check(lastcmd[64] == 16'h8000 && lastcmd[128] == 16'h8000 && lastcmd[65] == 16'h0001, "broadcast stream command");
    m = '{16'h0005, 0, 0, 0, 0, 0, 0, 0, 16'h0100};
    fork send_op(16'h0051, 16'h0036, m, 18); get_reply(r, 1000); join
    repeat (2) @(posedge clk);
    check(nreq[0] == 1 && nreq[2] == 1 && nreq[136] == 1 && nreq[1] == 0, "status request mask");
    check(body_is(r, '{16'h5a5a, 16'd1, 16'h0051, 16'h0036, 16'd2, 16'hacac}), {"req_stats reply", show(r)});


    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
