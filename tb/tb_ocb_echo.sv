// tb_ocb_echo: checks that ECHO opcodes come back unchanged, that an
// opcode flagged by the packet handler's timeout comes back with 0xB in the
// top nibble of its id, that odd byte sizes are kept, and that other
// opcodes are left alone. Reply stalls are applied at random.
// The echo and 0xBnnn rules are the protocol's; the opcode-bus
// handshake used to drive the block is this design's own.
module tb_ocb_echo;
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

  logic unrecog;
  int   n_unrecog = 0;
  ocb_echo dut (.clk, .rst_n, .pkt_seq, .op_valid, .op_ready, .op_hdr, .op_last, .op_data,
                .op_id, .op_seq, .op_size, .op_timeout, .rep_valid, .rep_ready, .rep,
                .unrecog_pulse (unrecog));
  always @(posedge clk) if (rst_n && unrecog) n_unrecog++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r [$];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    stall_rep = 1'b1;
    fork send_op(16'h0003, 16'h0011, '{16'h1111, 16'h2222, 16'h3333}, 5); get_reply(r, 1000); join
    check(body_is(r, '{16'h5a5a, 16'd1, 16'h0003, 16'h0011, 16'd5, 16'h1111, 16'h2222, 16'h3333}),
          {"echo reply", show(r)});
    fork send_op(16'h0003, 16'h0012, '{}, 0); get_reply(r, 1000); join
    check(body_is(r, '{16'h5a5a, 16'd1, 16'h0003, 16'h0012, 16'd0}), {"empty echo", show(r)});
    // unknown opcode: not taken until the timeout flag is raised
    @(negedge clk);
    op_id = 16'h0123; op_seq = 16'h0013; op_size = 16'd2; op_valid = 1'b1; op_hdr = 1'b1;
    op_data = 16'h0123; op_last = 1'b0;
    repeat (10) begin
      @(negedge clk); #1;
      check(!op_ready, "unknown opcode not taken before timeout");
    end
    op_timeout = 1'b1;
    op_valid = 1'b0;
    fork
      begin send_op(16'h0123, 16'h0013, '{16'hcafe}, 2); op_timeout = 1'b0; end
      get_reply(r, 1000);
    join
    check(body_is(r, '{16'h5a5a, 16'd1, 16'hb123, 16'h0013, 16'd2, 16'hcafe}), {"unrecognised reply", show(r)});
    check(n_unrecog == 1, "one unrecognised pulse");


    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
