// tb_ocb_command: sends COMMAND with one and with two mask words and
// RESET_OCB, and checks that each mask bit becomes exactly one pulse and
// that each opcode is answered with 0xACAC.
// The mask-bit meanings are the protocol's; the reply word and
// the pulse timing are this design's choices.
module tb_ocb_command;
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

  logic [15:0] cmd_pulse;
  logic [6:0]  rst_pulse;
  int          n_cmd [16];
  int          n_rst [7];
  ocb_command dut (.clk, .rst_n, .pkt_seq, .op_valid, .op_ready, .op_hdr, .op_last, .op_data,
                   .op_id, .op_seq, .op_timeout, .rep_valid, .rep_ready, .rep, .cmd_pulse, .rst_pulse);
  always @(posedge clk) begin
    for (int i = 0; i < 16; i++) if (cmd_pulse[i]) n_cmd[i]++;
    for (int i = 0; i < 7; i++)  if (rst_pulse[i]) n_rst[i]++;
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

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    foreach (n_cmd[i]) n_cmd[i] = 0;
    foreach (n_rst[i]) n_rst[i] = 0;
    fork send_op(16'h0030, 16'h0021, '{16'h8107}, 2); get_reply(r, 1000); join
    check(body_is(r, '{16'h5a5a, 16'd1, 16'h0030, 16'h0021, 16'd2, 16'hacac}), {"command reply", show(r)});
    fork send_op(16'h0030, 16'h0022, '{16'h0001, 16'h0041}, 4); get_reply(r, 1000); join
    fork send_op(16'h00f0, 16'h0023, '{16'h1234}, 2); get_reply(r, 1000); join
    check(body_is(r, '{16'h5a5a, 16'd1, 16'h00f0, 16'h0023, 16'd2, 16'hacac}), {"reset_ocb reply", show(r)});
    repeat (3) @(posedge clk);
    for (int i = 0; i < 16; i++)
      check(n_cmd[i] == ((i == 0) ? 2 : (i == 1 || i == 2 || i == 8 || i == 15) ? 1 : 0),
            $sformatf("cmd bit %0d pulses %0d", i, n_cmd[i]));
    for (int i = 0; i < 7; i++)
      check(n_rst[i] == ((i == 0 || i == 6) ? 1 : (i == 2) ? 1 : 0), $sformatf("rst bit %0d pulses %0d", i, n_rst[i]));


    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
