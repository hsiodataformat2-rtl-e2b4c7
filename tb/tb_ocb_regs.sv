// tb_ocb_regs: writes single registers and the whole block, reads the
// block back, and compares register contents and replies with a model
// array kept by the testbench.
// Opcode ids and payloads are the protocol's; the reply contents are
// this design's choice.
module tb_ocb_regs;
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

  logic [31:0][15:0] regs;
  logic [15:0] model [32];
  ocb_regs dut (.clk, .rst_n, .pkt_seq, .op_valid, .op_ready, .op_hdr, .op_last, .op_data,
                .op_id, .op_seq, .op_timeout, .rep_valid, .rep_ready, .rep, .regs);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r [$];
    logic [15:0] blk [$];
    logic [15:0] exp [$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    foreach (model[i]) model[i] = '0;
    stall_rep = 1'b1;
    fork send_op(16'h0010, 16'h0001, '{16'd23, 16'h40a0}, 4); get_reply(r, 1000); join
    model[23] = 16'h40a0;
    check(body_is(r, '{16'h5a5a, 16'd1, 16'h0010, 16'h0001, 16'd4, 16'd23, 16'h40a0}), {"regwrite reply", show(r)});
    check(regs[23] == 16'h40a0, "reg 23 written");
    blk = {};
    for (int i = 0; i < 32; i++) begin
      blk.push_back(16'(i * 16'h0101 + 16'h1000));
      model[i] = 16'(i * 16'h0101 + 16'h1000);
    end
    fork send_op(16'h0014, 16'h0002, blk, 64); get_reply(r, 2000); join
    exp = '{16'h5a5a, 16'd1, 16'h0014, 16'h0002, 16'd64};
    foreach (model[i]) exp.push_back(model[i]);
    check(body_is(r, exp), {"block write reply", show(r)});
    fork send_op(16'h0010, 16'h0003, '{16'd5, 16'hbeef}, 4); get_reply(r, 1000); join
    model[5] = 16'hbeef;
    fork send_op(16'h0015, 16'h0004, '{}, 0); get_reply(r, 2000); join
    exp = '{16'h5a5a, 16'd1, 16'h0015, 16'h0004, 16'd64};
    foreach (model[i]) exp.push_back(model[i]);
    check(body_is(r, exp), {"block read reply", show(r)});
    for (int i = 0; i < 32; i++) check(regs[i] == model[i], $sformatf("reg %0d", i));


    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
