// tb_pkt_tx_builder: sends a short body (frame must be padded to 64
// bytes) and a long body (no padding) through the frame builder with
// random output stalls, and checks every frame word: MAC addresses, magic,
// sequence, length, count, body, zero padding and the CRC trailer, which
// the testbench computes itself bit by bit.
// Frame layout and 64-byte padding follow the protocol; the CRC
// polynomial (0x1021, init 0xFFFF) and own MAC are this design's choices.
module tb_pkt_tx_builder;
  import hsio_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 1'b0, in_ready, tx_valid, tx_ready = 1'b1;
  word_t       in, tx;
  logic [47:0] peer_mac = 48'h0a0b_0c0d_0e0f;
  localparam logic [47:0] OWN = 48'h02_48_53_49_4f_00;

  pkt_tx_builder dut (.clk, .rst_n, .in_valid, .in_ready, .in, .peer_mac, .tx_valid, .tx_ready, .tx);

  always @(negedge clk) tx_ready <= 1'($urandom_range(0, 3) != 0);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] crc_ref(input logic [15:0] w [$]);
    logic [15:0] c;
    c = 16'hffff;
    foreach (w[i])
      for (int b = 15; b >= 0; b--) begin
        logic fb;
        fb = c[15] ^ w[i][b];
        c = {c[14:0], 1'b0};
        if (fb) c = c ^ 16'h1021;
      end
    return c;
  endfunction

  task automatic send_body(input logic [15:0] b [$]);
    foreach (b[i]) begin
      @(negedge clk);
      in_valid = 1'b1;
      in.data  = b[i];
      in.last  = (i == b.size() - 1);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic get_frame(output logic [15:0] f [$]);
    f = {};
    forever begin
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        f.push_back(tx.data);
        if (tx.last) return;
      end
    end
  endtask

  task automatic check_frame(input logic [15:0] b [$]);
    logic [15:0] f [$], exp [$], crcspan [$];
    int total;
    fork send_body(b); get_frame(f); join
    total = (b.size() + 9 < 32) ? 32 : b.size() + 9;
    exp = '{peer_mac[47:32], peer_mac[31:16], peer_mac[15:0], OWN[47:32], OWN[31:16], OWN[15:0],
            MAGIC, b[0], 16'((total - 6) * 2), b[1]};
    for (int i = 2; i < b.size(); i++) exp.push_back(b[i]);
    while (exp.size() < total - 1) exp.push_back(16'h0);
    crcspan = exp[6:$];
    exp.push_back(crc_ref(crcspan));
    checks++;
    if (f.size() != exp.size()) begin
      failures++;
      $display("FAIL: frame length %0d, expected %0d", f.size(), exp.size());
    end else begin
      foreach (exp[i]) begin
        checks++;
        if (f[i] !== exp[i]) begin
          failures++;
          $display("FAIL: word %0d = %04h, expected %04h", i, f[i], exp[i]);
        end
      end
    end
  endtask

  initial begin
    logic [15:0] b [$];
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_frame('{16'h1234, 16'd1, 16'h0003, 16'h0005, 16'd2, 16'hbeef});
    b = '{16'h0042, 16'd1, 16'h0019, 16'h0001, 16'd64};
    for (int i = 0; i < 40; i++) b.push_back(16'($urandom));
    check_frame(b);
    check_frame('{16'h0007, 16'd0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
