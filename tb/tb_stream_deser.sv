// tb_stream_deser: sends bit streams into the deserialiser and compares
// the words with a reference packer in the testbench. Header/trailer mode:
// noise without a header, then events of several lengths (so the trailer
// ends at different bit positions), each followed by idle zeros. Capture
// mode: a go pulse with a length that is not a multiple of 16 words.
// The two modes and the capture rounding follow the protocol; the
// header and trailer patterns are this design's assumptions.
module tb_stream_deser;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]  mode = 2'b00;
  logic        bit_en = 1'b0, bit_in = 1'b0, go = 1'b0, clr = 1'b0;
  logic [15:0] cap_len = 16'd0;
  logic        w_valid, w_sof, w_eof, hdr_pulse;
  logic [15:0] w_data;

  stream_deser dut (.clk, .rst_n, .clr, .mode, .bit_en, .bit_in, .go, .cap_len,
                    .w_valid, .w_data, .w_sof, .w_eof, .hdr_pulse);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [15:0] d; bit sof; bit eof; } w_t;
  w_t got [$], exp [$];
  int nhdr = 0;
  always @(posedge clk) begin
    if (w_valid) got.push_back('{w_data, w_sof, w_eof});
    if (hdr_pulse) nhdr++;
  end

  task automatic send_bit(input logic b);
    @(negedge clk);
    bit_en = 1'b1;
    bit_in = b;
    @(negedge clk);
    bit_en = 1'b0;     // one idle cycle between bits
  endtask

  // reference: pack a bit list into words, last one left-aligned
  task automatic expect_event(input bit bits [$]);
    logic [15:0] acc;
    int n;
    acc = '0; n = 0;
    foreach (bits[i]) begin
      acc = {acc[14:0], bits[i]};
      n++;
      if (n == 16 || i == bits.size() - 1) begin
        exp.push_back('{acc << (16 - n), (exp.size() == 0) || exp[$].eof, i == bits.size() - 1});
        acc = '0; n = 0;
      end
    end
  endtask

  initial begin
    bit ev [$];
    int nev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // noise: never five bits 11101
    repeat (40) send_bit(1'b0);
    for (int i = 0; i < 20; i++) begin send_bit(1'b1); send_bit(1'b0); end
    nev = 0;
    for (int len = 3; len < 40; len += 7) begin
      ev = '{1, 1, 1, 0, 1};
      // payload that never contains the trailer pattern (1 followed by 15 zeros)
      for (int i = 0; i < len; i++) ev.push_back((i % 3) != 2);
      ev.push_back(1);
      repeat (15) ev.push_back(0);
      expect_event(ev);
      foreach (ev[i]) send_bit(ev[i]);
      repeat (10) send_bit(1'b0);
      nev++;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL: %0d words, expected %0d", got.size(), exp.size());
    end else foreach (exp[i]) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        $display("FAIL: word %0d %04h sof=%0d eof=%0d expected %04h %0d %0d", i, got[i].d, got[i].sof, got[i].eof,
                 exp[i].d, exp[i].sof, exp[i].eof);
      end
    end
    checks++;
    if (nhdr != nev) begin failures++; $display("FAIL: %0d headers, expected %0d", nhdr, nev); end
    // capture mode: 37 words requested -> 32 captured
    got = {}; exp = {};
    mode = 2'b01;
    cap_len = 16'd37;
    @(negedge clk); go = 1'b1; @(negedge clk); go = 1'b0;
    ev = {};
    for (int i = 0; i < 40 * 16; i++) ev.push_back(1'($urandom));
    foreach (ev[i]) send_bit(ev[i]);
    ev = ev[0:32*16-1];
    expect_event(ev);
    repeat (5) @(posedge clk);
    checks++;
    if (got.size() != 32 || got != exp) begin
      failures++;
      $display("FAIL: capture gave %0d words", got.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
