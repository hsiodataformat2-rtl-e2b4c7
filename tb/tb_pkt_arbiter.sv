// tb_pkt_arbiter: three sources offer packets of random length at random
// times; checks that packets leave whole (never interleaved), that no word
// is lost or reordered, that a fixed-priority arbiter lets source 0 go
// first when several wait, and that round robin takes the sources in
// turn (0, 1, 2, 0, ...) while all wait and serves them all.
// Ack-first priority follows the protocol; packet-granular round robin
// among streams is this design's choice.
module tb_pkt_arbiter;
  import hsio_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 3;
  logic [N-1:0] v_f, r_f, v_r, r_r;
  word_t        d_f [N], d_r [N];
  logic         ov_f, ov_r, or_f = 1'b1, or_r = 1'b1;
  word_t        o_f, o_r;

  pkt_arbiter #(.N_IN(N), .ROUND_ROBIN(1'b0)) dut_f (.clk, .rst_n, .in_valid (v_f), .in_ready (r_f), .in (d_f),
                                                       .out_valid (ov_f), .out_ready (or_f), .out (o_f));
  pkt_arbiter #(.N_IN(N), .ROUND_ROBIN(1'b1)) dut_r (.clk, .rst_n, .in_valid (v_r), .in_ready (r_r), .in (d_r),
                                                       .out_valid (ov_r), .out_ready (or_r), .out (o_r));

  // sources: packet p of source s has words {s, p, k}
  int sent_f [N], sent_r [N];
  int k_f [N], k_r [N], len_f [N], len_r [N];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    or_f <= 1'($urandom_range(0, 3) != 0);
    or_r <= 1'($urandom_range(0, 3) != 0);
  end

  always_comb
    for (int s = 0; s < N; s++) begin
      d_f[s].data = {4'(s), 6'(sent_f[s]), 6'(k_f[s])};
      d_f[s].last = (k_f[s] == len_f[s] - 1);
      d_r[s].data = {4'(s), 6'(sent_r[s]), 6'(k_r[s])};
      d_r[s].last = (k_r[s] == len_r[s] - 1);
    end

  int npk = 0;
  initial begin
    v_f = '0; v_r = '0;
    foreach (sent_f[s]) begin sent_f[s] = 0; sent_r[s] = 0; k_f[s] = 0; k_r[s] = 0; len_f[s] = 3; len_r[s] = 2 + s; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // all sources ready at once: fixed priority must serve 0,1,2 in order
    @(negedge clk);
    v_f = '1;
    v_r = '1;
  end

  // advance sources on accepted words
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < N; s++) begin
      if (v_f[s] && r_f[s]) begin
        if (d_f[s].last) begin
          k_f[s] <= 0; sent_f[s] <= sent_f[s] + 1; len_f[s] <= $urandom_range(1, 6);
          if (sent_f[s] >= 9) v_f[s] <= 1'b0;
        end else k_f[s] <= k_f[s] + 1;
      end
      if (v_r[s] && r_r[s]) begin
        if (d_r[s].last) begin
          k_r[s] <= 0; sent_r[s] <= sent_r[s] + 1; len_r[s] <= $urandom_range(1, 6);
          if (sent_r[s] >= 9) v_r[s] <= 1'b0;
        end else k_r[s] <= k_r[s] + 1;
      end
    end
  end

  // output checkers
  int cur_f = -1, cur_r = -1, exp_k_f = 0, exp_k_r = 0, first_src [$], rr_order [$], rr_seen [N], nwords = 0;
  always @(posedge clk) if (rst_n) begin
    if (ov_f && or_f) begin
      int s;
      s = int'(o_f.data[15:12]);
      if (cur_f < 0) begin cur_f = s; exp_k_f = 0; if (first_src.size() < 3) first_src.push_back(s); end
      checks++;
      if (s != cur_f || int'(o_f.data[5:0]) != exp_k_f) begin
        failures++;
        $display("FAIL: fixed arbiter word %04h within packet of source %0d", o_f.data, cur_f);
      end
      exp_k_f++;
      if (o_f.last) cur_f = -1;
    end
    if (ov_r && or_r) begin
      int s;
      s = int'(o_r.data[15:12]);
      if (cur_r < 0) begin cur_r = s; exp_k_r = 0; rr_seen[s]++; if (rr_order.size() < 6) rr_order.push_back(s); end
      checks++;
      if (s != cur_r || int'(o_r.data[5:0]) != exp_k_r) begin
        failures++;
        $display("FAIL: round-robin word %04h within packet of source %0d", o_r.data, cur_r);
      end
      exp_k_r++;
      if (o_r.last) cur_r = -1;
    end
  end

  initial begin
    wait (rst_n);
    wait (v_f != 0);
    wait (v_f == 0 && v_r == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (!(first_src.size() == 3 && first_src[0] == 0 && first_src[1] == 0)) begin
      failures++;
      $display("FAIL: fixed priority order %p", first_src);
    end
    checks++;
    if (rr_order != '{0, 1, 2, 0, 1, 2}) begin
      failures++;
      $display("FAIL: round-robin order %p", rr_order);
    end
    for (int s = 0; s < N; s++) begin
      checks++;
      if (rr_seen[s] != 10 || sent_f[s] != 10) begin
        failures++;
        $display("FAIL: source %0d packets rr=%0d fixed=%0d", s, rr_seen[s], sent_f[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
