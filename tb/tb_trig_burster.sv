// tb_trig_burster: runs 2 bursts of 3 triggers with TICK=4. With
// pmin = pmax = 5 units the gap before every trigger must be exactly 20
// cycles, and the dead time between bursts 3 units more; then checks
// random periods stay inside [pmin, pmax], that busy freezes the sequence
// for exactly as long as it lasts, the counters and the flags.
// Register meanings and the 400 ns unit follow the protocol; the
// random generator and the flag layout are this design's choices.
module tb_trig_burster;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0, stop = 0, busy = 0, trig;
  logic [15:0] n_trigs = 3, n_bursts = 2, pmin = 5, pmax = 5, pdead = 3, tcount, bcount, flags;

  trig_burster #(.TICK(4)) dut (.clk, .rst_n, .start, .stop, .busy, .n_trigs, .n_bursts, .pmin, .pmax, .pdead,
                                .trig, .tcount, .bcount, .flags);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_now = 0, times [$];
  always @(posedge clk) begin
    t_now++;
    if (trig) times.push_back(t_now);
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(flags == 16'h0001, "ready before start");
    start = 1; @(negedge clk); start = 0;
    t0 = t_now;
    check(flags[1], "running");
    wait (flags[2]);
    repeat (2) @(posedge clk);
    check(times.size() == 6, $sformatf("%0d triggers", times.size()));
    if (times.size() == 6) begin
      check(times[0] - t0 == 21, $sformatf("first trigger after %0d cycles", times[0] - t0));  // start taken, then 5 units of 4 cycles
      check(times[1] - times[0] == 20 && times[2] - times[1] == 20, "period inside burst");
      check(times[3] - times[2] == 12 + 20, $sformatf("dead time gap %0d", times[3] - times[2]));
      check(times[5] - times[4] == 20, "period in second burst");
    end
    check(flags == 16'h0005 && bcount == 0, "finished flags");
    // random periods with a busy pause
    times = {};
    n_trigs = 20; n_bursts = 1; pmin = 2; pmax = 9;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (30) @(posedge clk);
    @(negedge clk); busy = 1;
    repeat (1000) @(posedge clk);
    check(times.size() < 20 && flags[1], "paused while busy");
    @(negedge clk); busy = 0;
    wait (flags[2]);
    repeat (2) @(posedge clk);
    check(times.size() == 20, "20 random triggers");
    for (int i = 1; i < times.size(); i++)
      if (!(times[i] - times[i-1] >= 8 && times[i] - times[i-1] <= 36 ||
            times[i] - times[i-1] >= 1000 + 8 && times[i] - times[i-1] <= 1000 + 36))
        check(0, $sformatf("random gap %0d", times[i] - times[i-1]));
      else checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
