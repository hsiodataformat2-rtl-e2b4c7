// tb_com_encoder: records the COM and L1R lines and checks the bit
// patterns of trigger (110), BCR (1010010) and ECR (1010100), queuing of
// requests that arrive together (trigger first), the L1R alternative, the
// output enables, and the BCID / L1ID / BCID-at-L1A counters.
// The bit patterns and counter resets checked are the protocol's; the
// one-bit-per-clock timing and the queue order are this design's choices.
module tb_com_encoder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        trig_in = 0, bcr_in = 0, ecr_in = 0, bcid_rst = 0, l1id_rst = 0, dest_l1r = 0;
  logic [2:0]  out_en = 3'b111;
  logic        com, l1r, com_start;
  logic [11:0] bcid, bcid_l1a;
  logic [23:0] l1id;

  com_encoder dut (.clk, .rst_n, .trig_in, .bcr_in, .ecr_in, .bcid_rst, .l1id_rst, .dest_l1r, .out_en,
                   .com, .l1r, .com_start, .bcid, .l1id, .bcid_l1a);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string line_com = "", line_l1r = "";
  always @(posedge clk) if (rst_n) begin
    line_com = {line_com, com ? "1" : "0"};
    line_l1r = {line_l1r, l1r ? "1" : "0"};
  end

  task automatic reset_lines();
    @(negedge clk);
    line_com = ""; line_l1r = "";
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (100) @(posedge clk);
    check(bcid == 12'd100 || bcid == 12'd101, $sformatf("bcid counts clocks (%0d)", bcid));
    reset_lines();
    trig_in = 1; @(negedge clk); trig_in = 0;
    repeat (6) @(negedge clk);
    check(line_com == "0011000", $sformatf("trigger on COM: %s", line_com));
    check(l1id == 24'd1 && bcid_l1a > 12'd99, "L1ID and BCID at L1A");
    reset_lines();
    bcr_in = 1; ecr_in = 1; trig_in = 1; @(negedge clk); bcr_in = 0; ecr_in = 0; trig_in = 0;
    repeat (20) @(negedge clk);
    check(line_com == {"00", "110", "1010010", "1010100", "00"}, $sformatf("queued commands: %s", line_com));
    check(l1id == 24'd0 && bcid == 12'd20, $sformatf("ECR clears L1ID, BCR/ECR clear BCID (%0d %0d)", l1id, bcid));
    reset_lines();
    dest_l1r = 1;
    trig_in = 1; @(negedge clk); trig_in = 0;
    repeat (5) @(negedge clk);
    check(line_l1r == "001000" && line_com == "000000", $sformatf("trigger on L1R: %s / %s", line_l1r, line_com));
    reset_lines();
    out_en = 3'b000;
    dest_l1r = 0;
    trig_in = 1; @(negedge clk); trig_in = 0;
    repeat (5) @(negedge clk);
    check(line_com == "000000" && l1id == 24'd2, "disabled output still counts");
    @(negedge clk); l1id_rst = 1; bcid_rst = 1; @(negedge clk); l1id_rst = 0; bcid_rst = 0;
    check(l1id == 0 && bcid == 12'd0, "counter reset commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
