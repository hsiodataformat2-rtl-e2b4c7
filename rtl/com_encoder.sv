// com_encoder: COM / L1R command serialiser with BCID and L1ID counters.
//
// Requests (one-cycle pulses) for an L1 trigger, a BCR or an ECR are
// queued and sent one bit per clock, most significant bit first, on the
// COM line: trigger 110, BCR 1010010, ECR 1010100. With dest_l1r set a
// trigger is instead sent as 10 on the separate L1R line (at the same time
// as COM traffic). Waiting requests are served trigger first, then BCR,
// then ECR; a request repeated while one of its kind is waiting is merged.
// A request is only sent if its bit of out_en (the output enables) is
// set; the counters follow every request. com_start pulses when a COM
// command begins. The line idles at 0.
// Counters (updated when a request is accepted): bcid counts clock cycles
// modulo 4096 and is cleared by BCR, ECR and bcid_rst; l1id counts
// triggers and is cleared by ECR and l1id_rst; bcid_l1a keeps bcid at the
// last trigger.
// The bit patterns, the L1R alternative and the counter resets follow the
// protocol; queueing, priority, the 12-bit BCID wrap and the one-bit-per-
// clock rate are this design's choices.
module com_encoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trig_in,
  input  logic        bcr_in,
  input  logic        ecr_in,
  input  logic        bcid_rst,
  input  logic        l1id_rst,
  input  logic        dest_l1r,
  input  logic [2:0]  out_en,     // per-line enables: 0 trigger, 1 BCR, 2 ECR
  output logic        com,
  output logic        l1r,
  output logic        com_start,
  output logic [11:0] bcid,
  output logic [23:0] l1id,
  output logic [11:0] bcid_l1a
);

  logic       trig_p, bcr_p, ecr_p;
  logic [6:0] sr;
  logic [2:0] nleft;
  logic [1:0] l1r_sr;
  logic [1:0] l1r_left;
  logic       trig_pend_l1r;

  wire logic com_idle = (nleft == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_p        <= 1'b0;
      bcr_p         <= 1'b0;
      ecr_p         <= 1'b0;
      trig_pend_l1r <= 1'b0;
      sr            <= '0;
      nleft         <= '0;
      l1r_sr        <= '0;
      l1r_left      <= '0;
      com_start     <= 1'b0;
      bcid          <= '0;
      l1id          <= '0;
      bcid_l1a      <= '0;
    end else begin
      com_start <= 1'b0;
      // counters
      bcid <= bcid + 1'b1;
      if (bcr_in || ecr_in || bcid_rst) bcid <= '0;
      if (trig_in) begin
        l1id     <= l1id + 1'b1;
        bcid_l1a <= bcid;
      end
      if (ecr_in || l1id_rst) l1id <= '0;

      // request queue
      if (trig_in && out_en[0]) begin
        if (dest_l1r) trig_pend_l1r <= 1'b1;
        else          trig_p        <= 1'b1;
      end
      if (bcr_in && out_en[1]) bcr_p <= 1'b1;
      if (ecr_in && out_en[2]) ecr_p <= 1'b1;

      // COM shifter: the next command may start right after the last bit
      if (nleft > 3'd1 || (nleft == 3'd1 && !trig_p && !bcr_p && !ecr_p)) begin
        sr    <= {sr[5:0], 1'b0};
        nleft <= nleft - 1'b1;
      end else if (trig_p) begin
        trig_p    <= 1'b0;
        sr        <= 7'b110_0000;
        nleft     <= 3'd3;
        com_start <= 1'b1;
      end else if (bcr_p) begin
        bcr_p     <= 1'b0;
        sr        <= 7'b1010010;
        nleft     <= 3'd7;
        com_start <= 1'b1;
      end else if (ecr_p) begin
        ecr_p     <= 1'b0;
        sr        <= 7'b1010100;
        nleft     <= 3'd7;
        com_start <= 1'b1;
      end

      // L1R shifter
      if (l1r_left != 0) begin
        l1r_sr   <= {l1r_sr[0], 1'b0};
        l1r_left <= l1r_left - 1'b1;
      end else if (trig_pend_l1r) begin
        trig_pend_l1r <= 1'b0;
        l1r_sr        <= 2'b10;
        l1r_left      <= 2'd2;
      end
    end
  end

  // the bit on the line is the shifter's MSB while a command is running
  always_comb begin
    com = !com_idle && sr[6];
    l1r = (l1r_left != 0) && l1r_sr[1];
  end

endmodule
