// pkt_arbiter: packet-granular arbiter for word streams.
//
// N_IN sources offer packet bodies on valid/ready word streams. When the
// output is free the arbiter grants one source and keeps the grant until
// that source's word marked last has been accepted, so packets are never
// interleaved. With ROUND_ROBIN=0 the lowest-numbered requesting source
// wins (the HSIO connects the network Ack there so that it beats data
// packets); with ROUND_ROBIN=1 the search starts after the last winner.
// Grant takes effect in the cycle after the request and costs no further
// cycles: words then pass straight through combinationally.
// Giving the Ack priority over data follows the protocol; the packet lock,
// priority order and round-robin option are this design's own.
module pkt_arbiter
  import hsio_pkg::*;
#(
  parameter int unsigned N_IN        = 4,
  parameter bit          ROUND_ROBIN = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_IN-1:0]   in_valid,
  output logic [N_IN-1:0]   in_ready,
  input  word_t             in [N_IN],
  output logic              out_valid,
  input  logic              out_ready,
  output word_t             out
);

  localparam int IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic          locked;
  logic [IW-1:0] grant, last_grant, pick;
  logic          any;

  // choose the next source
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int j = 0; j < N_IN; j++) begin
      int unsigned idx;
      idx = ROUND_ROBIN ? (int'(last_grant) + 1 + j) % N_IN : j;
      if (!any && in_valid[idx]) begin
        any  = 1'b1;
        pick = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked     <= 1'b0;
      grant      <= '0;
      last_grant <= IW'(N_IN - 1);
    end else if (!locked) begin
      if (any) begin
        locked     <= 1'b1;
        grant      <= pick;
        last_grant <= pick;
      end
    end else if (out_valid && out_ready && out.last) begin
      locked <= 1'b0;
    end
  end

  always_comb begin
    out_valid = locked && in_valid[grant];
    out       = in[grant];
    in_ready  = '0;
    if (locked) in_ready[grant] = out_ready;
  end

endmodule
