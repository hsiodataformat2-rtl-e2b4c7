// trig_burster: trigger burst sequencer.
//
// A start pulse runs n_bursts bursts of n_trigs triggers each. Before every
// trigger the sequencer waits a pseudo-random time between pmin and pmax
// units; after each burst but the last it waits pdead units. One unit is
// TICK clock cycles (16 cycles of the 40 MHz clock = 400 ns). While busy is
// high all waiting is frozen, so the sequence pauses and resumes where it
// was. trig is a one-cycle pulse. tcount counts down the triggers left in
// the current burst, bcount the bursts left. flags: bit 0 SEQ_READY (idle
// with a non-empty sequence configured), bit 1 SEQ_RUNNING, bit 2
// SEQ_FINISHED (held until the next start). stop aborts a sequence.
// The random value is a 16-bit LFSR (x^16+x^14+x^13+x^11+1) scaled into
// the [pmin, pmax] range by a multiply. Register meanings, units and the
// pause on busy follow the protocol; the random generator, the flag
// definitions and the wait before the first trigger are this design's.
module trig_burster #(
  parameter int unsigned TICK = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  logic        busy,
  input  logic [15:0] n_trigs,
  input  logic [15:0] n_bursts,
  input  logic [15:0] pmin,
  input  logic [15:0] pmax,
  input  logic [15:0] pdead,
  output logic        trig,
  output logic [15:0] tcount,
  output logic [15:0] bcount,
  output logic [15:0] flags
);

  localparam int TW = (TICK > 1) ? $clog2(TICK) : 1;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DEAD} state_e;
  state_e      state;
  logic        finished;
  logic [15:0] lfsr, wait_units, period;
  logic [TW-1:0] tick_cnt;
  logic [16:0] range;
  logic [32:0] scaled;

  wire logic tick = (tick_cnt == TW'(TICK - 1));

  always_comb begin
    range  = (pmax >= pmin) ? {1'b0, pmax - pmin} + 17'd1 : 17'd1;
    scaled = 33'(lfsr) * 33'(range);
    period = pmin + scaled[31:16];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      finished   <= 1'b0;
      lfsr       <= 16'hace1;
      wait_units <= '0;
      tick_cnt   <= '0;
      tcount     <= '0;
      bcount     <= '0;
      trig       <= 1'b0;
    end else begin
      trig <= 1'b0;
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (stop) begin
        state <= S_IDLE;
      end else if (state == S_IDLE) begin
        if (start && n_trigs != 0 && n_bursts != 0) begin
          state      <= S_WAIT;
          finished   <= 1'b0;
          tcount     <= n_trigs;
          bcount     <= n_bursts;
          wait_units <= period;
          tick_cnt   <= '0;
        end
      end else if (!busy) begin
        tick_cnt <= tick ? '0 : tick_cnt + 1'b1;
        if (tick) begin
          if (wait_units > 16'd1) begin
            wait_units <= wait_units - 1'b1;
          end else if (state == S_DEAD) begin
            state      <= S_WAIT;
            tcount     <= n_trigs;
            wait_units <= period;
          end else begin
            trig <= 1'b1;
            if (tcount > 16'd1) begin
              tcount     <= tcount - 1'b1;
              wait_units <= period;
            end else begin
              tcount <= '0;
              bcount <= bcount - 1'b1;
              if (bcount <= 16'd1) begin
                state    <= S_IDLE;
                finished <= 1'b1;
              end else begin
                state      <= S_DEAD;
                wait_units <= pdead;
              end
            end
          end
        end
      end
    end
  end

  always_comb flags = {13'd0, finished, state != S_IDLE,
                       state == S_IDLE && n_trigs != 0 && n_bursts != 0};

endmodule
