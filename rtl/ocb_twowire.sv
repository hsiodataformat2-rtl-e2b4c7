// ocb_twowire: opcode block for TWOWIRE (0x0080), an I2C bus master.
//
// The payload is one or more "packetlets". Each starts with a control word
// (bits 7:4 clock: 0 = 100 kHz, 1 = 10 kHz, 2 = 1 kHz; bits 3:0 output
// channel) followed by command/data words: command byte in 15:8 (15:13
// protocol, 12 append stop, 11 prepend start, 10 send the data byte 7:0,
// 9:8 get 1 or 2 bytes) and data byte in 7:0. A word whose top three bits
// are 111 separates packetlets; the next word is a control word again.
// The reply has one word per request word: the control word and separators
// are echoed, a word that reads returns the bytes read (1 byte in 7:0, or
// first byte in 15:8 and second in 7:0), a write-only word is echoed. If a
// slave does not acknowledge a byte, the bus is released with a stop and
// this and every remaining reply word of the opcode become 0xF00B. A read
// acknowledges each byte except the last byte of a word that also stops.
// Only the I2C protocol (0) is driven; words for the other protocols
// (SHT, SPI) get 0xF00B without touching the bus.
// Bus timing: each bit takes four quarter periods of the selected clock;
// a start is SDA falling while SCL is high, a stop SDA rising while SCL is
// high. scl_oe/sda_oe pull the selected channel's open-drain lines low.
// Word layouts, reply rules, the 0xF00B fill and clock choices follow the
// protocol; the bus state machine and the reply for write-only words are
// this design's own.
module ocb_twowire
  import hsio_pkg::*;
#(
  parameter int unsigned N_CH   = 16,
  parameter int unsigned CLK_HZ = 40_000_000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [15:0]     pkt_seq,
  input  logic            op_valid,
  output logic            op_ready,
  input  logic            op_hdr,
  input  logic            op_last,
  input  logic [15:0]     op_data,
  input  logic [15:0]     op_id,
  input  logic [15:0]     op_seq,
  input  logic [15:0]     op_size,
  input  logic            op_timeout,
  output logic            rep_valid,
  input  logic            rep_ready,
  output word_t           rep,
  output logic [N_CH-1:0] scl_oe,
  output logic [N_CH-1:0] sda_oe,
  input  logic [N_CH-1:0] sda_in
);

  localparam int CW = $clog2(N_CH);
  localparam int unsigned Q100K = CLK_HZ / 400_000;
  localparam int unsigned Q10K  = CLK_HZ / 40_000;
  localparam int unsigned Q1K   = CLK_HZ / 4_000;

  typedef enum logic [2:0] {W_IDLE, W_HDR, W_GET, W_EXEC, W_REPLY} wstate_e;
  typedef enum logic [2:0] {X_START, X_SEND, X_GET, X_STOP, X_DONE} xstep_e;
  wstate_e     wstate;
  xstep_e      xstep;

  logic [2:0]  hk;
  logic [15:0] cur_seq, cur_size, word, reply_word;
  logic        word_last, expect_ctrl, aborted;
  logic [3:0]  clk_sel;
  logic [CW-1:0] chan;
  logic [1:0]  nget;

  // bit engine
  logic [31:0] qcnt;
  logic [1:0]  phase;
  logic [3:0]  bitn;
  logic [7:0]  shreg;
  logic        scl_low, sda_low, ack_bit, byte_ack_out;

  wire logic [31:0] qlen = (clk_sel == 4'd1) ? Q10K : (clk_sel == 4'd2) ? Q1K : Q100K;
  wire logic        qtick = (qcnt >= qlen - 1);
  wire logic        sda_s = sda_in[chan];
  wire logic        is_mine = op_id == OP_TWOWIRE;

  always_comb begin
    scl_oe = '0;
    sda_oe = '0;
    scl_oe[chan] = scl_low;
    sda_oe[chan] = sda_low;
  end

  // next step after the current one for the word being executed
  function automatic xstep_e step_after(input xstep_e s, input logic [15:0] w, input logic [1:0] ng);
    xstep_e n;
    n = X_DONE;
    unique case (s)
      X_START: n = w[10] ? X_SEND : (ng != 0) ? X_GET : w[12] ? X_STOP : X_DONE;
      X_SEND:  n = (ng != 0) ? X_GET : w[12] ? X_STOP : X_DONE;
      X_GET:   n = (ng > 2'd1) ? X_GET : w[12] ? X_STOP : X_DONE;
      default: n = X_DONE;
    endcase
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate       <= W_IDLE;
      xstep        <= X_DONE;
      hk           <= '0;
      cur_seq      <= '0;
      cur_size     <= '0;
      word         <= '0;
      reply_word   <= '0;
      word_last    <= 1'b0;
      expect_ctrl  <= 1'b1;
      aborted      <= 1'b0;
      clk_sel      <= '0;
      chan         <= '0;
      nget         <= '0;
      qcnt         <= '0;
      phase        <= '0;
      bitn         <= '0;
      shreg        <= '0;
      scl_low      <= 1'b0;
      sda_low      <= 1'b0;
      ack_bit      <= 1'b0;
    end else begin
      unique case (wstate)
        W_IDLE: if (op_valid && op_hdr && is_mine && !op_timeout) begin
          cur_seq     <= op_seq;
          cur_size    <= op_size;
          hk          <= '0;
          expect_ctrl <= 1'b1;
          aborted     <= 1'b0;
          wstate      <= W_HDR;
        end
        W_HDR: if (rep_ready) begin
          hk <= hk + 1'b1;
          if (hk == 3'd4) wstate <= op_last ? W_IDLE : W_GET;
        end
        W_GET: if (op_valid) begin
          word      <= op_data;
          word_last <= op_last;
          if (aborted) begin
            reply_word <= TW_ABORT;
            wstate     <= W_REPLY;
          end else if (expect_ctrl) begin
            reply_word  <= op_data;
            clk_sel     <= op_data[7:4];
            chan        <= CW'(op_data[3:0]);
            expect_ctrl <= 1'b0;
            wstate      <= W_REPLY;
          end else if (op_data[15:13] == 3'b111) begin
            reply_word  <= op_data;
            expect_ctrl <= 1'b1;
            wstate      <= W_REPLY;
          end else if (op_data[15:13] != 3'b000) begin
            reply_word <= TW_ABORT;
            wstate     <= W_REPLY;
          end else begin
            reply_word <= op_data;
            nget       <= (op_data[9:8] == 2'd3) ? 2'd0 : op_data[9:8];
            xstep      <= op_data[11] ? X_START :
                          step_after(X_START, op_data, (op_data[9:8] == 2'd3) ? 2'd0 : op_data[9:8]);
            qcnt   <= '0;
            phase  <= '0;
            bitn   <= '0;
            shreg  <= op_data[7:0];
            wstate <= W_EXEC;
          end
        end
        W_EXEC: begin
          if (xstep == X_DONE) begin
            wstate <= W_REPLY;
          end else begin
            qcnt <= qtick ? '0 : qcnt + 1'b1;
            if (qtick) begin
              phase <= phase + 1'b1;
              unique case (xstep)
                X_START: unique case (phase)
                  2'd0: sda_low <= 1'b0;
                  2'd1: scl_low <= 1'b0;
                  2'd2: sda_low <= 1'b1;
                  default: begin
                    scl_low <= 1'b1;
                    xstep   <= step_after(X_START, word, nget);
                    bitn    <= '0;
                  end
                endcase
                X_SEND, X_GET: unique case (phase)
                  2'd0: begin
                    scl_low <= 1'b1;
                    if (bitn < 4'd8) sda_low <= (xstep == X_SEND) ? !shreg[7] : 1'b0;
                    else             sda_low <= (xstep == X_GET) ? byte_ack_out : 1'b0;
                  end
                  2'd1: scl_low <= 1'b0;
                  2'd2: begin
                    if (bitn < 4'd8) begin
                      if (xstep == X_GET) shreg <= {shreg[6:0], sda_s};
                      else                shreg <= {shreg[6:0], 1'b0};
                    end else begin
                      ack_bit <= sda_s;
                    end
                  end
                  default: begin
                    scl_low <= 1'b1;
                    if (bitn == 4'd8) begin
                      bitn <= '0;
                      if (xstep == X_SEND) begin
                        if (ack_bit) begin
                          aborted    <= 1'b1;
                          reply_word <= TW_ABORT;
                          xstep      <= X_STOP;
                        end else begin
                          xstep <= step_after(X_SEND, word, nget);
                        end
                      end else begin
                        reply_word <= (word[9:8] == 2'd1) ? {8'h00, shreg} : {reply_word[7:0], shreg};
                        nget       <= nget - 1'b1;
                        xstep      <= step_after(X_GET, word, nget);
                      end
                    end else begin
                      bitn <= bitn + 1'b1;
                    end
                  end
                endcase
                X_STOP: unique case (phase)
                  2'd0: begin scl_low <= 1'b1; sda_low <= 1'b1; end
                  2'd1: scl_low <= 1'b0;
                  2'd2: sda_low <= 1'b0;
                  default: xstep <= X_DONE;
                endcase
                default: ;
              endcase
            end
          end
        end
        W_REPLY: if (rep_ready) wstate <= word_last ? W_IDLE : W_GET;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // acknowledge driven after a read byte: ack (pull low) unless this is the
  // last byte of a word that ends with a stop
  always_comb byte_ack_out = !(word[12] && nget == 2'd1);

  always_comb begin
    op_ready  = (wstate == W_GET) || (wstate == W_HDR && rep_ready && hk == 3'd4 && op_hdr);
    rep_valid = (wstate == W_HDR) || (wstate == W_REPLY);
    rep.last  = 1'b0;
    rep.data  = reply_word;
    if (wstate == W_HDR) begin
      unique case (hk)
        3'd0: rep.data = pkt_seq;
        3'd1: rep.data = 16'd1;
        3'd2: rep.data = OP_TWOWIRE;
        3'd3: rep.data = cur_seq;
        default: begin
          rep.data = cur_size;
          rep.last = op_last;
        end
      endcase
    end else begin
      rep.last = word_last;
    end
  end

endmodule
