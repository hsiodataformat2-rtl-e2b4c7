// stream_deser: deserialiser of one readout stream.
//
// Takes the stream's serial data one bit per cycle in which bit_en is high
// and turns it into 16-bit event words (first bit received = bit 15).
//   mode 00, header/trailer detection: the bit history is searched for the
//     event header pattern HDR_PAT. The header starts an event and is its
//     first bits; bits are packed into words until the last TRL_BITS bits
//     received equal the trailer pattern TRL_PAT. The word holding the end
//     of the trailer is sent with eof, its unused low bits zero. The search
//     for the next header starts after the trailer.
//   mode 01, capture: a go pulse starts the capture of cap_len words of raw
//     bits (cap_len rounded down to a multiple of 16 words).
//   modes 10 and 11: idle.
// Output: w_valid for one cycle per word with w_sof on the first word of an
// event and w_eof on the last; hdr_pulse marks every detected header (or
// capture start), which the busy logic uses as "header seen". A word is
// presented in the cycle after its last bit arrived. clr abandons any event.
// The two modes, the capture length rule and header/trailer delimiting
// follow the protocol. The header and trailer bit patterns belong to the
// front-end chips and are not given there: the defaults (header 11101,
// trailer 1 followed by fifteen 0s) are assumptions and parameters.
module stream_deser #(
  parameter int unsigned      HDR_BITS = 5,
  parameter logic [4:0]       HDR_PAT  = 5'b11101,
  parameter int unsigned      TRL_BITS = 16,
  parameter logic [15:0]      TRL_PAT  = 16'h8000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic [1:0]  mode,
  input  logic        bit_en,
  input  logic        bit_in,
  input  logic        go,
  input  logic [15:0] cap_len,
  output logic        w_valid,
  output logic [15:0] w_data,
  output logic        w_sof,
  output logic        w_eof,
  output logic        hdr_pulse
);

  typedef enum logic [1:0] {S_HUNT, S_EVENT, S_CAPTURE} state_e;
  state_e      state;
  logic [15:0] hist;      // last 16 bits received (newest in bit 0)
  logic [15:0] acc;       // word being assembled
  logic [4:0]  nbits;     // bits in acc
  logic [15:0] nev;       // bits received since the header
  logic [15:0] words_left;
  logic        first;

  logic [15:0] hist_n, acc_n;
  always_comb begin
    hist_n = {hist[14:0], bit_in};
    acc_n  = {acc[14:0], bit_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_HUNT;
      hist       <= '0;
      acc        <= '0;
      nbits      <= '0;
      nev        <= '0;
      words_left <= '0;
      first      <= 1'b0;
      w_valid    <= 1'b0;
      w_data     <= '0;
      w_sof      <= 1'b0;
      w_eof      <= 1'b0;
      hdr_pulse  <= 1'b0;
    end else begin
      w_valid   <= 1'b0;
      w_sof     <= 1'b0;
      w_eof     <= 1'b0;
      hdr_pulse <= 1'b0;
      if (clr || mode[1]) begin
        state <= S_HUNT;
        hist  <= '0;
      end else begin
        unique case (state)
          S_HUNT: begin
            if (mode == 2'b01) begin
              if (go && cap_len[15:4] != 0) begin
                state      <= S_CAPTURE;
                words_left <= {cap_len[15:4], 4'b0000};
                nbits      <= '0;
                first      <= 1'b1;
                hdr_pulse  <= 1'b1;
              end
            end else if (bit_en) begin
              hist <= hist_n;
              if (hist_n[HDR_BITS-1:0] == HDR_PAT) begin
                state     <= S_EVENT;
                acc       <= 16'(HDR_PAT);
                nbits     <= 5'(HDR_BITS);
                nev       <= '0;
                first     <= 1'b1;
                hdr_pulse <= 1'b1;
              end
            end
          end
          S_EVENT: if (bit_en) begin
            hist <= hist_n;
            acc  <= acc_n;
            if (nev != 16'hffff) nev <= nev + 1'b1;
            if (nev + 16'd1 >= 16'(TRL_BITS) && hist_n[TRL_BITS-1:0] == TRL_PAT) begin
              w_valid <= 1'b1;
              w_sof   <= first;
              w_eof   <= 1'b1;
              w_data  <= acc_n << (5'd15 - nbits);
              state   <= S_HUNT;
              hist    <= '0;
            end else if (nbits == 5'd15) begin
              w_valid <= 1'b1;
              w_sof   <= first;
              w_data  <= acc_n;
              first   <= 1'b0;
              nbits   <= '0;
            end else begin
              nbits <= nbits + 1'b1;
            end
          end
          S_CAPTURE: if (bit_en) begin
            acc <= acc_n;
            if (nbits == 5'd15) begin
              w_valid    <= 1'b1;
              w_sof      <= first;
              w_eof      <= (words_left == 16'd1);
              w_data     <= acc_n;
              first      <= 1'b0;
              nbits      <= '0;
              words_left <= words_left - 1'b1;
              if (words_left == 16'd1) state <= S_HUNT;
            end else begin
              nbits <= nbits + 1'b1;
            end
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end

endmodule
