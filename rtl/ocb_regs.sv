// ocb_regs: the 32 x 16-bit control register file and its opcode block.
//
// Opcodes handled:
//   REGWRITE      (0x0010) payload (register number, data): writes one register
//   REGBLOCK_WR   (0x0014) payload 32 words: writes registers 0..31 in order
//   REGBLOCK_RD   (0x0015) no payload
// Payload words are taken one per cycle; a write lands in the cycle its
// word is accepted. When the opcode's last beat has been taken a reply is
// sent: for REGWRITE the register number and the register's new value, for
// the block opcodes all 32 registers. Registers reset to 0.
// The register map and opcode numbers follow the protocol; the reply
// contents of the write opcodes and the reset value are this design's
// choices. regs is the live register file seen by the rest of the core.
module ocb_regs
  import hsio_pkg::*;
#(
  parameter int unsigned N_REGS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] pkt_seq,
  input  logic        op_valid,
  output logic        op_ready,
  input  logic        op_hdr,
  input  logic        op_last,
  input  logic [15:0] op_data,
  input  logic [15:0] op_id,
  input  logic [15:0] op_seq,
  input  logic        op_timeout,
  output logic        rep_valid,
  input  logic        rep_ready,
  output word_t       rep,
  output logic [N_REGS-1:0][15:0] regs
);

  localparam int RW = $clog2(N_REGS);

  typedef enum logic [1:0] {S_IDLE, S_RX, S_START, S_REPLY} state_e;
  state_e      state;
  logic [15:0] wi, regno, cur_id, cur_seq;
  logic        rg_busy;
  logic [15:0] idx, pay;

  wire logic is_mine = op_id == OP_REGWRITE || op_id == OP_REGBLOCK_WR || op_id == OP_REGBLOCK_RD;
  wire logic take    = op_valid && op_ready;

  always_comb op_ready = (state == S_RX) || (state == S_IDLE && op_hdr && is_mine && !op_timeout);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      wi     <= '0;
      regno  <= '0;
      cur_id <= '0;
      cur_seq <= '0;
      regs   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (take) begin
          cur_id <= op_id;
          cur_seq <= op_seq;
          wi     <= '0;
          state  <= op_last ? S_START : S_RX;
        end
        S_RX: if (take) begin
          wi <= wi + 1'b1;
          if (cur_id == OP_REGWRITE) begin
            if (wi == 16'd0) regno <= op_data;
            if (wi == 16'd1 && regno < 16'(N_REGS)) regs[regno[RW-1:0]] <= op_data;
          end else if (cur_id == OP_REGBLOCK_WR && wi < 16'(N_REGS)) begin
            regs[wi[RW-1:0]] <= op_data;
          end
          if (op_last) state <= S_START;
        end
        S_START: state <= S_REPLY;
        S_REPLY: if (!rg_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    if (cur_id == OP_REGWRITE)
      pay = (idx == 16'd0) ? regno : ((regno < 16'(N_REGS)) ? regs[regno[RW-1:0]] : 16'h0);
    else
      pay = (idx < 16'(N_REGS)) ? regs[idx[RW-1:0]] : 16'h0;
  end

  ocb_reply u_reply (
    .clk, .rst_n,
    .start  (state == S_START),
    .pkt_seq,
    .id     (cur_id),
    .seq    (cur_seq),
    .nwords ((cur_id == OP_REGWRITE) ? 16'd2 : 16'(N_REGS)),
    .busy   (rg_busy),
    .idx, .pay,
    .rep_valid, .rep_ready, .rep
  );

endmodule
