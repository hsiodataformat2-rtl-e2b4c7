// hsio_top: packet-controlled readout and control core of the HSIO board.
//
// The host talks to the board with raw Ethernet frames made of 16-bit
// words. pkt_rx checks each frame and offers its opcodes one by one on an
// opcode bus shared by the opcode blocks:
//   ocb_echo     ECHO, and any opcode nobody takes within TIMEOUT_CYCLES
//   ocb_regs     the 32 control registers (REGWRITE, REGBLOCK_WR/RD)
//   ocb_status   the 32 status words (STATREAD)
//   ocb_command  COMMAND pulses and RESET_OCB
//   ocb_stream   per-stream config, command and status-request opcodes
//   ocb_twowire  I2C transactions (TWOWIRE)
// Each block answers with a reply body; after the last opcode pkt_rx adds
// the network Ack. Readout streams (48 top, 48 bottom, 8 IDC, at stream ids
// 0-47, 64-111 and 128-135) deserialise their input bits, buffer events and
// send data, error and status packets. A round-robin arbiter collects the
// stream packets; a fixed-priority arbiter puts the Ack first, opcode
// replies next and stream data last; pkt_tx_builder frames the winner.
// Triggers come from the external input (IN_ENA bit 0, vetoed while busy),
// from the burst sequencer and from COMMAND bit 0 (both enabled by INT_ENA
// bit 0); BCR/ECR likewise from inputs or COMMAND. They go to the COM
// encoder (sent if OUT_ENA allows) and to every stream's busy counter. busy
// is the OR of the stream busies and the soft-busy bit (CONTROL bit 0).
// Board-level parts not in this core (Ethernet MAC/PHY, display, IDELAY,
// clock/COM output routing, pattern memories) connect through ports: the
// control registers and the remaining command pulses are brought out, and
// the network interface status words come in.
// One clock (the 40 MHz bunch-crossing clock) runs everything; the one
// clock domain and the mapping of enables onto sources are this design's
// choices, the rest follows the protocol.
module hsio_top
  import hsio_pkg::*;
#(
  parameter int unsigned N_TOP          = 48,          // stave top streams, ids 0..47
  parameter int unsigned N_BOT          = 48,          // stave bottom streams, ids 64..111
  parameter int unsigned N_IDC          = 8,           // IDC streams, ids 128..135
  parameter int unsigned FIFO_WORDS     = 768,         // 1.5 kB per stream
  parameter int unsigned FRAG_WORDS     = 742,
  parameter int unsigned TIMEOUT_CYCLES = 40_000_000,  // 1 s
  parameter int unsigned TRAILER_TO     = 40_000,
  parameter int unsigned CLK_HZ         = 40_000_000,
  parameter int unsigned TB_TICK        = 16,          // 400 ns
  parameter logic [15:0] VERSION        = 16'h4182,
  parameter logic [31:0] TIMESTAMP      = 32'd0
) (
  input  logic               clk,
  input  logic               rst_n,
  // network side (frames without FCS)
  input  logic               rx_valid,
  input  word_t              rx,
  output logic               tx_valid,
  input  logic               tx_ready,
  output word_t              tx,
  input  logic [4:0][15:0]   net_status,
  // readout stream inputs, indexed by stream id
  input  logic               stream_bit_en,
  input  logic [143:0]       stream_bits,
  // external trigger inputs
  input  logic               ext_trig,
  input  logic               ext_bcr,
  input  logic               ext_ecr,
  // front-end outputs
  output logic               com,
  output logic               l1r,
  output logic               busy,
  // two-wire buses
  output logic [15:0]        i2c_scl_oe,
  output logic [15:0]        i2c_sda_oe,
  input  logic [15:0]        i2c_sda_in,
  // to board-level logic outside this core
  output logic [31:0][15:0]  ctrl_regs,
  output logic [15:0]        cmd_pulse,
  output logic [6:0]         rst_pulse
);

  localparam int unsigned N_PRES  = N_TOP + N_BOT + N_IDC;
  localparam int unsigned N_IDS   = N_MASK_WORDS * 16;      // 144 stream ids
  localparam int unsigned N_REPLY = 8;

  function automatic int unsigned sid_of(input int unsigned p);
    if (p < N_TOP)         return p;
    if (p < N_TOP + N_BOT) return 64 + p - N_TOP;
    return 128 + p - N_TOP - N_BOT;
  endfunction

  function automatic logic [15:0] mod_map(input int unsigned n);
    logic [15:0] m;
    m = '0;
    for (int i = 0; i < 16; i++) if (i < (n + 3) / 4) m[i] = 1'b1;
    return m;
  endfunction

  // ---------------- packet handler and opcode bus ----------------
  logic [47:0] peer_mac;
  logic [15:0] pkt_seq, rx_dropped, rx_good;
  logic        op_valid, op_ready, op_hdr, op_last, op_timeout;
  logic [15:0] op_data, op_id, op_seq, op_size;

  logic [N_REPLY-1:0] rp_valid, rp_ready;
  word_t              rp [N_REPLY];
  logic [5:0]         ocb_ready;
  logic               unrecog;

  pkt_rx #(.TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_rx (
    .clk, .rst_n, .rx_valid, .rx,
    .peer_mac, .pkt_seq,
    .op_valid, .op_ready, .op_hdr, .op_last, .op_data, .op_id, .op_seq, .op_size, .op_timeout,
    .ack_valid (rp_valid[0]), .ack_ready (rp_ready[0]), .ack (rp[0]),
    .rx_dropped, .rx_good
  );
  assign op_ready = |ocb_ready;

  ocb_echo u_echo (
    .clk, .rst_n, .pkt_seq,
    .op_valid, .op_ready (ocb_ready[0]), .op_hdr, .op_last, .op_data, .op_id, .op_seq, .op_size, .op_timeout,
    .rep_valid (rp_valid[1]), .rep_ready (rp_ready[1]), .rep (rp[1]),
    .unrecog_pulse (unrecog)
  );

  ocb_regs u_regs (
    .clk, .rst_n, .pkt_seq,
    .op_valid, .op_ready (ocb_ready[1]), .op_hdr, .op_last, .op_data, .op_id, .op_seq, .op_timeout,
    .rep_valid (rp_valid[2]), .rep_ready (rp_ready[2]), .rep (rp[2]),
    .regs (ctrl_regs)
  );

  logic [31:0][15:0] status;
  ocb_status u_status (
    .clk, .rst_n, .pkt_seq,
    .op_valid, .op_ready (ocb_ready[2]), .op_hdr, .op_last, .op_id, .op_seq, .op_timeout,
    .rep_valid (rp_valid[3]), .rep_ready (rp_ready[3]), .rep (rp[3]),
    .status
  );

  ocb_command u_command (
    .clk, .rst_n, .pkt_seq,
    .op_valid, .op_ready (ocb_ready[3]), .op_hdr, .op_last, .op_data, .op_id, .op_seq, .op_timeout,
    .rep_valid (rp_valid[4]), .rep_ready (rp_ready[4]), .rep (rp[4]),
    .cmd_pulse, .rst_pulse
  );

  logic               cfg_we, cmd_we;
  logic [N_IDS-1:0]   cfg_sel, cmd_sel, stat_req;
  logic [15:0]        cfg_mask, cfg_data, cmd_data;
  ocb_stream #(.N_STREAMS(N_IDS)) u_stream_ocb (
    .clk, .rst_n, .pkt_seq,
    .op_valid, .op_ready (ocb_ready[4]), .op_hdr, .op_last, .op_data, .op_id, .op_seq, .op_timeout,
    .rep_valid (rp_valid[5]), .rep_ready (rp_ready[5]), .rep (rp[5]),
    .cfg_we, .cfg_sel, .cfg_mask, .cfg_data, .cmd_we, .cmd_sel, .cmd_data, .stat_req
  );

  ocb_twowire #(.N_CH(16), .CLK_HZ(CLK_HZ)) u_twowire (
    .clk, .rst_n, .pkt_seq,
    .op_valid, .op_ready (ocb_ready[5]), .op_hdr, .op_last, .op_data, .op_id, .op_seq, .op_size, .op_timeout,
    .rep_valid (rp_valid[6]), .rep_ready (rp_ready[6]), .rep (rp[6]),
    .scl_oe (i2c_scl_oe), .sda_oe (i2c_sda_oe), .sda_in (i2c_sda_in)
  );

  // ---------------- triggers, COM and burst sequencer ----------------
  wire logic [15:0] in_ena  = ctrl_regs[0];
  wire logic [15:0] out_ena = ctrl_regs[1];
  wire logic [15:0] int_ena = ctrl_regs[2];
  wire logic [15:0] control = ctrl_regs[REG_CONTROL];

  logic        busy_streams, burst_trig, trig_any, bcr_any, ecr_any, com_start;
  logic [15:0] tb_tcount, tb_bcount, tb_flags;
  logic [11:0] bcid, bcid_l1a;
  logic [23:0] l1id;

  trig_burster #(.TICK(TB_TICK)) u_burster (
    .clk, .rst_n,
    .start    (cmd_pulse[8]),
    .stop     (rst_pulse[1]),
    .busy,
    .n_trigs  (ctrl_regs[REG_TB_TRIGS]),
    .n_bursts (ctrl_regs[REG_TB_BURSTS]),
    .pmin     (ctrl_regs[REG_TB_PMIN]),
    .pmax     (ctrl_regs[REG_TB_PMAX]),
    .pdead    (ctrl_regs[REG_TB_PDEAD]),
    .trig     (burst_trig),
    .tcount   (tb_tcount),
    .bcount   (tb_bcount),
    .flags    (tb_flags)
  );

  always_comb begin
    busy     = busy_streams || control[0];
    trig_any = (in_ena[0] && ext_trig && !busy) || (int_ena[0] && (burst_trig || cmd_pulse[0]));
    bcr_any  = (in_ena[1] && ext_bcr) || (int_ena[1] && cmd_pulse[1]);
    ecr_any  = (in_ena[2] && ext_ecr) || (int_ena[2] && cmd_pulse[2]);
  end

  com_encoder u_com (
    .clk, .rst_n,
    .trig_in  (trig_any),
    .bcr_in   (bcr_any),
    .ecr_in   (ecr_any),
    .bcid_rst (cmd_pulse[5]),
    .l1id_rst (cmd_pulse[6]),
    .dest_l1r (control[12]),
    .out_en   (out_ena[2:0]),
    .com, .l1r, .com_start,
    .bcid, .l1id, .bcid_l1a
  );

  // ---------------- readout streams ----------------
  logic [N_PRES-1:0] s_valid, s_ready, s_busy;
  word_t             s_out [N_PRES];
  wire logic         cap_go = control[11] ? trig_any : com_start;

  for (genvar p = 0; p < N_PRES; p++) begin : g_stream
    localparam int unsigned SID = sid_of(p);
    logic [15:0] cfg_w, status_w;
    logic        hdr_w;
    stream_unit #(
      .STREAM_ID  (8'(SID)),
      .FIFO_WORDS (FIFO_WORDS),
      .FRAG_WORDS (FRAG_WORDS),
      .TRAILER_TO (TRAILER_TO)
    ) u_stream (
      .clk, .rst_n,
      .cfg_we   (cfg_we && cfg_sel[SID]),
      .cfg_mask, .cfg_data,
      .cmd_we   ((cmd_we && cmd_sel[SID]) || rst_pulse[0]),
      .cmd_data (rst_pulse[0] ? 16'h8000 : cmd_data),
      .stat_req (stat_req[SID]),
      .trig     (trig_any),
      .cap_go,
      .bit_en   (stream_bit_en),
      .bit_in   (stream_bits[SID]),
      .len0     (ctrl_regs[REG_LEN0]),
      .len1     (ctrl_regs[REG_LEN1]),
      .out_valid (s_valid[p]), .out_ready (s_ready[p]), .out (s_out[p]),
      .busy     (s_busy[p]),
      .cfg      (cfg_w),
      .status1  (status_w),
      .hdr_seen (hdr_w)
    );
  end
  assign busy_streams = |s_busy;

  pkt_arbiter #(.N_IN(N_PRES), .ROUND_ROBIN(1'b1)) u_stream_arb (
    .clk, .rst_n,
    .in_valid (s_valid), .in_ready (s_ready), .in (s_out),
    .out_valid (rp_valid[7]), .out_ready (rp_ready[7]), .out (rp[7])
  );

  // ---------------- transmit ----------------
  logic  body_valid, body_ready;
  word_t body;
  pkt_arbiter #(.N_IN(N_REPLY), .ROUND_ROBIN(1'b0)) u_tx_arb (
    .clk, .rst_n,
    .in_valid (rp_valid), .in_ready (rp_ready), .in (rp),
    .out_valid (body_valid), .out_ready (body_ready), .out (body)
  );

  pkt_tx_builder u_txb (
    .clk, .rst_n,
    .in_valid (body_valid), .in_ready (body_ready), .in (body),
    .peer_mac,
    .tx_valid, .tx_ready, .tx
  );

  // ---------------- status words ----------------
  always_comb begin
    status     = '0;
    status[0]  = 16'h0c02;                         // HW_ID
    status[1]  = 16'ha510;                         // SANITY
    status[2]  = VERSION;
    status[3]  = 16'((N_TOP + 3) / 4 + (N_BOT + 3) / 4 + (N_IDC + 3) / 4);
    status[4]  = tb_tcount;
    status[5]  = tb_bcount;
    status[6]  = tb_flags;
    status[7]  = {4'h0, bcid_l1a};
    status[8]  = l1id[15:0];
    status[9]  = {8'h00, l1id[23:16]};
    status[10] = net_status[0];
    status[11] = net_status[1];
    status[12] = net_status[2];
    status[13] = net_status[3];
    status[14] = net_status[4];
    status[16] = mod_map(N_TOP) & 16'h0fff;
    status[17] = 16'h0000;                         // no histogrammers
    status[18] = mod_map(N_BOT) & 16'h0fff;
    status[19] = 16'h0000;
    status[20] = {8'h00, mod_map(N_IDC)[7:0]};
    status[22] = TIMESTAMP[15:0];
    status[23] = TIMESTAMP[31:16];
  end

  logic unused;
  assign unused = ^{rx_dropped, rx_good, unrecog, bcid};

endmodule
