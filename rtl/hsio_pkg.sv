// hsio_pkg: constants and types shared by the HSIO packet/opcode core.
// It holds the packet magic number, the opcode identifiers of the host
// protocol, the reply/marker words, the deserialiser error codes, and the
// word-stream type that every block uses to pass packet bodies around.
// The opcode numbers, magic number, error codes, register and status
// addresses follow the protocol definition; the word-stream struct is this
// design's own choice.
package hsio_pkg;

  localparam logic [15:0] MAGIC      = 16'h8765;  // Ethernet type field, both directions
  localparam logic [15:0] ACK_WORD   = 16'hacac;  // reply word of the stream write opcodes
  localparam logic [15:0] TW_ABORT   = 16'hf00b;  // TWOWIRE reply fill after a bus timeout
  localparam logic [15:0] FAIL_ID    = 16'hffff;  // generic failure opcode

  typedef enum logic [15:0] {
    OP_ECHO           = 16'h0003,
    OP_REGWRITE       = 16'h0010,
    OP_REGBLOCK_WR    = 16'h0014,
    OP_REGBLOCK_RD    = 16'h0015,
    OP_STATREAD       = 16'h0019,
    OP_COMMAND        = 16'h0030,
    OP_STRM_CONF_WR   = 16'h0050,
    OP_STRM_REQ_STATS = 16'h0051,
    OP_BSTRM_CONF_WR  = 16'h0052,
    OP_STRM_COMMAND   = 16'h005c,
    OP_BSTRM_COMMAND  = 16'h005e,
    OP_COM_PATTERN    = 16'h0070,
    OP_RAWSIG         = 16'h0074,
    OP_TWOWIRE        = 16'h0080,
    OP_RESET_OCB      = 16'h00f0,
    OP_RAWCOM         = 16'h0101
  } opcode_e;

  // Unsolicited opcode prefixes (upper byte / nibble)
  localparam logic [3:0] UNRECOG_NIBBLE = 4'hb;   // 0xBnnn
  localparam logic [7:0] DATA_PREFIX    = 8'hd0;  // 0xD0mm
  localparam logic [7:0] DESERR_PREFIX  = 8'hf0;  // 0xF0mm

  // Data mode byte (mm)
  localparam logic [7:0] MODE_NORMAL  = 8'h00;
  localparam logic [7:0] MODE_CAPTURE = 8'h04;

  // Deserialiser error codes
  typedef enum logic [15:0] {
    ERR_EMPTY_EVENT        = 16'h0001,
    ERR_TRUNCEV_TRAILER_TO = 16'h0002,
    ERR_FRAGEV_TRAILER_TO  = 16'h0003,
    ERR_EMPTYEV_TRAILER_TO = 16'h0004,
    ERR_LEN_FIFO_FULL      = 16'h0005
  } deser_err_e;

  // Control register addresses used by the core
  localparam int REG_IN_ENA     = 0;
  localparam int REG_LEN0       = 7;
  localparam int REG_LEN1       = 8;
  localparam int REG_COM_ENA    = 16;
  localparam int REG_CONTROL    = 23;
  localparam int REG_TB_TRIGS   = 24;
  localparam int REG_TB_BURSTS  = 25;
  localparam int REG_TB_PMIN    = 26;
  localparam int REG_TB_PMAX    = 27;
  localparam int REG_TB_PDEAD   = 28;

  // StreamConfig word fields
  localparam int SC_ENABLE    = 0;
  localparam int SC_BUSY_DELTA = 6;
  localparam int SC_BUSY_FIFO  = 7;

  // One word of a packet body on a valid/ready stream
  typedef struct packed {
    logic        last;
    logic [15:0] data;
  } word_t;

  // Number of 16-bit stream mask words (streams 0..143)
  localparam int N_MASK_WORDS = 9;

endpackage
