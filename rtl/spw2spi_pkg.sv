// Shared types and constants of the SpaceWire-to-SPI bridge.
//
// The bridge moves telecommands (TC) from a SpaceWire RMAP initiator to an SPI
// master and telemetry (TM) the other way. Both link controllers talk to the
// bridge controller through the same two bundles: an authorisation request
// (operation, memory region, address, size) answered with a grant or a
// rejection, followed by a byte-wide data phase. The register map, the mailbox
// map and their access rights follow the bridge's published memory map; the
// bundle layout and the encodings of SpaceWire characters inside this RTL are
// this implementation's own.
package spw2spi_pkg;

  // ---------------------------------------------------------------- memory map
  // Register byte addresses.
  localparam logic [31:0] REG_SPW_COMSTAT = 32'd0;   // 1 byte, SpW read
  localparam logic [31:0] REG_SPI_COMSTAT = 32'd1;   // 1 byte, SPI read
  localparam logic [31:0] REG_TC_SIZE     = 32'd2;   // 1 byte, SPI read
  localparam logic [31:0] REG_TM_SIZE     = 32'd3;   // 2 bytes, SpW read
  localparam logic [31:0] REG_FEATURES    = 32'd5;   // 24 bytes, SPI write, SpW read
  localparam int unsigned FEATURES_BYTES  = 24;

  // Mailbox addresses (identifiers, not memory addresses).
  localparam logic [31:0] MBX_TC = 32'd0;            // SpW writes, SPI reads
  localparam logic [31:0] MBX_TM = 32'd1;            // SPI writes, SpW reads
  localparam int unsigned TC_MAX_BYTES = 32;
  localparam int unsigned TM_MAX_BYTES = 2048;

  // Bit positions in the communication status registers.
  localparam int unsigned SPW_STAT_TM_VALID = 0;
  localparam int unsigned SPW_STAT_TC_RDY   = 1;
  localparam int unsigned SPI_STAT_TC_VALID = 0;
  localparam int unsigned SPI_STAT_TM_RDY   = 1;

  // SPI command byte: [7:5] reserved, [4] wr, [3] addr_ext, [2:0] addr.
  localparam int unsigned SPI_CMD_WR      = 4;
  localparam int unsigned SPI_CMD_ADDR_EXT = 3;
  localparam logic [7:0] SPI_CMD_WRITE_TM   = 8'h19;
  localparam logic [7:0] SPI_CMD_READ_TC    = 8'h08;
  localparam logic [7:0] SPI_CMD_READ_SPIST = 8'h01;

  // Which link a request comes from (access rights differ).
  typedef enum logic { SIDE_SPI = 1'b0, SIDE_SPW = 1'b1 } side_e;

  // ----------------------------------------------------------- bridge bundles
  // Authorisation request, held by the link controller until gnt or rej.
  typedef struct packed {
    logic        req;    // request pending
    logic        wr;     // 1 = write, 0 = read
    logic        mbx;    // 1 = mailbox region, 0 = register region
    logic [31:0] addr;   // register byte address or mailbox address
    logic [23:0] size;   // write: bytes to be written; read: bytes wanted
  } auth_req_t;

  // Authorisation answer: one-cycle gnt or rej pulse.
  typedef struct packed {
    logic        gnt;
    logic        rej;
    logic [23:0] size;   // read: bytes that will be returned
  } auth_rsp_t;

  // Data phase, link controller to bridge.
  typedef struct packed {
    logic       wr_en;   // one byte written
    logic [7:0] wr_data;
    logic       rd_en;   // one byte requested, answered one cycle later
    logic       done;    // transfer finished: commit write / release read
    logic       cancel;  // transfer abandoned: discard write / keep read data
  } dat_req_t;

  // Data phase, bridge to link controller.
  typedef struct packed {
    logic       rd_valid;
    logic [7:0] rd_data;
  } dat_rsp_t;

  // ------------------------------------------------------------- SpaceWire
  // Normal character: {ctrl, byte}. ctrl=0: data byte; ctrl=1: byte 0 = EOP,
  // byte 1 = EEP.
  typedef logic [8:0] nchar_t;
  localparam nchar_t NCHAR_EOP = 9'h100;
  localparam nchar_t NCHAR_EEP = 9'h101;

  // Control code bits in transmission order after the flag bit.
  localparam logic [1:0] CC_FCT = 2'b00;
  localparam logic [1:0] CC_EOP = 2'b01;
  localparam logic [1:0] CC_EEP = 2'b10;
  localparam logic [1:0] CC_ESC = 2'b11;

  // Character the link controller asks the encoder to send.
  typedef enum logic [1:0] { TXC_NONE, TXC_NULL, TXC_FCT, TXC_NCHAR } txc_e;

  // Encoder output: 7 tokens of {valid, 2 bits}, token 6 sent first and
  // within a token bit 1 (sent on the rising edge) first.
  localparam int unsigned TOKENS = 7;
  typedef struct packed {
    logic [TOKENS-1:0]      valid;
    logic [TOKENS-1:0][1:0] data;
  } tokvec_t;

  // Decoder events, at most one character per clock.
  typedef struct packed {
    logic   got_null;
    logic   got_fct;
    logic   got_nchar;
    nchar_t nchar;
    logic   err_par;
    logic   err_esc;
    logic   err_disc;
  } rx_evt_t;

  // Link state machine states (ECSS-E-ST-50-12C names).
  typedef enum logic [2:0] {
    LS_ERROR_RESET, LS_ERROR_WAIT, LS_READY, LS_STARTED, LS_CONNECTING, LS_RUN
  } link_state_e;

  // ----------------------------------------------------------------- RMAP
  localparam logic [7:0] RMAP_PROTOCOL_ID = 8'h01;

  // RMAP CRC-8: polynomial x^8+x^2+x+1, bits taken least significant first.
  function automatic logic [7:0] rmap_crc8(input logic [7:0] crc, input logic [7:0] data);
    logic [7:0] c;
    c = crc ^ data;
    for (int i = 0; i < 8; i++) c = c[0] ? ((c >> 1) ^ 8'hE0) : (c >> 1);
    return c;
  endfunction

endpackage
