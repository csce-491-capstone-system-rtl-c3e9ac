// mac_pkg: types and constants shared by the 802.11 MAC receiver and transmitter.
//
// Frame control word layout (bit 0 is the least significant bit of the 16-bit word):
//   [1:0] protocol version, [3:2] type, [7:4] subtype, [8] ToDS, [9] FromDS,
//   [10] MoreFragments, [11] Retry, [12] PowerManagement, [13] MoreData, [14] WEP, [15] Order.
// Only the four frame kinds of the project are supported: RTS, CTS and ACK (control type)
// and Data (data type). Exception codes follow the receiver and transmitter exception tables;
// codes 4'b1110 and 4'b1111 of the receiver table are "future use" and are given here to the
// sender-continuity and fragment-overflow checks, which the specification asks for without
// assigning codes.
//
// CRC: CRC-32 with generator 0x04C11DB7, processed most-significant bit first, four bits at a
// time through a sixteen-entry table. The register starts at all ones and the transmitted FCS
// is the complement of the final register. Words on the PHY side travel most-significant
// nibble first; 48-bit addresses travel as three 16-bit words, most significant first.
package mac_pkg;

  typedef enum logic [1:0] {
    TYPE_MGMT = 2'b00,
    TYPE_CTRL = 2'b01,
    TYPE_DATA = 2'b10,
    TYPE_RSVD = 2'b11
  } frame_type_e;

  localparam logic [3:0] ST_DATA = 4'b0000;
  localparam logic [3:0] ST_RTS  = 4'b1011;
  localparam logic [3:0] ST_CTS  = 4'b1100;
  localparam logic [3:0] ST_ACK  = 4'b1101;

  typedef struct packed {
    logic        order;
    logic        wep;
    logic        more_data;
    logic        pwr_mgt;
    logic        retry;
    logic        more_frag;
    logic        from_ds;
    logic        to_ds;
    logic [3:0]  subtype;
    frame_type_e ftype;
    logic [1:0]  prot_ver;
  } fch_t;

  // ATN present state: the frame field that the next received word belongs to.
  typedef enum logic [3:0] {
    ATN_HEADER = 4'd0,
    ATN_DID    = 4'd1,
    ATN_ADDR1  = 4'd2,
    ATN_ADDR2  = 4'd3,
    ATN_ADDR3  = 4'd4,
    ATN_SEQ    = 4'd5,
    ATN_ADDR4  = 4'd6,
    ATN_BODY   = 4'd7,
    ATN_FCS    = 4'd8,
    ATN_SKIP   = 4'd9
  } atn_state_e;

  // Receiver exception codes.
  localparam logic [3:0] RX_OK          = 4'b0000;
  localparam logic [3:0] RX_CRC         = 4'b0001;
  localparam logic [3:0] RX_PROT_VER    = 4'b0010;
  localparam logic [3:0] RX_TYPE_SUB    = 4'b0011;
  localparam logic [3:0] RX_ADDR_SYNC   = 4'b0100;
  localparam logic [3:0] RX_FRAG_SYNC   = 4'b0101;
  localparam logic [3:0] RX_ERR_FRAG    = 4'b0110;
  localparam logic [3:0] RX_DUP_SEQ     = 4'b0111;
  localparam logic [3:0] RX_SEQ_SYNC    = 4'b1000;
  localparam logic [3:0] RX_ADDR_FMT    = 4'b1001;
  localparam logic [3:0] RX_BYTE_COUNT  = 4'b1010;
  localparam logic [3:0] RX_RETRY_SYNC  = 4'b1011;
  localparam logic [3:0] RX_DUP_FRAME   = 4'b1100;
  localparam logic [3:0] RX_RETRY_FRAME = 4'b1101;
  localparam logic [3:0] RX_SENDER      = 4'b1110;
  localparam logic [3:0] RX_FRAG_OVF    = 4'b1111;

  // Transmitter exception codes.
  localparam logic [3:0] TX_OK            = 4'b0000;
  localparam logic [3:0] TX_ALLOC_RETRY   = 4'b0001;
  localparam logic [3:0] TX_FRAME_RETRY   = 4'b0010;
  localparam logic [3:0] TX_ALLOC_TIMEOUT = 4'b0011;
  localparam logic [3:0] TX_TIMEOUT       = 4'b0100;
  localparam logic [3:0] TX_INVALID_ADDR  = 4'b0101;
  localparam logic [3:0] TX_UNKNOWN_ADDR  = 4'b0110;

  // Station addresses (upper two bits zero, as the address format check requires).
  localparam logic [47:0] MY_MAC_ADDR = 48'h04FF_FFFF_F044;
  localparam logic [47:0] IBSS_ADDR   = 48'h004F_FFFF_EE11;

  // Frame sizes in bytes.
  localparam int RTS_BYTES      = 20;
  localparam int CTS_BYTES      = 14;
  localparam int ACK_BYTES      = 14;
  localparam int DATA_HDR_BYTES = 24;   // FC, DID, three addresses, sequence control
  localparam int ADDR4_BYTES    = 6;
  localparam int FCS_BYTES      = 4;
  localparam int MAX_BODY_BYTES = 2048;

  localparam logic [31:0] CRC_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  typedef logic [31:0] crc_table_t [16];

  // One table-driven CRC step for the next four message bits.
  function automatic logic [31:0] crc_nibble(input logic [31:0] crc, input logic [3:0] nib,
                                             input crc_table_t tbl);
    return {crc[27:0], 4'h0} ^ tbl[crc[31:28] ^ nib];
  endfunction

  function automatic logic [31:0] crc_word16(input logic [31:0] crc, input logic [15:0] w,
                                             input crc_table_t tbl);
    logic [31:0] c;
    c = crc;
    for (int i = 3; i >= 0; i--) c = crc_nibble(c, w[i*4 +: 4], tbl);
    return c;
  endfunction

  function automatic logic is_known_frame(input frame_type_e t, input logic [3:0] st);
    return (t == TYPE_CTRL && (st == ST_RTS || st == ST_CTS || st == ST_ACK)) ||
           (t == TYPE_DATA && st == ST_DATA);
  endfunction

endpackage
