// mac_transmitter: the 802.11 MAC transmitter.
//
// tx_control runs the frame transactions; build_frame prepares the header fields;
// medium_access (with its backoff_generator) gains the medium under the DCF rules;
// transmit_frame multiplexes the fields and MSDU words into the 32-bit shift register and
// sends them to the PHY four bits at a time, while crc_generator computes the FCS over every
// chunk it loads; tx_exception_handler collects the exceptions and aborts the transaction.
// alloc_timeout_evt pulses when the medium-allocation watchdog (ALLOC_TIMEOUT cycles plus the
// drawn backoff) runs out; the code 0011 is posted and medium access backs off again.
// The frame builder (destination address) and the transmit frame block (body words) share
// one read port of the MSDU buffer; they never read at the same time. The frame length given
// to the retry logic is the size of the frame being sent: 20 bytes for RTS, 14 for CTS and
// ACK, 28 plus the fragment or MSDU size for Data.
module mac_transmitter
  import mac_pkg::*;
#(
  parameter logic [47:0]      MY_ADDR      = MY_MAC_ADDR,
  parameter logic [3:0][47:0] STATIONS     = {48'h04FF_FFFF_F045, 48'h04FF_FFFF_F043,
                                              48'h04FF_FFFF_F042, 48'h04FF_FFFF_F041},
  parameter int unsigned      SIFS         = 10,
  parameter int unsigned      DIFS         = 50,
  parameter int unsigned      SLOT_TIME    = 20,
  parameter int unsigned      CW_MIN       = 7,
  parameter int unsigned      CW_MAX       = 255,
  parameter int unsigned      MSDU_BYTES   = 2048,
  parameter int unsigned      FRAG_BYTES   = 128,
  parameter int unsigned      RESP_TIMEOUT = 1024,
  parameter int unsigned      ALLOC_TIMEOUT = 8192,
  parameter logic [15:0]      SEED         = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        MSDURDY,
  input  logic [23:0] BUF_PTR,
  input  logic        REC_DATA,
  input  logic        REC_CTS,
  input  logic        REC_RTS,
  input  logic        REC_ACK,
  input  logic [47:0] REPLY_ADDR,
  input  logic [15:0] NAV_REG,
  input  logic        CARRIER_SENSE,
  input  logic [11:0] DOT11RTS_THRESHOLD,
  input  logic [11:0] FRAG_THRESHOLD,
  output logic        buf_rd_en,
  output logic [23:0] buf_rd_addr,
  input  logic [31:0] buf_rd_data,
  output logic [3:0]  TX_LINE,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic        TRANSMIT_COMPLETE,
  output logic        msdu_done,
  output logic        TX_ERR,
  output logic [3:0]  TX_ERRCODE,
  output logic        retry_evt,
  output logic        backoff_evt,
  output logic        fragment_evt,
  output logic        alloc_timeout_evt
);
  logic        transmit, crc_enable, en_build, retry_bit, en_retry, enable_medium;
  logic        tx_active, timeout_evt, abort;
  logic [3:0]  subtype, frag_no;
  logic [23:0] buff_ptr;
  logic        frame_done, fragment, last_frag, bf_err, ma_err, access_granted;
  logic [3:0]  bf_code, ma_code, ssrc, slrc;
  logic [9:0]  cw;
  logic [15:0] fch, did, fsc;
  logic [47:0] addr1, addr2, addr3;
  logic [31:0] crc_val, chunk_data;
  logic [3:0]  chunk_nibbles;
  logic        chunk_valid, tf_busy, crc_ready;
  logic        bf_rd_en, tf_rd_en;
  logic [23:0] bf_rd_addr, tf_rd_addr;
  logic [11:0] frame_len;

  always_comb begin
    unique case (subtype)
      ST_RTS:  frame_len = 12'(RTS_BYTES);
      ST_DATA: frame_len = 12'(DATA_HDR_BYTES + FCS_BYTES) +
                           (fragment ? 12'(FRAG_BYTES) : 12'(MSDU_BYTES));
      default: frame_len = 12'(CTS_BYTES);
    endcase
  end

  assign buf_rd_en    = bf_rd_en | tf_rd_en;
  assign buf_rd_addr  = bf_rd_en ? bf_rd_addr : tf_rd_addr;
  assign retry_evt    = en_retry;
  assign fragment_evt = frame_done && fragment;

  tx_control #(.RESP_TIMEOUT(RESP_TIMEOUT)) u_tcb (
    .clk, .rst_n, .MSDURDY, .BUF_PTR, .REC_DATA, .REC_CTS, .REC_RTS, .REC_ACK,
    .FRAME_DONE(frame_done), .LAST_FRAG(last_frag), .ACCESS_GRANTED(access_granted),
    .TRANSMIT_COMPLETE, .abort, .medium_busy(CARRIER_SENSE), .TRANSMIT(transmit), .CRC_enable(crc_enable),
    .EN_BUILDFRAME(en_build), .FRAMESUBTYPE(subtype), .RETRY(retry_bit), .FRAG_NO(frag_no),
    .EN_RETRY(en_retry), .ENABLE_MEDIUM(enable_medium), .BUFF_PTR(buff_ptr), .tx_active,
    .timeout_evt, .msdu_done);

  build_frame #(.MY_ADDR(MY_ADDR), .STATIONS(STATIONS), .SIFS(SIFS), .DIFS(DIFS),
                .MSDU_BYTES(MSDU_BYTES), .FRAG_BYTES(FRAG_BYTES)) u_bfb (
    .clk, .rst_n, .EN_BUILDFRAME(en_build), .SUBTYPE(subtype), .RETRY(retry_bit),
    .FRAG_NO(frag_no), .BUFF_PTR(buff_ptr), .REPLY_ADDR, .FRAG_THRESHOLD,
    .buf_rd_en(bf_rd_en), .buf_rd_addr(bf_rd_addr), .buf_rd_data,
    .FRAGMENT(fragment), .LAST_FRAG(last_frag), .FCH(fch), .DID(did),
    .ADDR1(addr1), .ADDR2(addr2), .ADDR3(addr3), .FSC(fsc), .FRAME_DONE(frame_done),
    .BF_ERR(bf_err), .BF_ERRCODE(bf_code));

  medium_access #(.DIFS(DIFS), .SLOT_TIME(SLOT_TIME), .CW_MIN(CW_MIN), .CW_MAX(CW_MAX),
                  .ALLOC_TIMEOUT(ALLOC_TIMEOUT), .SEED(SEED)) u_ma (
    .clk, .rst_n, .ENABLE_ACCESS(enable_medium), .ENABLE_RETRY(en_retry), .NAV_REG,
    .CARRIER_SENSE, .DOT11RTS_THRESHOLD, .FRAME_LEN(frame_len), .tx_active(tx_active | tf_busy),
    .abort, .ACCESS_GRANTED(access_granted), .MA_ERR(ma_err), .MA_ERRCODE(ma_code),
    .SSRC(ssrc), .SLRC(slrc), .backoff_started(backoff_evt),
    .alloc_timeout(alloc_timeout_evt), .CW(cw));

  transmit_frame #(.MSDU_WORDS(MSDU_BYTES / 4), .FRAG_WORDS(FRAG_BYTES / 4)) u_tfb (
    .clk, .rst_n, .TRANSMIT(transmit), .abort, .SUBTYPE(subtype), .FCH(fch), .DID(did),
    .ADDR_1(addr1), .ADDR_2(addr2), .ADDR_3(addr3), .FSC(fsc), .FCS(crc_val),
    .FRAGMENT(fragment), .BUFF_PTR(buff_ptr), .buf_rd_en(tf_rd_en), .buf_rd_addr(tf_rd_addr),
    .buf_rd_data, .TX_LINE, .tx_valid, .tx_ready, .TRANSMIT_COMPLETE, .chunk_data,
    .chunk_nibbles, .chunk_valid, .busy(tf_busy));

  crc_generator u_crc (
    .clk, .rst_n, .CRC_enable(crc_enable), .chunk_data, .chunk_nibbles, .chunk_valid,
    .CRC_val(crc_val), .table_ready(crc_ready));

  tx_exception_handler u_exc (
    .clk, .rst_n, .clear(MSDURDY), .ma_err, .ma_code, .bf_err, .bf_code, .timeout_evt,
    .alloc_timeout(alloc_timeout_evt), .abort, .TX_ERR, .TX_ERRCODE);

  one_buffer_reader: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(bf_rd_en && tf_rd_en));
endmodule
