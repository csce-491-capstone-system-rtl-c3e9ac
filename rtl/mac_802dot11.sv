// mac_802dot11: an IEEE 802.11 MAC layer (DCF, RTS/CTS/Data/ACK) for one station.
//
// The receiver and the transmitter are joined the way the two teams' blocks meet: a good
// received RTS, CTS, Data or ACK addressed to this station becomes REC_RTS/REC_CTS/REC_DATA/
// REC_ACK of the transmit control block, the sender address of the received frame is the
// destination of the CTS or ACK sent in reply, and the duration of frames overheard for
// other stations loads the NAV register, which the medium allocation control reads as
// virtual carrier sense. Outside stay the PHY (a 4-bit receive path with the PHY_go/
// MAC_shift_busy/MAC_shift_done handshake and FrameByteCount, a 4-bit transmit path with
// valid/ready, physical carrier sense), the MSDU buffer (one 32-bit read port with one cycle
// of latency, MSDURDY and BUFF_PTR from the buffer manager) and the upper layer (read port of
// the 2 KB receive body buffer, status and exception codes). nav_tick decrements the NAV.
// ALLOC_TIMEOUT is the length in cycles of the medium-allocation watchdog (exception 0011);
// its value is this design's choice, as the specification gives none. The *_evt outputs are
// one-cycle pulses (retry, backoff, fragment, allocation timeout) for observation.
module mac_802dot11
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
  parameter int unsigned      RESP_TIMEOUT = 1024,
  parameter int unsigned      ALLOC_TIMEOUT = 8192,
  parameter logic [15:0]      SEED         = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  // PHY receive side
  input  logic [3:0]  PHY_in,
  input  logic        PHY_go,
  output logic        MAC_shift_busy,
  output logic        MAC_shift_done,
  input  logic [11:0] FrameByteCount,
  // PHY transmit side
  output logic [3:0]  PHY_Tx,
  output logic        PHY_Tx_valid,
  input  logic        PHY_Tx_ready,
  output logic        PHY_Tx_end,
  input  logic        Carrier_sense,
  input  logic        nav_tick,
  // MSDU buffer and buffer manager
  input  logic        MSDURDY,
  input  logic [23:0] BUFF_PTR,
  output logic        buf_rd_en,
  output logic [23:0] buf_rd_addr,
  input  logic [31:0] buf_rd_data,
  input  logic [11:0] DOT11RTS_THRESHOLD,
  input  logic [11:0] FRAG_THRESHOLD,
  // upper layer
  input  logic [7:0]  rx_rd_addr,
  output logic [63:0] rx_rd_data,
  output logic        rx_msdu_ready,
  output logic [10:0] rx_msdu_words,
  output logic        msdu_done,
  output logic        RX_ERR,
  output logic [3:0]  RX_ERRCODE,
  output logic        rx_frame_end,
  output logic        TX_ERR,
  output logic [3:0]  TX_ERRCODE,
  output logic [15:0] NAV,
  output logic [3:0]  rec_events,    // {REC_RTS, REC_CTS, REC_DATA, REC_ACK}
  output logic        retry_evt,
  output logic        backoff_evt,
  output logic        fragment_evt,
  output logic        alloc_timeout_evt
);
  logic        rec_rts, rec_cts, rec_data, rec_ack;
  logic [47:0] sender;
  logic        nav_load, nav_zero, rx_table_ready;
  logic [15:0] did_value;

  assign rec_events = {rec_rts, rec_cts, rec_data, rec_ack};

  mac_receiver #(.MY_ADDR(MY_ADDR)) u_rx (
    .clk, .rst_n, .PHY_in, .PHY_go, .MAC_shift_busy, .MAC_shift_done, .FrameByteCount,
    .rd_addr(rx_rd_addr), .rd_data(rx_rd_data), .msdu_ready(rx_msdu_ready),
    .msdu_words(rx_msdu_words), .REC_RTS(rec_rts), .REC_CTS(rec_cts), .REC_DATA(rec_data),
    .REC_ACK(rec_ack), .SenderAddr(sender), .RX_ERR, .RX_ERRCODE, .nav_load, .did_value,
    .frame_end(rx_frame_end), .table_ready(rx_table_ready));

  nav_register u_nav (
    .clk, .rst_n, .load(nav_load), .did_value, .tick(nav_tick), .NAV_REG(NAV), .nav_zero);

  mac_transmitter #(.MY_ADDR(MY_ADDR), .STATIONS(STATIONS), .SIFS(SIFS), .DIFS(DIFS),
                    .SLOT_TIME(SLOT_TIME), .CW_MIN(CW_MIN), .CW_MAX(CW_MAX),
                    .RESP_TIMEOUT(RESP_TIMEOUT), .ALLOC_TIMEOUT(ALLOC_TIMEOUT),
                    .SEED(SEED)) u_tx (
    .clk, .rst_n, .MSDURDY, .BUF_PTR(BUFF_PTR), .REC_DATA(rec_data), .REC_CTS(rec_cts),
    .REC_RTS(rec_rts), .REC_ACK(rec_ack), .REPLY_ADDR(sender), .NAV_REG(NAV),
    .CARRIER_SENSE(Carrier_sense), .DOT11RTS_THRESHOLD, .FRAG_THRESHOLD,
    .buf_rd_en, .buf_rd_addr, .buf_rd_data, .TX_LINE(PHY_Tx), .tx_valid(PHY_Tx_valid),
    .tx_ready(PHY_Tx_ready), .TRANSMIT_COMPLETE(PHY_Tx_end), .msdu_done, .TX_ERR, .TX_ERRCODE,
    .retry_evt, .backoff_evt, .fragment_evt,
    .alloc_timeout_evt);
endmodule
