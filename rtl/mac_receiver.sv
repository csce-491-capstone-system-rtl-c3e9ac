// mac_receiver: the 802.11 MAC receiver.
//
// rx_shifter assembles 16-bit words from the PHY nibbles; the word counter (atn_sequencer
// plus word_selector) decides which decoder owns each word; the frame control, DID, address,
// sequence control, body and FCS decoders work on their fields, the FCS decoder computing the
// CRC over the whole frame while the others decode; rx_exception_handler flushes frames with
// errors and reports good ones. The DID decoder is a 16-bit register that keeps the duration
// field for the NAV. All decoders see the same word bus and strobe; each latches only when its
// enable is high. The PHY holds FrameByteCount for the whole frame.
// Outputs: REC_* pulse once per good frame addressed to this station (REC_DATA also for a
// retried frame seen again); SenderAddr is the TA of the last RTS/Data frame; RX_ERR and
// RX_ERRCODE give the status of the last frame; nav_load/did_value feed the NAV register;
// the reassembled MSDU is read through rd_addr/rd_data after msdu_ready.
module mac_receiver
  import mac_pkg::*;
#(
  parameter logic [47:0] MY_ADDR = MY_MAC_ADDR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  PHY_in,
  input  logic        PHY_go,
  output logic        MAC_shift_busy,
  output logic        MAC_shift_done,
  input  logic [11:0] FrameByteCount,
  input  logic [7:0]  rd_addr,
  output logic [63:0] rd_data,
  output logic        msdu_ready,
  output logic [10:0] msdu_words,
  output logic        REC_RTS,
  output logic        REC_CTS,
  output logic        REC_DATA,
  output logic        REC_ACK,
  output logic [47:0] SenderAddr,
  output logic        RX_ERR,
  output logic [3:0]  RX_ERRCODE,
  output logic        nav_load,
  output logic [15:0] did_value,
  output logic        frame_end,
  output logic        table_ready
);
  logic [15:0] word;
  logic        new_word, new_frame;
  atn_state_e  atn_state;
  logic        en_fcd, en_did, en_addr, en_scd, en_fbd, en_fcs, en_crc;
  logic [3:0]  addr_enables, blk_select;
  logic        frame_start, flush, commit;
  logic        more_frag, retry, fch_valid;
  logic [3:0]  subtype;
  frame_type_e ftype;
  logic [1:0]  tofrom;
  logic        fcd_err, adr_err, scd_err, fbd_err, fcs_err;
  logic [3:0]  fcd_code, adr_code, scd_code, fbd_code, fcs_code;
  logic        scd_fragflag;
  logic [15:0] scd_counter;
  logic [11:0] scd_seqno;
  logic [3:0]  scd_fragno;
  logic [47:0] recv_addr, addr3;
  logic        not_for_me;
  logic [31:0] crc_out;
  logic        crc_done, frame_good;
  logic [8:0]  msdu_entries;

  assign frame_start = new_word && new_frame;

  rx_shifter u_shifter (
    .clk, .rst_n, .PHY_in, .PHY_go, .MAC_shift_busy, .MAC_shift_done,
    .Word_in(word), .new_word, .new_frame, .frame_end);

  atn_sequencer u_seq (
    .clk, .rst_n, .new_word, .new_frame, .FCH_valid(fch_valid), .frame_subtype(subtype),
    .tofrom_DS_flags(tofrom), .frame_byte_count(FrameByteCount), .flush,
    .current_atn_state(atn_state), .frame_end);

  word_selector u_sel (
    .current_atn_state(atn_state), .Enable_FCD(en_fcd), .Enable_DID(en_did), .addr_enables,
    .ADDR_Enable(en_addr), .Enable_SCD(en_scd), .Enable_FBD(en_fbd), .Enable_FCS(en_fcs),
    .en_crc, .blk_select);

  frame_control_decoder u_fcd (
    .clk, .rst_n, .SHFTOUT_BUS(word), .Enable_FCD(en_fcd), .word_strobe(new_word),
    .FrameByteCount, .clear(flush), .MoreFrag_Bit(more_frag), .Retry_Bit(retry),
    .FCH_Subtype(subtype), .FCH_Type(ftype), .tofrom_DS_flags(tofrom), .FCH_valid(fch_valid),
    .FCD_ERR(fcd_err), .FCD_ERRCODE(fcd_code));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 did_value <= '0;
    else if (new_word && en_did) did_value <= word;
  end

  address_decoder #(.MY_ADDR(MY_ADDR)) u_ad (
    .clk, .rst_n, .SHFTOUT_BUS(word), .Enable_AD(en_addr), .word_strobe(new_word),
    .frame_start, .clear(flush), .FCH_Subtype(subtype),
    .SCD_Counter(scd_counter), .SenderAddr, .RecvAddr(recv_addr), .Addr3(addr3),
    .not_for_me, .ADR_ERR(adr_err), .ADR_ERRCODE(adr_code));

  seq_control_decoder u_scd (
    .clk, .rst_n, .SHFTOUT_BUS(word), .Enable_SCD(en_scd), .word_strobe(new_word),
    .clear(flush), .commit, .FCH_Subtype(subtype), .MoreFrag_Bit(more_frag),
    .Retry_Bit(retry), .SenderAddr, .SCD_FragFlag(scd_fragflag), .SCD_Counter(scd_counter),
    .SCD_SeqNo(scd_seqno), .SCD_FragNo(scd_fragno), .SCD_ERR(scd_err), .SCD_ERRCODE(scd_code));

  frame_body_decoder u_fbd (
    .clk, .rst_n, .SHFTOUT_BUS(word), .Enable_FBD(en_fbd), .word_strobe(new_word),
    .frame_start, .commit, .clear(flush), .FCH_Subtype(subtype), .SCD_FragNo(scd_fragno),
    .MoreFrag_Bit(more_frag), .rd_addr, .rd_data, .msdu_ready, .msdu_entries,
    .msdu_words, .FBD_ERR(fbd_err), .FBD_ERRCODE(fbd_code));

  fcs_decoder u_fcs (
    .clk, .rst_n, .SHFTOUT_BUS(word), .word_strobe(new_word), .en_crc, .frame_start,
    .Enable_FCS(en_fcs), .clear(flush), .CRC_out(crc_out), .crc_done,
    .Frame_enable(frame_good), .table_ready, .FCS_ERR(fcs_err), .FCS_ERRCODE(fcs_code));

  rx_exception_handler u_exc (
    .clk, .rst_n, .frame_start, .frame_end, .frame_good,
    .fcd_err, .fcd_code, .adr_err, .adr_code, .scd_err, .scd_code,
    .fbd_err, .fbd_code, .fcs_err, .fcs_code, .not_for_me, .FCH_Subtype(subtype),
    .flush, .commit, .nav_load, .RX_ERR, .RX_ERRCODE, .REC_RTS, .REC_CTS, .REC_DATA, .REC_ACK);
endmodule
