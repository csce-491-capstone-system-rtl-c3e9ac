// rx_exception_handler: the receiver's exception thread.
//
// It polls the OR of the decoders' error flags. When one is raised (and no exception has yet
// been taken in this frame) it picks one code by priority and posts it on RX_ERR/RX_ERRCODE,
// and pulses flush: the decoders clear their flags and the ATN sequencer skips the rest of
// the frame. The priority is the order of the exception handling loop figure: a retried
// frame seen again (sequence control code 1101) first, then frame control, address, sequence
// control, body and CRC errors. For a retried frame whose earlier ACK was evidently lost,
// REC_DATA is pulsed so the transmitter acknowledges it again (this reaction is this design's
// choice). A frame whose RA is not this station is not an error: processing stops the same
// way and nav_load hands its duration to the NAV register. A frame that reaches its last
// FCS word with a matching CRC and no exception gets commit (the sequence and body decoders
// keep its numbers and data), RX_ERR is cleared and one of REC_RTS, REC_CTS, REC_DATA or
// REC_ACK pulses. All outputs are registered.
module rx_exception_handler
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        frame_end,
  input  logic        frame_good,
  input  logic        fcd_err, input logic [3:0] fcd_code,
  input  logic        adr_err, input logic [3:0] adr_code,
  input  logic        scd_err, input logic [3:0] scd_code,
  input  logic        fbd_err, input logic [3:0] fbd_code,
  input  logic        fcs_err, input logic [3:0] fcs_code,
  input  logic        not_for_me,
  input  logic [3:0]  FCH_Subtype,
  output logic        flush,
  output logic        commit,
  output logic        nav_load,
  output logic        RX_ERR,
  output logic [3:0]  RX_ERRCODE,
  output logic        REC_RTS,
  output logic        REC_CTS,
  output logic        REC_DATA,
  output logic        REC_ACK
);
  logic       handled;
  logic       rcv_exception;
  logic [3:0] sel_code;

  assign rcv_exception = fcd_err | adr_err | scd_err | fbd_err | fcs_err;

  always_comb begin
    if (scd_err && scd_code == RX_RETRY_FRAME) sel_code = scd_code;
    else if (fcd_err)                          sel_code = fcd_code;
    else if (adr_err)                          sel_code = adr_code;
    else if (scd_err)                          sel_code = scd_code;
    else if (fbd_err)                          sel_code = fbd_code;
    else                                       sel_code = fcs_code;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      handled    <= 1'b0;
      flush      <= 1'b0;
      commit     <= 1'b0;
      nav_load   <= 1'b0;
      RX_ERR     <= 1'b0;
      RX_ERRCODE <= RX_OK;
      REC_RTS    <= 1'b0;
      REC_CTS    <= 1'b0;
      REC_DATA   <= 1'b0;
      REC_ACK    <= 1'b0;
    end else begin
      flush    <= 1'b0;
      commit   <= 1'b0;
      nav_load <= 1'b0;
      REC_RTS  <= 1'b0;
      REC_CTS  <= 1'b0;
      REC_DATA <= 1'b0;
      REC_ACK  <= 1'b0;
      if (frame_start) begin
        handled <= 1'b0;
      end else if (!handled && rcv_exception) begin
        handled    <= 1'b1;
        flush      <= 1'b1;
        RX_ERR     <= 1'b1;
        RX_ERRCODE <= sel_code;
        if (sel_code == RX_RETRY_FRAME) REC_DATA <= 1'b1;
      end else if (!handled && not_for_me) begin
        handled  <= 1'b1;
        flush    <= 1'b1;
        nav_load <= 1'b1;
      end else if (!handled && frame_end && frame_good) begin
        handled    <= 1'b1;
        commit     <= 1'b1;
        RX_ERR     <= 1'b0;
        RX_ERRCODE <= RX_OK;
        REC_RTS    <= (FCH_Subtype == ST_RTS);
        REC_CTS    <= (FCH_Subtype == ST_CTS);
        REC_DATA   <= (FCH_Subtype == ST_DATA);
        REC_ACK    <= (FCH_Subtype == ST_ACK);
      end
    end
  end
endmodule
