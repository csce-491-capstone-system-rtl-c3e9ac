// seq_control_decoder (SCD): checks the sequence control word of Data frames.
//
// The word is Sequence_No (bits 15:4) and Fragment_No (bits 3:0). It is compared with the
// last frame accepted from the same sender (prev_*), using the MoreFragments and Retry bits
// latched by the frame control decoder:
//   same sequence and fragment number      -> 1101 if Retry is set (retried frame seen again),
//                                             else 1100 for a fragment, 0111 for a whole frame
//   previous frame had MoreFragments set   -> expects the same sequence number and fragment
//                                             number + 1, else 0110; a 17th fragment is 1111
//   otherwise (a new MSDU)                 -> fragment number must be 0 (0101); the sequence
//                                             number must be the previous one + 1, modulo
//                                             4096 (1000); Retry set on such a new frame is 1011
// The first frame after reset, or from a new sender, is accepted as a new MSDU with any
// sequence number. The new numbers are held as pending and become prev_* only on commit,
// which the exception handler gives for a frame that ended without any exception.
// SCD_FragFlag is set when the frame is a fragment; SCD_Counter counts the fragments of the
// open sequence accepted so far (0 when none is open). SCD_SeqNo/SCD_FragNo give the latched
// numbers to the frame body decoder. Errors are registered one cycle after the strobe.
module seq_control_decoder
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] SHFTOUT_BUS,
  input  logic        Enable_SCD,
  input  logic        word_strobe,
  input  logic        clear,
  input  logic        commit,
  input  logic [3:0]  FCH_Subtype,
  input  logic        MoreFrag_Bit,
  input  logic        Retry_Bit,
  input  logic [47:0] SenderAddr,
  output logic        SCD_FragFlag,
  output logic [15:0] SCD_Counter,
  output logic [11:0] SCD_SeqNo,
  output logic [3:0]  SCD_FragNo,
  output logic        SCD_ERR,
  output logic [3:0]  SCD_ERRCODE
);
  logic        prev_valid, prev_more;
  logic [11:0] prev_seq;
  logic [3:0]  prev_frag;
  logic [47:0] prev_sender;
  logic        pending, pend_more;
  logic [11:0] seq;
  logic [3:0]  frag;
  logic        prev_ok;
  logic [3:0]  code;

  assign seq     = SHFTOUT_BUS[15:4];
  assign frag    = SHFTOUT_BUS[3:0];
  assign prev_ok = prev_valid && (prev_sender == SenderAddr);

  always_comb begin
    code = RX_OK;
    if (FCH_Subtype != ST_DATA) begin
      code = RX_TYPE_SUB;
    end else if (prev_ok && seq == prev_seq && frag == prev_frag) begin
      if (Retry_Bit)                        code = RX_RETRY_FRAME;
      else if (MoreFrag_Bit || frag != 4'd0) code = RX_DUP_FRAME;
      else                                  code = RX_DUP_SEQ;
    end else if (prev_ok && prev_more) begin
      if (seq != prev_seq || frag != prev_frag + 4'd1) code = RX_ERR_FRAG;
      else if (frag == 4'd15 && MoreFrag_Bit)         code = RX_FRAG_OVF;
    end else begin
      if (frag != 4'd0)                             code = RX_FRAG_SYNC;
      else if (prev_ok && seq != prev_seq + 12'd1)  code = RX_SEQ_SYNC;
      else if (prev_ok && Retry_Bit)                code = RX_RETRY_SYNC;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_valid   <= 1'b0;
      prev_more    <= 1'b0;
      prev_seq     <= '0;
      prev_frag    <= '0;
      prev_sender  <= '0;
      pending      <= 1'b0;
      pend_more    <= 1'b0;
      SCD_FragFlag <= 1'b0;
      SCD_Counter  <= '0;
      SCD_SeqNo    <= '0;
      SCD_FragNo   <= '0;
      SCD_ERR      <= 1'b0;
      SCD_ERRCODE  <= RX_OK;
    end else begin
      if (clear) begin
        pending     <= 1'b0;
        SCD_ERR     <= 1'b0;
        SCD_ERRCODE <= RX_OK;
      end else if (word_strobe && Enable_SCD) begin
        SCD_SeqNo    <= seq;
        SCD_FragNo   <= frag;
        SCD_FragFlag <= MoreFrag_Bit || (frag != 4'd0);
        SCD_ERR      <= (code != RX_OK);
        SCD_ERRCODE  <= code;
        pending      <= (code == RX_OK);
        pend_more    <= MoreFrag_Bit;
      end else if (commit && pending) begin
        pending     <= 1'b0;
        prev_valid  <= 1'b1;
        prev_seq    <= SCD_SeqNo;
        prev_frag   <= SCD_FragNo;
        prev_more   <= pend_more;
        prev_sender <= SenderAddr;
        SCD_Counter <= pend_more ? 16'(SCD_FragNo) + 16'd1 : 16'd0;
      end
    end
  end
endmodule
