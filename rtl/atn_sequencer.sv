// atn_sequencer: the receiver's ATN (augmented transition network) frame sequencer.
//
// current_atn_state names the frame field that the next received word belongs to. It starts
// at ATN_HEADER after reset and returns there after the last FCS word, pulsing frame_end.
// On every new_word it advances along the path of the frame kind (specification figure):
//   Header -> DID -> Addr1 -> FCS                                   (CTS, ACK)
//   Header -> DID -> Addr1 -> Addr2 -> FCS                          (RTS)
//   Header -> DID -> Addr1 -> Addr2 -> Addr3 -> SeqCntrl
//          -> [Addr4 when ToDS/FromDS = 11] -> Body -> FCS           (Data)
// Each address state lasts three words, FCS two, Body as many words as FrameByteCount leaves
// after header and FCS (FrameByteCount is held by the PHY for the whole frame; this design
// assumes it is even). The subtype and ToDS/FromDS flags come back from the frame control
// decoder, which latches them on the header word.
// flush (from the exception handler) sends the sequencer to ATN_SKIP, where the rest of the
// frame is counted off against FrameByteCount without enabling any decoder. The word counting
// in SKIP is this design's choice; the text only says the frame is flushed.
module atn_sequencer
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        new_word,
  input  logic        new_frame,
  input  logic        FCH_valid,
  input  logic [3:0]  frame_subtype,
  input  logic [1:0]  tofrom_DS_flags,
  input  logic [11:0] frame_byte_count,
  input  logic        flush,
  output atn_state_e  current_atn_state,
  output logic        frame_end
);
  atn_state_e  st;
  logic [10:0] fld_cnt;     // words consumed in the present field
  logic [10:0] frame_words; // words consumed in the frame
  logic [10:0] body_words;
  logic [10:0] total_words;
  logic        last_of_field;
  logic [11:0] hdr_bytes;
  logic [11:0] body_bytes;

  assign current_atn_state = st;
  assign total_words = frame_byte_count[11:1];
  assign hdr_bytes   = (tofrom_DS_flags == 2'b11) ? 12'(DATA_HDR_BYTES + ADDR4_BYTES)
                                                  : 12'(DATA_HDR_BYTES);
  assign body_bytes  = (frame_byte_count > hdr_bytes + 12'(FCS_BYTES))
                       ? frame_byte_count - hdr_bytes - 12'(FCS_BYTES) : 12'd0;

  always_comb begin
    unique case (st)
      ATN_ADDR1, ATN_ADDR2, ATN_ADDR3, ATN_ADDR4: last_of_field = (fld_cnt == 11'd2);
      ATN_FCS:  last_of_field = (fld_cnt == 11'd1);
      ATN_BODY: last_of_field = (fld_cnt == body_words - 11'd1);
      default:  last_of_field = 1'b1;
    endcase
  end

  function automatic atn_state_e after_seq(input logic [10:0] bw, input logic [1:0] ds);
    if (ds == 2'b11) return ATN_ADDR4;
    return (bw != 0) ? ATN_BODY : ATN_FCS;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= ATN_HEADER;
      fld_cnt     <= '0;
      frame_words <= '0;
      body_words  <= '0;
      frame_end   <= 1'b0;
    end else begin
      frame_end <= 1'b0;
      if (new_word) begin
        frame_words <= new_frame ? 11'd1 : frame_words + 11'd1;
        fld_cnt     <= last_of_field ? 11'd0 : fld_cnt + 11'd1;
      end
      if (flush && st != ATN_HEADER) begin
        // the word arriving with the flush (if any) is counted
        if ((new_word ? frame_words + 11'd1 : frame_words) >= total_words) begin
          st        <= ATN_HEADER;
          frame_end <= 1'b1;
        end else begin
          st <= ATN_SKIP;
        end
      end else if (new_word) begin
        unique case (st)
          ATN_HEADER: st <= ATN_DID;
          ATN_DID:    st <= ATN_ADDR1;
          ATN_ADDR1:  if (last_of_field)
                        st <= (FCH_valid && frame_subtype == ST_RTS) ? ATN_ADDR2 :
                              (FCH_valid && frame_subtype == ST_DATA) ? ATN_ADDR2 : ATN_FCS;
          ATN_ADDR2:  if (last_of_field)
                        st <= (frame_subtype == ST_DATA) ? ATN_ADDR3 : ATN_FCS;
          ATN_ADDR3:  if (last_of_field) st <= ATN_SEQ;
          ATN_SEQ: begin
            body_words <= body_bytes[11:1];
            st         <= after_seq(body_bytes[11:1], tofrom_DS_flags);
          end
          ATN_ADDR4:  if (last_of_field) st <= (body_words != 0) ? ATN_BODY : ATN_FCS;
          ATN_BODY:   if (last_of_field) st <= ATN_FCS;
          ATN_FCS:    if (last_of_field) begin
                        st        <= ATN_HEADER;
                        frame_end <= 1'b1;
                      end
          ATN_SKIP:   if (frame_words + 11'd1 >= total_words) begin
                        st        <= ATN_HEADER;
                        frame_end <= 1'b1;
                      end
          default:    st <= ATN_HEADER;
        endcase
      end
    end
  end
endmodule
