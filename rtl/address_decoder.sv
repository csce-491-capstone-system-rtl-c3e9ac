// address_decoder (AD): collects the one to four 48-bit addresses of a frame and checks them.
//
// ADDR_Enable stays high for the three words of each address; each word is shifted into a
// 48-bit register on word_strobe (most significant word first) and after the third word the
// address is complete. frame_start (the strobe of the frame control word) restarts the
// address count. Checks: the first two addresses (RA and TA) must have their two upper bits
// zero (code 1001); for RTS and Data the TA must differ from the RA (0100); for Data, when the
// sequence control decoder reports an open fragment sequence (SCD_Counter non-zero), the TA
// must be the sender of that sequence (code 1110, a code the exception table leaves free).
// not_for_me is set when the RA is not MY_ADDR; it is not an error, the exception handler
// ends processing of such a frame and uses its duration for the NAV.
// SenderAddr holds the TA of the last RTS or Data frame; RecvAddr and Addr3 the RA and the
// third address. ADR_ERR/ADR_ERRCODE are registered and held until clear or the next frame.
module address_decoder
  import mac_pkg::*;
#(
  parameter logic [47:0] MY_ADDR = MY_MAC_ADDR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] SHFTOUT_BUS,
  input  logic        Enable_AD,
  input  logic        word_strobe,
  input  logic        frame_start,
  input  logic        clear,
  input  logic [3:0]  FCH_Subtype,
  input  logic [15:0] SCD_Counter,
  output logic [47:0] SenderAddr,
  output logic [47:0] RecvAddr,
  output logic [47:0] Addr3,
  output logic        not_for_me,
  output logic        ADR_ERR,
  output logic [3:0]  ADR_ERRCODE
);
  logic [31:0] sr;
  logic [1:0]  word_cnt;
  logic [1:0]  addr_idx;
  logic [47:0] full;
  logic [3:0]  code;

  assign full = {sr, SHFTOUT_BUS};

  always_comb begin
    code = RX_OK;
    if (addr_idx == 2'd0) begin
      if (full[47:46] != 2'b00) code = RX_ADDR_FMT;
    end else if (addr_idx == 2'd1) begin
      if (full[47:46] != 2'b00)                                        code = RX_ADDR_FMT;
      else if ((FCH_Subtype == ST_RTS || FCH_Subtype == ST_DATA) && full == RecvAddr)
                                                                       code = RX_ADDR_SYNC;
      else if (FCH_Subtype == ST_DATA && SCD_Counter != 16'd0 && full != SenderAddr)
                                                                       code = RX_SENDER;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      word_cnt    <= '0;
      addr_idx    <= '0;
      SenderAddr  <= '0;
      RecvAddr    <= '0;
      Addr3       <= '0;
      not_for_me  <= 1'b0;
      ADR_ERR     <= 1'b0;
      ADR_ERRCODE <= RX_OK;
    end else if (clear || frame_start) begin
      word_cnt    <= '0;
      addr_idx    <= '0;
      not_for_me  <= 1'b0;
      ADR_ERR     <= 1'b0;
      ADR_ERRCODE <= RX_OK;
    end else if (word_strobe && Enable_AD) begin
      sr <= {sr[15:0], SHFTOUT_BUS};
      if (word_cnt == 2'd2) begin
        word_cnt <= '0;
        addr_idx <= addr_idx + 2'd1;
        if (code != RX_OK) begin
          ADR_ERR     <= 1'b1;
          ADR_ERRCODE <= code;
        end
        unique case (addr_idx)
          2'd0: begin
            RecvAddr   <= full;
            not_for_me <= (full != MY_ADDR);
          end
          2'd1: if (code == RX_OK) SenderAddr <= full;
          2'd2: Addr3 <= full;
          default: ;
        endcase
      end else begin
        word_cnt <= word_cnt + 2'd1;
      end
    end
  end
endmodule
