// frame_control_decoder (FCD): latches the frame control word of each frame and checks it.
//
// On word_strobe with Enable_FCD the 16-bit word on SHFTOUT_BUS is decoded and checked, in
// this order: protocol version must be 00 (code 0010); type and subtype must be one of RTS,
// CTS, ACK or Data (0011); FrameByteCount must fit the frame kind (1010): 20 bytes for RTS,
// 14 for CTS and ACK, and for Data the header (24 bytes, 30 with four addresses) plus FCS plus a
// body of at most 2048 bytes, and below 2048 bytes when MoreFragments is set (a fragment that is
// not the last). Without an error the subtype, type, ToDS/FromDS, MoreFragments and Retry bits
// are loaded into the output registers and FCH_valid is set. FCD_ERR/FCD_ERRCODE are registered
// one cycle after the strobe and stay until clear (from the exception handler) or the next
// frame control word.
module frame_control_decoder
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] SHFTOUT_BUS,
  input  logic        Enable_FCD,
  input  logic        word_strobe,
  input  logic [11:0] FrameByteCount,
  input  logic        clear,
  output logic        MoreFrag_Bit,
  output logic        Retry_Bit,
  output logic [3:0]  FCH_Subtype,
  output frame_type_e FCH_Type,
  output logic [1:0]  tofrom_DS_flags,
  output logic        FCH_valid,
  output logic        FCD_ERR,
  output logic [3:0]  FCD_ERRCODE
);
  fch_t        f;
  logic [3:0]  code;
  logic [11:0] hdr_bytes;
  logic [11:0] min_bytes;
  logic [11:0] body_bytes;

  assign f          = fch_t'(SHFTOUT_BUS);
  assign hdr_bytes  = (f.to_ds && f.from_ds) ? 12'(DATA_HDR_BYTES + ADDR4_BYTES)
                                             : 12'(DATA_HDR_BYTES);
  assign min_bytes  = hdr_bytes + 12'(FCS_BYTES);
  assign body_bytes = FrameByteCount - min_bytes;

  always_comb begin
    code = RX_OK;
    if (f.prot_ver != 2'b00)
      code = RX_PROT_VER;
    else if (!is_known_frame(f.ftype, f.subtype))
      code = RX_TYPE_SUB;
    else if (f.ftype == TYPE_CTRL) begin
      if (f.subtype == ST_RTS && FrameByteCount != 12'(RTS_BYTES)) code = RX_BYTE_COUNT;
      if (f.subtype == ST_CTS && FrameByteCount != 12'(CTS_BYTES)) code = RX_BYTE_COUNT;
      if (f.subtype == ST_ACK && FrameByteCount != 12'(ACK_BYTES)) code = RX_BYTE_COUNT;
    end else begin
      if (FrameByteCount < min_bytes)                                  code = RX_BYTE_COUNT;
      else if (body_bytes > 12'(MAX_BODY_BYTES))                        code = RX_BYTE_COUNT;
      else if (f.more_frag && body_bytes >= 12'(MAX_BODY_BYTES))        code = RX_BYTE_COUNT;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      MoreFrag_Bit    <= 1'b0;
      Retry_Bit       <= 1'b0;
      FCH_Subtype     <= '0;
      FCH_Type        <= TYPE_MGMT;
      tofrom_DS_flags <= '0;
      FCH_valid       <= 1'b0;
      FCD_ERR         <= 1'b0;
      FCD_ERRCODE     <= RX_OK;
    end else if (clear) begin
      FCH_valid   <= 1'b0;
      FCD_ERR     <= 1'b0;
      FCD_ERRCODE <= RX_OK;
    end else if (word_strobe && Enable_FCD) begin
      FCD_ERR     <= (code != RX_OK);
      FCD_ERRCODE <= code;
      FCH_valid   <= (code == RX_OK);
      if (code == RX_OK) begin
        FCH_Subtype     <= f.subtype;
        FCH_Type        <= f.ftype;
        tofrom_DS_flags <= {f.to_ds, f.from_ds};
        MoreFrag_Bit    <= f.more_frag;
        Retry_Bit       <= f.retry;
      end
    end
  end
endmodule
