// word_selector: decodes the ATN present state into the enable line of the one decoder block
// that owns the next word (combinational, as the specification allows).
//
// The four address states each have their own enable; they are ORed into ADDR_Enable for the
// single address decoder. en_crc is high for every field ahead of the FCS, so the CRC decoder
// runs in parallel with the field decoders. blk_select is a 4-bit code of the enabled block:
// 0 none, 1 frame control, 2 DID, 3 address, 4 sequence control, 5 body, 6 FCS (the code
// values are this design's choice; the specification figure gives only the 4-bit width).
module word_selector
  import mac_pkg::*;
(
  input  atn_state_e  current_atn_state,
  output logic        Enable_FCD,
  output logic        Enable_DID,
  output logic [3:0]  addr_enables,
  output logic        ADDR_Enable,
  output logic        Enable_SCD,
  output logic        Enable_FBD,
  output logic        Enable_FCS,
  output logic        en_crc,
  output logic [3:0]  blk_select
);
  always_comb begin
    Enable_FCD   = 1'b0;
    Enable_DID   = 1'b0;
    addr_enables = '0;
    Enable_SCD   = 1'b0;
    Enable_FBD   = 1'b0;
    Enable_FCS   = 1'b0;
    blk_select   = 4'd0;
    unique case (current_atn_state)
      ATN_HEADER: begin Enable_FCD = 1'b1;      blk_select = 4'd1; end
      ATN_DID:    begin Enable_DID = 1'b1;      blk_select = 4'd2; end
      ATN_ADDR1:  begin addr_enables[0] = 1'b1; blk_select = 4'd3; end
      ATN_ADDR2:  begin addr_enables[1] = 1'b1; blk_select = 4'd3; end
      ATN_ADDR3:  begin addr_enables[2] = 1'b1; blk_select = 4'd3; end
      ATN_ADDR4:  begin addr_enables[3] = 1'b1; blk_select = 4'd3; end
      ATN_SEQ:    begin Enable_SCD = 1'b1;      blk_select = 4'd4; end
      ATN_BODY:   begin Enable_FBD = 1'b1;      blk_select = 4'd5; end
      ATN_FCS:    begin Enable_FCS = 1'b1;      blk_select = 4'd6; end
      default:    ;
    endcase
  end
  assign ADDR_Enable = |addr_enables;
  assign en_crc = Enable_FCD | Enable_DID | ADDR_Enable | Enable_SCD | Enable_FBD;
endmodule
