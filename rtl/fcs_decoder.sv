// fcs_decoder: the receiver's CRC decoder (FCS check).
//
// The CRC-32 of the frame is computed in parallel with the field decoders: every word of the
// frame ahead of the FCS (en_crc from the word selector) goes through four table look-ups in
// one cycle; the frame control word (frame_start) restarts the register from all ones. The
// two FCS words are collected into CRC_out, high word first ("combined into 32 bits after 2
// clock cycles"), and compared with the complement of the computed register. On the second
// FCS word crc_done pulses; Frame_enable pulses with it when the FCS matches, otherwise
// FCS_ERR is set with code 0001. The lookup table comes from crc32_table, which needs 64
// cycles after reset before the first word may arrive.
module fcs_decoder
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] SHFTOUT_BUS,
  input  logic        word_strobe,
  input  logic        en_crc,
  input  logic        frame_start,
  input  logic        Enable_FCS,
  input  logic        clear,
  output logic [31:0] CRC_out,
  output logic        crc_done,
  output logic        Frame_enable,
  output logic        table_ready,
  output logic        FCS_ERR,
  output logic [3:0]  FCS_ERRCODE
);
  crc_table_t  tbl;
  logic [31:0] crc;
  logic        second;

  crc32_table u_table (.clk, .rst_n, .table_o(tbl), .table_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc          <= CRC_INIT;
      second       <= 1'b0;
      CRC_out      <= '0;
      crc_done     <= 1'b0;
      Frame_enable <= 1'b0;
      FCS_ERR      <= 1'b0;
      FCS_ERRCODE  <= RX_OK;
    end else begin
      crc_done     <= 1'b0;
      Frame_enable <= 1'b0;
      if (clear) begin
        second      <= 1'b0;
        FCS_ERR     <= 1'b0;
        FCS_ERRCODE <= RX_OK;
      end else if (word_strobe) begin
        if (frame_start) begin
          crc         <= crc_word16(CRC_INIT, SHFTOUT_BUS, tbl);
          second      <= 1'b0;
          FCS_ERR     <= 1'b0;
          FCS_ERRCODE <= RX_OK;
        end else if (en_crc) begin
          crc <= crc_word16(crc, SHFTOUT_BUS, tbl);
        end else if (Enable_FCS) begin
          if (!second) begin
            CRC_out[31:16] <= SHFTOUT_BUS;
            second         <= 1'b1;
          end else begin
            CRC_out[15:0] <= SHFTOUT_BUS;
            second        <= 1'b0;
            crc_done      <= 1'b1;
            if ({CRC_out[31:16], SHFTOUT_BUS} == ~crc) begin
              Frame_enable <= 1'b1;
            end else begin
              FCS_ERR     <= 1'b1;
              FCS_ERRCODE <= RX_CRC;
            end
          end
        end
      end
    end
  end

  table_before_data: assert property (@(posedge clk) disable iff (!rst_n)
                                      word_strobe |-> table_ready);
endmodule
