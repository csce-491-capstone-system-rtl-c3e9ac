// transmit_frame (TFB): the field multiplexer and 32-bit transmit shift register.
//
// TRANSMIT (one-cycle pulse) starts sending the frame whose fields build_frame holds. A select
// counter walks the fields in the order of the send-data state sequence: FCH, DID, the
// addresses, FSC, the MSDU data, FCS. CTS and ACK carry FCH, DID, ADDR1, FCS; RTS adds ADDR2;
// Data sends ADDR1..3, FSC and the body. Each field is loaded into the shift register as one
// chunk, left-aligned, with a shift count: 4 nibbles for a 16-bit field or a third of an
// address, 8 for a 32-bit buffer word or the FCS. The body is read from the MSDU buffer
// (one-cycle read latency), 32-bit words from BUFF_PTR + 2 + fragment number * FRAG_WORDS,
// FRAG_WORDS words for a fragment (FRAGMENT high) and MSDU_WORDS for a whole MSDU. Every
// chunk but the FCS is offered to the CRC generator as it is loaded.
// The shift register gives its top nibble on TX_LINE with tx_valid; the PHY takes it with
// tx_ready (a valid/ready handshake, this design's choice) and the register shifts by four.
// TRANSMIT_COMPLETE pulses after the last FCS nibble is taken. abort returns to idle.
module transmit_frame
  import mac_pkg::*;
#(
  parameter int unsigned MSDU_WORDS = 512,
  parameter int unsigned FRAG_WORDS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        TRANSMIT,
  input  logic        abort,
  input  logic [3:0]  SUBTYPE,
  input  logic [15:0] FCH,
  input  logic [15:0] DID,
  input  logic [47:0] ADDR_1,
  input  logic [47:0] ADDR_2,
  input  logic [47:0] ADDR_3,
  input  logic [15:0] FSC,
  input  logic [31:0] FCS,
  input  logic        FRAGMENT,
  input  logic [23:0] BUFF_PTR,
  output logic        buf_rd_en,
  output logic [23:0] buf_rd_addr,
  input  logic [31:0] buf_rd_data,
  output logic [3:0]  TX_LINE,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic        TRANSMIT_COMPLETE,
  output logic [31:0] chunk_data,
  output logic [3:0]  chunk_nibbles,
  output logic        chunk_valid,
  output logic        busy
);
  typedef enum logic [3:0] {
    SEL_FCH, SEL_DID, SEL_A1, SEL_A2, SEL_A3, SEL_FSC, SEL_DATA, SEL_FCS, SEL_END
  } sel_e;
  typedef enum logic [1:0] {T_IDLE, T_FETCH, T_WAIT, T_SHIFT} tstate_e;

  tstate_e     st;
  sel_e        sel;
  logic [1:0]  part;           // third of an address
  logic [9:0]  data_idx;
  logic [9:0]  data_words;
  logic [3:0]  sub_q;
  logic [31:0] sr;
  logic [3:0]  nib_left;
  logic [31:0] mux_data;
  logic [3:0]  mux_nibbles;
  logic [47:0] addr_sel;

  assign data_words = FRAGMENT ? 10'(FRAG_WORDS) : 10'(MSDU_WORDS);

  always_comb begin
    unique case (sel)
      SEL_A1:  addr_sel = ADDR_1;
      SEL_A2:  addr_sel = ADDR_2;
      default: addr_sel = ADDR_3;
    endcase
    mux_nibbles = 4'd4;
    unique case (sel)
      SEL_FCH:  mux_data = {FCH, 16'd0};
      SEL_DID:  mux_data = {DID, 16'd0};
      SEL_A1, SEL_A2, SEL_A3:
                mux_data = {addr_sel[47 - 16*part -: 16], 16'd0};
      SEL_FSC:  mux_data = {FSC, 16'd0};
      SEL_DATA: begin mux_data = buf_rd_data; mux_nibbles = 4'd8; end
      default:  begin mux_data = FCS;         mux_nibbles = 4'd8; end
    endcase
  end

  // field after the present one, for the frame kind being sent
  function automatic sel_e next_field(input sel_e s, input logic [3:0] st_kind);
    unique case (s)
      SEL_FCH:  return SEL_DID;
      SEL_DID:  return SEL_A1;
      SEL_A1:   return (st_kind == ST_RTS || st_kind == ST_DATA) ? SEL_A2 : SEL_FCS;
      SEL_A2:   return (st_kind == ST_DATA) ? SEL_A3 : SEL_FCS;
      SEL_A3:   return SEL_FSC;
      SEL_FSC:  return SEL_DATA;
      SEL_DATA: return SEL_FCS;
      default:  return SEL_END;
    endcase
  endfunction

  assign TX_LINE       = sr[31:28];
  assign tx_valid      = (st == T_SHIFT);
  assign chunk_data    = mux_data;
  assign chunk_nibbles = mux_nibbles;
  assign chunk_valid   = (st == T_WAIT) && (sel != SEL_FCS);
  assign busy          = (st != T_IDLE);
  assign buf_rd_addr   = BUFF_PTR + 24'd2 + 24'(FSC[3:0]) * 24'(FRAG_WORDS) + 24'(data_idx);
  assign buf_rd_en     = (st == T_FETCH) && (sel == SEL_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st                <= T_IDLE;
      sel               <= SEL_FCH;
      part              <= '0;
      data_idx          <= '0;
      sub_q             <= '0;
      sr                <= '0;
      nib_left          <= '0;
      TRANSMIT_COMPLETE <= 1'b0;
    end else begin
      TRANSMIT_COMPLETE <= 1'b0;
      if (abort) begin
        st <= T_IDLE;
      end else begin
        unique case (st)
          T_IDLE: if (TRANSMIT) begin
            sub_q    <= SUBTYPE;
            sel      <= SEL_FCH;
            part     <= '0;
            data_idx <= '0;
            st       <= T_FETCH;
          end
          T_FETCH: st <= T_WAIT;          // buffer read (data) or mux settle (fields)
          T_WAIT: begin                   // load the shift register with the selected chunk
            sr       <= mux_data;
            nib_left <= mux_nibbles;
            st       <= T_SHIFT;
          end
          T_SHIFT: if (tx_ready) begin
            sr       <= {sr[27:0], 4'h0};
            nib_left <= nib_left - 4'd1;
            if (nib_left == 4'd1) begin
              st <= T_FETCH;
              if ((sel == SEL_A1 || sel == SEL_A2 || sel == SEL_A3) && part != 2'd2) begin
                part <= part + 2'd1;
              end else if (sel == SEL_DATA && 32'(data_idx) + 1 < 32'(data_words)) begin
                data_idx <= data_idx + 10'd1;
              end else if (sel == SEL_FCS) begin
                TRANSMIT_COMPLETE <= 1'b1;
                st                <= T_IDLE;
              end else begin
                part <= '0;
                sel  <= next_field(sel, sub_q);
              end
            end
          end
          default: st <= T_IDLE;
        endcase
      end
    end
  end
endmodule
