// build_frame (BFB): builds the header fields of the frame the transmit control block asks for.
//
// EN_BUILDFRAME (one-cycle pulse) starts a build of SUBTYPE with the given RETRY bit and
// fragment number. Four generators fill six registers (REG1..REG6 of the build frame figure):
//  - frame control header: protocol 00, type from the subtype, ToDS/FromDS/PowerManagement/
//    MoreData/WEP 0, Order 1, Retry from the input, MoreFragments set for every fragment of a
//    fragmented MSDU but the last;
//  - DID: SIFS for CTS and ACK, DIFS for RTS and Data (the predefined inter-frame spacing the
//    text assigns as the DID value);
//  - addresses: for RTS and Data the destination is read from the MSDU buffer at BUFF_PTR
//    (word 0 holds address bits 47:16, word 1 bits 15:0 in its upper half); it must have its two
//    upper bits zero (else exception 0101) and be one of the STATIONS registers (else 0110).
//    RTS: ADDR1 = destination, ADDR2 = own address. Data: ADDR1 = destination, ADDR2 = own,
//    ADDR3 = IBSS address. CTS and ACK: ADDR1 = REPLY_ADDR, the sender of the frame answered;
//  - frame sequence control (Data only): one sequence counter per station; the first
//    fragment of a new MSDU (fragment 0, Retry clear) takes the next number, later fragments
//    and retries reuse it. FSC = {sequence number, fragment number}.
// FRAGMENT is high when the MSDU (MSDU_BYTES) is larger than FRAG_THRESHOLD; it is then sent as
// MSDU_BYTES / FRAG_BYTES fragments. FRAME_DONE pulses when the registers are valid, three
// cycles after EN_BUILDFRAME for frames that read the buffer, one for the others. BF_ERR pulses
// with BF_ERRCODE instead of FRAME_DONE on an address exception.
module build_frame
  import mac_pkg::*;
#(
  parameter logic [47:0]          MY_ADDR    = MY_MAC_ADDR,
  parameter logic [47:0]          BSS_ADDR   = IBSS_ADDR,
  parameter logic [3:0][47:0]     STATIONS   = {48'h04FF_FFFF_F045, 48'h04FF_FFFF_F043,
                                                48'h04FF_FFFF_F042, 48'h04FF_FFFF_F041},
  parameter int unsigned          SIFS       = 10,
  parameter int unsigned          DIFS       = 50,
  parameter int unsigned          MSDU_BYTES = 2048,
  parameter int unsigned          FRAG_BYTES = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        EN_BUILDFRAME,
  input  logic [3:0]  SUBTYPE,
  input  logic        RETRY,
  input  logic [3:0]  FRAG_NO,
  input  logic [23:0] BUFF_PTR,
  input  logic [47:0] REPLY_ADDR,
  input  logic [11:0] FRAG_THRESHOLD,
  output logic        buf_rd_en,
  output logic [23:0] buf_rd_addr,
  input  logic [31:0] buf_rd_data,
  output logic        FRAGMENT,
  output logic        LAST_FRAG,
  output logic [15:0] FCH,
  output logic [15:0] DID,
  output logic [47:0] ADDR1,
  output logic [47:0] ADDR2,
  output logic [47:0] ADDR3,
  output logic [15:0] FSC,
  output logic        FRAME_DONE,
  output logic        BF_ERR,
  output logic [3:0]  BF_ERRCODE
);
  localparam int unsigned NUM_FRAGS = MSDU_BYTES / FRAG_BYTES;

  typedef enum logic [2:0] {B_IDLE, B_RD0, B_RD1, B_RD2, B_BUILD} bstate_e;
  bstate_e     st;
  logic [3:0]  sub_q;
  logic        retry_q;
  logic [3:0]  frag_q;
  logic [47:0] dest;
  logic [11:0] next_seq [4];
  logic [11:0] cur_seq  [4];
  logic [1:0]  sta_idx;
  logic        sta_hit;
  logic        frag_mode;
  logic        more_frag;
  fch_t        fch_d;

  assign frag_mode = (MSDU_BYTES > 32'(FRAG_THRESHOLD));
  assign more_frag = (sub_q == ST_DATA) && frag_mode && (32'(frag_q) != NUM_FRAGS - 1);

  always_comb begin
    sta_hit = 1'b0;
    sta_idx = '0;
    for (int i = 0; i < 4; i++)
      if (!sta_hit && STATIONS[i] == dest) begin
        sta_hit = 1'b1;
        sta_idx = 2'(i);
      end
  end

  always_comb begin
    fch_d           = '0;
    fch_d.prot_ver  = 2'b00;
    fch_d.ftype     = (sub_q == ST_DATA) ? TYPE_DATA : TYPE_CTRL;
    fch_d.subtype   = sub_q;
    fch_d.retry     = retry_q;
    fch_d.more_frag = more_frag;
    fch_d.order     = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= B_IDLE;
      sub_q       <= '0;
      retry_q     <= 1'b0;
      frag_q      <= '0;
      dest        <= '0;
      buf_rd_en   <= 1'b0;
      buf_rd_addr <= '0;
      FRAGMENT    <= 1'b0;
      LAST_FRAG   <= 1'b1;
      FCH         <= '0;
      DID         <= '0;
      ADDR1       <= '0;
      ADDR2       <= '0;
      ADDR3       <= '0;
      FSC         <= '0;
      FRAME_DONE  <= 1'b0;
      BF_ERR      <= 1'b0;
      BF_ERRCODE  <= TX_OK;
      for (int i = 0; i < 4; i++) begin
        next_seq[i] <= '0;
        cur_seq[i]  <= '0;
      end
    end else begin
      FRAME_DONE <= 1'b0;
      BF_ERR     <= 1'b0;
      buf_rd_en  <= 1'b0;
      unique case (st)
        B_IDLE: if (EN_BUILDFRAME) begin
          sub_q   <= SUBTYPE;
          retry_q <= RETRY;
          frag_q  <= FRAG_NO;
          if (SUBTYPE == ST_RTS || SUBTYPE == ST_DATA) begin
            buf_rd_en   <= 1'b1;
            buf_rd_addr <= BUFF_PTR;
            st          <= B_RD0;
          end else begin
            dest <= REPLY_ADDR;
            st   <= B_BUILD;
          end
        end
        B_RD0: begin
          buf_rd_en   <= 1'b1;
          buf_rd_addr <= BUFF_PTR + 24'd1;
          st          <= B_RD1;
        end
        B_RD1: begin
          dest[47:16] <= buf_rd_data;
          st          <= B_RD2;
        end
        B_RD2: begin
          dest[15:0] <= buf_rd_data[31:16];
          st         <= B_BUILD;
        end
        B_BUILD: begin
          st <= B_IDLE;
          if ((sub_q == ST_RTS || sub_q == ST_DATA) && dest[47:46] != 2'b00) begin
            BF_ERR     <= 1'b1;
            BF_ERRCODE <= TX_INVALID_ADDR;
          end else if ((sub_q == ST_RTS || sub_q == ST_DATA) && !sta_hit) begin
            BF_ERR     <= 1'b1;
            BF_ERRCODE <= TX_UNKNOWN_ADDR;
          end else begin
            FCH        <= fch_d;
            DID        <= (sub_q == ST_CTS || sub_q == ST_ACK) ? 16'(SIFS) : 16'(DIFS);
            ADDR1      <= dest;
            ADDR2      <= (sub_q == ST_RTS || sub_q == ST_DATA) ? MY_ADDR : 48'd0;
            ADDR3      <= (sub_q == ST_DATA) ? BSS_ADDR : 48'd0;
            FRAGMENT   <= (sub_q == ST_DATA) && frag_mode;
            LAST_FRAG  <= !more_frag;
            FRAME_DONE <= 1'b1;
            if (sub_q == ST_DATA) begin
              if (frag_q == 4'd0 && !retry_q) begin
                FSC               <= {next_seq[sta_idx], frag_q};
                cur_seq[sta_idx]  <= next_seq[sta_idx];
                next_seq[sta_idx] <= next_seq[sta_idx] + 12'd1;
              end else begin
                FSC <= {cur_seq[sta_idx], frag_q};
              end
            end else begin
              FSC <= '0;
            end
          end
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
