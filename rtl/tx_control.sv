// tx_control (TCB): the transmit control block, master state machine of the transmitter.
//
// Three transactions start from idle:
//  - MSDURDY (state sequence 1): BUFF_PTR is captured and an RTS is sent; on REC_CTS the Data
//    frame follows; each Data frame waits for REC_ACK. A fragmented MSDU (FRAGMENT from the
//    frame builder) sends its fragments one after another, each answered by an ACK, until the
//    builder reports LAST_FRAG; msdu_done then pulses.
//  - REC_RTS (state sequence 2): a CTS is sent to the RTS sender; REC_DATA in reply leads to
//    sequence 3.
//  - REC_DATA (state sequence 3): an ACK is sent.
// Sending a frame is: EN_BUILDFRAME with FRAMESUBTYPE, wait FRAME_DONE, ENABLE_MEDIUM, wait
// ACCESS_GRANTED, TRANSMIT (with CRC_enable to restart the CRC), wait TRANSMIT_COMPLETE.
// After an RTS, CTS or Data frame a response timer runs while the medium is idle
// (medium_busy low: the response, or a long frame, being received holds it); if
// RESP_TIMEOUT idle cycles pass without the expected frame, EN_RETRY goes to the medium allocation control (which
// counts the retry and looks for the medium again), the frame is rebuilt with its Retry bit
// set, and it is sent as soon as access is granted; timeout_evt reports the transmit timeout.
// abort, from the transmitter exception handler, returns to idle. All outputs are registered;
// the pulses last one cycle.
module tx_control
  import mac_pkg::*;
#(
  parameter int unsigned RESP_TIMEOUT = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        MSDURDY,
  input  logic [23:0] BUF_PTR,
  input  logic        REC_DATA,
  input  logic        REC_CTS,
  input  logic        REC_RTS,
  input  logic        REC_ACK,
  input  logic        FRAME_DONE,
  input  logic        LAST_FRAG,
  input  logic        ACCESS_GRANTED,
  input  logic        TRANSMIT_COMPLETE,
  input  logic        abort,
  input  logic        medium_busy,
  output logic        TRANSMIT,
  output logic        CRC_enable,
  output logic        EN_BUILDFRAME,
  output logic [3:0]  FRAMESUBTYPE,
  output logic        RETRY,
  output logic [3:0]  FRAG_NO,
  output logic        EN_RETRY,
  output logic        ENABLE_MEDIUM,
  output logic [23:0] BUFF_PTR,
  output logic        tx_active,
  output logic        timeout_evt,
  output logic        msdu_done
);
  typedef enum logic [3:0] {
    C_IDLE, C_BUILD, C_WAIT_FD, C_MEDIUM, C_WAIT_AG, C_XMIT, C_WAIT_TC, C_WAIT_RESP, C_RETRY
  } cstate_e;
  cstate_e     st;
  logic        via_retry;
  logic [15:0] timer;

  assign tx_active = (st == C_WAIT_TC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= C_IDLE;
      via_retry     <= 1'b0;
      timer         <= '0;
      TRANSMIT      <= 1'b0;
      CRC_enable    <= 1'b0;
      EN_BUILDFRAME <= 1'b0;
      FRAMESUBTYPE  <= ST_RTS;
      RETRY         <= 1'b0;
      FRAG_NO       <= '0;
      EN_RETRY      <= 1'b0;
      ENABLE_MEDIUM <= 1'b0;
      BUFF_PTR      <= '0;
      timeout_evt   <= 1'b0;
      msdu_done     <= 1'b0;
    end else begin
      TRANSMIT      <= 1'b0;
      CRC_enable    <= 1'b0;
      EN_BUILDFRAME <= 1'b0;
      EN_RETRY      <= 1'b0;
      ENABLE_MEDIUM <= 1'b0;
      timeout_evt   <= 1'b0;
      msdu_done     <= 1'b0;
      if (abort) begin
        st <= C_IDLE;
      end else begin
        unique case (st)
          C_IDLE: begin
            RETRY     <= 1'b0;
            via_retry <= 1'b0;
            FRAG_NO   <= '0;
            if (REC_RTS) begin
              FRAMESUBTYPE <= ST_CTS;
              st           <= C_BUILD;
            end else if (REC_DATA) begin
              FRAMESUBTYPE <= ST_ACK;
              st           <= C_BUILD;
            end else if (MSDURDY) begin
              BUFF_PTR     <= BUF_PTR;
              FRAMESUBTYPE <= ST_RTS;
              st           <= C_BUILD;
            end
          end
          C_BUILD: begin
            EN_BUILDFRAME <= 1'b1;
            st            <= C_WAIT_FD;
          end
          C_WAIT_FD: if (FRAME_DONE) st <= via_retry ? C_WAIT_AG : C_MEDIUM;
          C_MEDIUM: begin
            ENABLE_MEDIUM <= 1'b1;
            st            <= C_WAIT_AG;
          end
          C_WAIT_AG: if (ACCESS_GRANTED) st <= C_XMIT;
          C_XMIT: begin
            TRANSMIT   <= 1'b1;
            CRC_enable <= 1'b1;
            st         <= C_WAIT_TC;
          end
          C_WAIT_TC: if (TRANSMIT_COMPLETE) begin
            timer <= '0;
            st    <= (FRAMESUBTYPE == ST_ACK) ? C_IDLE : C_WAIT_RESP;
          end
          C_WAIT_RESP: begin
            if (!medium_busy) timer <= timer + 16'd1;
            if (FRAMESUBTYPE == ST_RTS && REC_CTS) begin
              FRAMESUBTYPE <= ST_DATA;
              FRAG_NO      <= '0;
              RETRY        <= 1'b0;
              via_retry    <= 1'b0;
              st           <= C_BUILD;
            end else if (FRAMESUBTYPE == ST_DATA && REC_ACK) begin
              RETRY     <= 1'b0;
              via_retry <= 1'b0;
              if (LAST_FRAG) begin
                msdu_done <= 1'b1;
                st        <= C_IDLE;
              end else begin
                FRAG_NO <= FRAG_NO + 4'd1;
                st      <= C_BUILD;
              end
            end else if (FRAMESUBTYPE == ST_CTS && REC_DATA) begin
              FRAMESUBTYPE <= ST_ACK;
              RETRY        <= 1'b0;
              via_retry    <= 1'b0;
              st           <= C_BUILD;
            end else if (32'(timer) + 1 >= RESP_TIMEOUT) begin
              st <= C_RETRY;
            end
          end
          C_RETRY: begin
            EN_RETRY    <= 1'b1;
            timeout_evt <= 1'b1;
            RETRY       <= 1'b1;
            via_retry   <= 1'b1;
            st          <= C_BUILD;
          end
          default: st <= C_IDLE;
        endcase
      end
    end
  end
endmodule
