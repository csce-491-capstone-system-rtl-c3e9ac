// medium_access: medium allocation control, the DCF of the transmitter.
//
// ENABLE_ACCESS (the transmitter's TxRDY) starts an allocation for a new frame and clears the
// retry counters; ENABLE_RETRY (no response came, a collision is assumed) starts one for a
// retransmission. The carrier sense mechanism calls the medium busy when the PHY carrier sense
// is set, the NAV is non-zero or the transmitter itself is sending. The medium must be seen
// idle for DIFS cycles; a busy medium restarts that count, each busy period increments the allocation retry
// counter and, the first time, asks the backoff generator for a random backoff. After DIFS of
// idle medium the backoff counts down while the medium stays idle (a busy cycle freezes it and
// returns to the DIFS deferral). When it reaches zero ACCESS_GRANTED (TxCLEAR) pulses.
// A retry increments the short retry counter SSRC when FRAME_LEN is below DOT11RTS_THRESHOLD
// and the long counter SLRC otherwise (retry management flowchart), and always draws a new
// backoff. Exceptions, one-cycle MA_ERR pulses with MA_ERRCODE: 0001 when the allocation
// retries exceed ALLOC_RETRY_LIMIT, 0010 when SSRC reaches SHORT_RETRY_LIMIT or SLRC reaches
// LONG_RETRY_LIMIT; the frame is then given up. abort returns the block to idle.
// Allocation watchdog (exception 0011): while an allocation waits for the medium, a timer runs;
// its limit is ALLOC_TIMEOUT cycles plus the last backoff drawn. When it expires, alloc_timeout
// pulses (the exception is posted but the frame is not given up), the allocation retry counter
// is incremented (0001 past its limit) and a new backoff is drawn. The watchdog's length is not
// given by the specification; ALLOC_TIMEOUT is this design's value.
module medium_access
  import mac_pkg::*;
#(
  parameter int unsigned DIFS              = 50,
  parameter int unsigned SLOT_TIME         = 20,
  parameter int unsigned CW_MIN            = 7,
  parameter int unsigned CW_MAX            = 255,
  parameter int unsigned SHORT_RETRY_LIMIT = 7,
  parameter int unsigned LONG_RETRY_LIMIT  = 4,
  parameter int unsigned ALLOC_RETRY_LIMIT = 7,
  parameter int unsigned ALLOC_TIMEOUT     = 8192,
  parameter logic [15:0] SEED              = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ENABLE_ACCESS,
  input  logic        ENABLE_RETRY,
  input  logic [15:0] NAV_REG,
  input  logic        CARRIER_SENSE,
  input  logic [11:0] DOT11RTS_THRESHOLD,
  input  logic [11:0] FRAME_LEN,
  input  logic        tx_active,
  input  logic        abort,
  output logic        ACCESS_GRANTED,
  output logic        MA_ERR,
  output logic [3:0]  MA_ERRCODE,
  output logic [3:0]  SSRC,
  output logic [3:0]  SLRC,
  output logic        backoff_started,
  output logic        alloc_timeout,
  output logic [9:0]  CW
);
  typedef enum logic [2:0] {M_IDLE, M_DEFER, M_BO_REQ, M_BO_CALC, M_BACKOFF, M_GRANT} mstate_e;
  mstate_e     st;
  logic        busy;
  logic [9:0]  difs_cnt;
  logic [19:0] bo_cnt;
  logic        bo_pending;     // a backoff must be counted before the grant
  logic        busy_seen;      // this busy period has been counted
  logic [3:0]  alloc_retry;
  logic        bo_start, bo_done;
  logic [19:0] bo_time;
  logic        short_frame;
  logic [20:0] wd_cnt;         // allocation watchdog
  logic [20:0] wd_limit;
  logic        wd_expired;

  assign busy        = CARRIER_SENSE || (NAV_REG != 16'd0) || tx_active;
  assign short_frame = FRAME_LEN < DOT11RTS_THRESHOLD;
  assign wd_expired  = (wd_cnt >= wd_limit);

  backoff_generator #(.CW_MIN(CW_MIN), .CW_MAX(CW_MAX), .SLOT_TIME(SLOT_TIME), .SEED(SEED)) u_bo (
    .clk, .rst_n, .start(bo_start), .SSRC, .SLRC, .done(bo_done), .cw(CW),
    .backoff_time(bo_time));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st              <= M_IDLE;
      difs_cnt        <= '0;
      bo_cnt          <= '0;
      bo_pending      <= 1'b0;
      busy_seen       <= 1'b0;
      alloc_retry     <= '0;
      SSRC            <= '0;
      SLRC            <= '0;
      ACCESS_GRANTED  <= 1'b0;
      MA_ERR          <= 1'b0;
      MA_ERRCODE      <= TX_OK;
      bo_start        <= 1'b0;
      backoff_started <= 1'b0;
      alloc_timeout   <= 1'b0;
      wd_cnt          <= '0;
      wd_limit        <= 21'(ALLOC_TIMEOUT);
    end else begin
      ACCESS_GRANTED  <= 1'b0;
      MA_ERR          <= 1'b0;
      bo_start        <= 1'b0;
      backoff_started <= 1'b0;
      alloc_timeout   <= 1'b0;
      if (st == M_DEFER || st == M_BACKOFF) wd_cnt <= wd_cnt + 21'd1;
      if (abort) begin
        st <= M_IDLE;
      end else begin
        unique case (st)
          M_IDLE: begin
            if (ENABLE_ACCESS) begin
              SSRC        <= '0;
              SLRC        <= '0;
              alloc_retry <= '0;
              bo_pending  <= 1'b0;
              busy_seen   <= 1'b0;
              difs_cnt    <= '0;
              wd_cnt      <= '0;
              wd_limit    <= 21'(ALLOC_TIMEOUT);
              st          <= M_DEFER;
            end else if (ENABLE_RETRY) begin
              if (short_frame && 32'(SSRC) + 1 >= SHORT_RETRY_LIMIT ||
                  !short_frame && 32'(SLRC) + 1 >= LONG_RETRY_LIMIT) begin
                MA_ERR     <= 1'b1;
                MA_ERRCODE <= TX_FRAME_RETRY;
              end else begin
                if (short_frame) SSRC <= SSRC + 4'd1;
                else             SLRC <= SLRC + 4'd1;
                alloc_retry <= '0;
                bo_pending  <= 1'b1;
                busy_seen   <= 1'b0;
                difs_cnt    <= '0;
                st          <= M_BO_REQ;    // the new counter values set the CW
              end
            end
          end
          M_DEFER: begin
            if (wd_expired) begin
              alloc_timeout <= 1'b1;
              if (32'(alloc_retry) >= ALLOC_RETRY_LIMIT) begin
                MA_ERR     <= 1'b1;
                MA_ERRCODE <= TX_ALLOC_RETRY;
                st         <= M_IDLE;
              end else begin
                alloc_retry <= alloc_retry + 4'd1;
                bo_pending  <= 1'b1;
                busy_seen   <= 1'b1;
                st          <= M_BO_REQ;
              end
            end else if (busy) begin
              difs_cnt  <= '0;
              busy_seen <= 1'b1;
              if (!busy_seen) begin
                if (32'(alloc_retry) >= ALLOC_RETRY_LIMIT) begin
                  MA_ERR     <= 1'b1;
                  MA_ERRCODE <= TX_ALLOC_RETRY;
                  st         <= M_IDLE;
                end else begin
                  alloc_retry <= alloc_retry + 4'd1;
                  if (!bo_pending) begin
                    bo_pending <= 1'b1;
                    st         <= M_BO_REQ;
                  end
                end
              end
            end else if (32'(difs_cnt) + 1 >= DIFS) begin
              busy_seen <= 1'b0;
              difs_cnt <= '0;
              if (bo_pending) st <= M_BACKOFF;
              else            st <= M_GRANT;
            end else begin
              busy_seen <= 1'b0;
              difs_cnt  <= difs_cnt + 10'd1;
            end
          end
          M_BO_REQ: begin
            bo_start <= 1'b1;
            st       <= M_BO_CALC;
          end
          M_BO_CALC: if (bo_done) begin
            bo_cnt          <= bo_time;
            backoff_started <= 1'b1;
            wd_cnt          <= '0;
            wd_limit        <= 21'(ALLOC_TIMEOUT) + 21'(bo_time);
            difs_cnt        <= '0;
            st              <= M_DEFER;
          end
          M_BACKOFF: begin
            if (busy || wd_expired) begin
              busy_seen <= 1'b0;
              st        <= M_DEFER;
            end else if (bo_cnt == 20'd0) begin
              st <= M_GRANT;
            end else begin
              bo_cnt <= bo_cnt - 20'd1;
            end
          end
          M_GRANT: begin
            ACCESS_GRANTED <= 1'b1;
            bo_pending     <= 1'b0;
            st             <= M_IDLE;
          end
          default: st <= M_IDLE;
        endcase
      end
    end
  end
endmodule
