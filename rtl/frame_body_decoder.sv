// frame_body_decoder (FBD): stores the body of Data frames in ReceiveBodyBuffer and
// reassembles fragments into one MSDU of up to 2 KB.
//
// The buffer is 256 entries of 64 bits (2048 bytes). Body words arriving with Enable_FBD are
// packed into a 64-bit assembly register, first word in bits 63:48, and the entry is written
// on every word, so a body that is not a multiple of four words needs no final flush. The
// write position is a 16-bit word index: a frame whose fragment number (from the sequence
// control decoder) is 0 starts at index 0, a later fragment continues where the last committed
// fragment ended. commit (frame ended without exception) makes the new words part of the MSDU;
// without it (CRC error or any other exception) the words are abandoned and the next frame
// overwrites them. When a committed frame has MoreFragments clear, msdu_ready pulses and
// msdu_words gives the MSDU length in 16-bit words. A body that would run past 2 KB is not
// written and raises FBD_ERR with code 1010 (byte count); the specification expects no
// errors from this block, so this check is this design's own. rd_addr/rd_data is a read port
// for the upper layer with one cycle of latency.
module frame_body_decoder
  import mac_pkg::*;
#(
  parameter int ENTRIES = MAX_BODY_BYTES / 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [15:0]                SHFTOUT_BUS,
  input  logic                       Enable_FBD,
  input  logic                       word_strobe,
  input  logic                       frame_start,
  input  logic                       commit,
  input  logic                       clear,
  input  logic [3:0]                 FCH_Subtype,
  input  logic [3:0]                 SCD_FragNo,
  input  logic                       MoreFrag_Bit,
  input  logic [$clog2(ENTRIES)-1:0] rd_addr,
  output logic [63:0]                rd_data,
  output logic                       msdu_ready,
  output logic [$clog2(ENTRIES):0]   msdu_entries,
  output logic [$clog2(ENTRIES)+2:0] msdu_words,
  output logic                       FBD_ERR,
  output logic [3:0]                 FBD_ERRCODE
);
  localparam int AW = $clog2(ENTRIES);
  localparam int WW = AW + 3;          // word index width, one extra bit for "full"

  logic [63:0]   ReceiveBodyBuffer [ENTRIES];
  logic [63:0]   asm_q, asm_d;
  logic [WW-1:0] base, cnt, commit_ptr, idx;
  logic          in_body, got_body;
  logic          wr_en;

  assign idx   = (in_body ? base : ((SCD_FragNo == 4'd0) ? '0 : commit_ptr)) + (in_body ? cnt : '0);
  assign wr_en = word_strobe && Enable_FBD && (FCH_Subtype == ST_DATA) &&
                 (idx < WW'(ENTRIES * 4)) && !clear;

  logic [1:0] slot;
  assign slot = 2'd3 - idx[1:0];

  always_comb begin
    asm_d = (idx[1:0] == 2'd0) ? 64'd0 : asm_q;
    asm_d[{slot, 4'b0000} +: 16] = SHFTOUT_BUS;
  end

  always_ff @(posedge clk) begin
    if (wr_en) ReceiveBodyBuffer[idx[WW-2:2]] <= asm_d;
    rd_data <= ReceiveBodyBuffer[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_q        <= '0;
      base         <= '0;
      cnt          <= '0;
      commit_ptr   <= '0;
      in_body      <= 1'b0;
      got_body     <= 1'b0;
      msdu_ready   <= 1'b0;
      msdu_words   <= '0;
      FBD_ERR      <= 1'b0;
      FBD_ERRCODE  <= RX_OK;
    end else begin
      msdu_ready <= 1'b0;
      if (clear || frame_start) begin
        in_body     <= 1'b0;
        got_body    <= 1'b0;
        cnt         <= '0;
        FBD_ERR     <= 1'b0;
        FBD_ERRCODE <= RX_OK;
      end else if (word_strobe && Enable_FBD && FCH_Subtype == ST_DATA) begin
        if (!in_body) base <= (SCD_FragNo == 4'd0) ? '0 : commit_ptr;
        in_body  <= 1'b1;
        got_body <= 1'b1;
        if (wr_en) begin
          asm_q <= asm_d;
          cnt   <= (in_body ? cnt : '0) + 1'b1;
        end else begin
          FBD_ERR     <= 1'b1;
          FBD_ERRCODE <= RX_BYTE_COUNT;
        end
      end else if (commit && got_body) begin
        got_body <= 1'b0;
        in_body  <= 1'b0;
        if (MoreFrag_Bit) begin
          commit_ptr <= base + cnt;
        end else begin
          commit_ptr <= '0;
          msdu_ready <= 1'b1;
          msdu_words <= base + cnt;
        end
      end
    end
  end
  assign msdu_entries = msdu_words[WW-1:2] + (AW+1)'(msdu_words[1:0] != 2'd0);
endmodule
