// rx_shifter: receiver shifter. Takes 4-bit nibbles from the PHY and assembles 16-bit words.
//
// Handshake with the PHY (as specified): the PHY waits while MAC_shift_busy is high, then
// raises PHY_go with a nibble on PHY_in and holds both until MAC_shift_done. The shifter
// polls PHY_go, raises MAC_shift_busy for the cycle in which it shifts the nibble in, then
// drops busy and raises MAC_shift_done until the PHY drops PHY_go (the return to zero of
// the four-phase handshake is this design's choice; the text only says the PHY loops).
// A nibble therefore takes at least three clock cycles.
//
// The first nibble of a word is the most significant. After the fourth nibble Word_in is
// updated and new_word pulses for one cycle; new_frame is high with that pulse when the word
// is the first of a frame: after reset and after each frame_end pulse from the ATN sequencer.
// frame_end also restarts nibble alignment.
module rx_shifter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  PHY_in,
  input  logic        PHY_go,
  output logic        MAC_shift_busy,
  output logic        MAC_shift_done,
  output logic [15:0] Word_in,
  output logic        new_word,
  output logic        new_frame,
  input  logic        frame_end
);
  typedef enum logic [1:0] {S_POLL, S_SHIFT, S_DONE} state_e;
  state_e      state;
  logic [11:0] sr;
  logic [1:0]  nib_cnt;
  logic        first_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_POLL;
      sr             <= '0;
      nib_cnt        <= '0;
      first_pending  <= 1'b1;
      Word_in        <= '0;
      new_word       <= 1'b0;
      new_frame      <= 1'b0;
      MAC_shift_busy <= 1'b0;
      MAC_shift_done <= 1'b0;
    end else begin
      new_word <= 1'b0;
      if (frame_end) begin
        first_pending <= 1'b1;
        nib_cnt       <= '0;
      end
      unique case (state)
        S_POLL: if (PHY_go) begin
          MAC_shift_busy <= 1'b1;
          state          <= S_SHIFT;
        end
        S_SHIFT: begin
          MAC_shift_busy <= 1'b0;
          MAC_shift_done <= 1'b1;
          if (nib_cnt == 2'd3 && !frame_end) begin
            Word_in       <= {sr, PHY_in};
            new_word      <= 1'b1;
            new_frame     <= first_pending;
            first_pending <= 1'b0;
          end else begin
            sr <= {sr[7:0], PHY_in};
          end
          if (!frame_end) nib_cnt <= nib_cnt + 2'd1;
          state <= S_DONE;
        end
        S_DONE: if (!PHY_go) begin
          MAC_shift_done <= 1'b0;
          state          <= S_POLL;
        end
        default: state <= S_POLL;
      endcase
    end
  end

  busy_done_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                        !(MAC_shift_busy && MAC_shift_done));
endmodule
