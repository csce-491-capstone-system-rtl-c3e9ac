// crc32_table: builds the sixteen-entry table for four-bit-at-a-time CRC-32 after reset.
//
// Entry i is the remainder of i * x^32 modulo the generator, i.e. the value that the
// register picks up when the four bits i are shifted out of its top. The table is made by
// the serial division itself: for each of the 16 indices a 32-bit register starts at i << 28
// and is shifted four times, XORing the generator whenever a one leaves the top, one bit per
// clock. Generation takes 64 cycles after reset; table_ready (the "C" flag of the table
// generation state diagram) then goes high and the table stays constant.
module crc32_table
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output crc_table_t table_o,
  output logic       table_ready
);
  typedef enum logic [1:0] {T_CLEARED, T_GEN, T_READY} tstate_e;
  tstate_e     st;
  logic [3:0]  index;
  logic [1:0]  bitn;
  logic [31:0] r, r_next;

  assign r_next = r[31] ? ({r[30:0], 1'b0} ^ CRC_POLY) : {r[30:0], 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= T_CLEARED;
      index       <= '0;
      bitn        <= '0;
      r           <= '0;
      table_ready <= 1'b0;
      for (int i = 0; i < 16; i++) table_o[i] <= '0;
    end else begin
      unique case (st)
        T_CLEARED: begin
          index <= '0;
          bitn  <= '0;
          r     <= '0;
          st    <= T_GEN;
        end
        T_GEN: begin
          bitn <= bitn + 2'd1;
          if (bitn == 2'd3) begin
            table_o[index] <= r_next;
            index          <= index + 4'd1;
            r              <= {index + 4'd1, 28'd0};
            if (index == 4'd15) begin
              st          <= T_READY;
              table_ready <= 1'b1;
            end
          end else begin
            r <= r_next;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
