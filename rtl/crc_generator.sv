// crc_generator: the transmitter's CRC generator (TransmitCRC).
//
// CRC_enable (one-cycle pulse at the start of a transmission) resets the register to all
// ones. Each chunk the transmit frame block loads into its shift register is presented on
// chunk_data (left-aligned) with chunk_nibbles (4 for a 16-bit field, 8 for a 32-bit data
// word) and chunk_valid; the register absorbs it in the same cycle through up to eight
// table look-ups, most significant nibble first, so CRC_val is valid the cycle after the last
// chunk. CRC_val is the complement of the register, the value sent as the FCS. The table
// comes from crc32_table and is ready 64 cycles after reset (table_ready).
module crc_generator
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        CRC_enable,
  input  logic [31:0] chunk_data,
  input  logic [3:0]  chunk_nibbles,
  input  logic        chunk_valid,
  output logic [31:0] CRC_val,
  output logic        table_ready
);
  crc_table_t  tbl;
  logic [31:0] crc, crc_d;

  crc32_table u_table (.clk, .rst_n, .table_o(tbl), .table_ready);

  always_comb begin
    crc_d = crc;
    for (int i = 0; i < 8; i++)
      if (4'(i) < chunk_nibbles) crc_d = crc_nibble(crc_d, chunk_data[31 - 4*i -: 4], tbl);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           crc <= CRC_INIT;
    else if (CRC_enable)  crc <= CRC_INIT;
    else if (chunk_valid) crc <= crc_d;
  end
  assign CRC_val = ~crc;
endmodule
