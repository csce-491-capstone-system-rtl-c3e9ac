// tb_crc_generator: checks the transmit CRC against a bitwise CRC-32 model.
// Random messages are fed in chunks of 1 to 8 nibbles (most significant nibble first);
// CRC_val must be the complement of the CRC register (initial value all ones, polynomial
// 0x04C11DB7, bits most significant first). CRC_enable must restart the computation.
`timescale 1ns/1ps
module tb_crc_generator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic en = 0, valid = 0, ready; logic [31:0] data = 0, crc; logic [3:0] nibs = 0;
  crc_generator dut (.clk, .rst_n, .CRC_enable(en), .chunk_data(data), .chunk_nibbles(nibs),
                     .chunk_valid(valid), .CRC_val(crc), .table_ready(ready));

  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] ref_nib(input logic [31:0] c, input logic [3:0] n);
    for (int b = 3; b >= 0; b--) begin
      logic fb; fb = c[31] ^ n[b]; c = c << 1; if (fb) c ^= 32'h04C1_1DB7;
    end
    return c;
  endfunction

  initial begin
    logic [31:0] m;
    repeat (2) @(negedge clk); rst_n = 1;
    wait (ready); @(negedge clk);
    for (int msg = 0; msg < 60; msg++) begin
      en = 1; @(negedge clk); en = 0;
      m = 32'hFFFF_FFFF;
      check(crc == 32'h0, "restart gives complement of all ones");
      for (int c = 0; c < 1 + $urandom % 40; c++) begin
        data = $urandom; nibs = 4'(1 + $urandom % 8); valid = 1;
        for (int i = 0; i < 32'(nibs); i++) m = ref_nib(m, data[31 - 4*i -: 4]);
        @(negedge clk); valid = 0;
        if ($urandom % 2) @(negedge clk);
      end
      check(crc == ~m, $sformatf("message %0d crc %h expected %h", msg, crc, ~m));
    end
    // known value: CRC of the 4 bytes "1234" MSB first with init ones, complemented
    en = 1; @(negedge clk); en = 0;
    data = 32'h3132_3334; nibs = 4'd8; valid = 1; @(negedge clk); valid = 0;
    m = 32'hFFFF_FFFF; for (int i = 0; i < 8; i++) m = ref_nib(m, data[31 - 4*i -: 4]);
    check(crc == ~m, "one full chunk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
