// tb_crc32_table: checks the 16-entry nibble table of the CRC-32 polynomial 0x04C11DB7.
// Entry i must be the remainder of i*x^32 divided by the polynomial, computed here bit by bit;
// the table must be ready 64 cycles (16 entries of 4 steps) after reset, within a small margin.
`timescale 1ns/1ps
module tb_crc32_table;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  crc_table_t tbl; logic ready;
  crc32_table dut (.clk, .rst_n, .table_o(tbl), .table_ready(ready));

  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] ref_entry(input int i);
    logic [31:0] r;
    r = 32'(i) << 28;
    for (int b = 0; b < 4; b++) r = r[31] ? ((r << 1) ^ 32'h04C1_1DB7) : (r << 1);
    return r;
  endfunction

  initial begin
    int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!ready && cyc < 200) begin @(negedge clk); cyc++; end
    check(cyc >= 64 && cyc <= 70, $sformatf("table ready after %0d cycles", cyc));
    for (int i = 0; i < 16; i++)
      check(tbl[i] == ref_entry(i), $sformatf("entry %0d = %h expected %h", i, tbl[i], ref_entry(i)));
    check(tbl[1] == 32'h04C1_1DB7, "entry 1 is the polynomial");
    repeat (20) @(negedge clk);
    check(ready && tbl[15] == ref_entry(15), "table holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
