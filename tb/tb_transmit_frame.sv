// tb_transmit_frame: checks the nibble stream of each frame kind and the PHY handshake.
// For CTS, ACK, RTS, a Data fragment and a whole Data MSDU the nibbles taken by a PHY model
// (tx_ready random) must be the fields in frame order, most significant nibble first: FCH,
// DID, address 1, [address 2], [address 3, FSC, body words from the buffer], FCS. The chunks
// offered to the CRC must be the same nibbles without the FCS. TRANSMIT_COMPLETE must pulse
// once, after the last nibble. A full-speed PHY must take one nibble per cycle within a chunk.
`timescale 1ns/1ps
module tb_transmit_frame;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic go = 0, abort = 0, frag = 0, ready = 0; logic [3:0] sub = 0;
  logic [15:0] fch = 0, did = 0, fsc = 0; logic [47:0] a1 = 0, a2 = 0, a3 = 0; logic [31:0] fcs = 0;
  logic [23:0] ptr = 0; logic rden; logic [23:0] rda; logic [31:0] rdd;
  logic [3:0] line; logic valid, tc, cv, busy; logic [31:0] cd; logic [3:0] cn;
  transmit_frame dut (.clk, .rst_n, .TRANSMIT(go), .abort, .SUBTYPE(sub), .FCH(fch), .DID(did),
    .ADDR_1(a1), .ADDR_2(a2), .ADDR_3(a3), .FSC(fsc), .FCS(fcs), .FRAGMENT(frag), .BUFF_PTR(ptr),
    .buf_rd_en(rden), .buf_rd_addr(rda), .buf_rd_data(rdd), .TX_LINE(line), .tx_valid(valid),
    .tx_ready(ready), .TRANSMIT_COMPLETE(tc), .chunk_data(cd), .chunk_nibbles(cn),
    .chunk_valid(cv), .busy);

  logic [31:0] mem [1024];
  always @(posedge clk) if (rden) rdd <= mem[rda[9:0]];

  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [3:0] got [$], crcq [$];
  int n_tc = 0; bit full_speed = 0;
  always @(negedge clk) ready <= full_speed ? 1'b1 : ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n) begin
    if (valid && ready) got.push_back(line);
    if (cv) for (int i = 0; i < 32'(cn); i++) crcq.push_back(cd[31 - 4*i -: 4]);
    if (tc) n_tc++;
  end

  task automatic run(input logic [3:0] s, input bit fr, input int fno, input string what);
    logic [3:0] exp [$];
    int t, first, last;
    sub = s; frag = fr; fch = $urandom; did = $urandom; fsc = {12'($urandom), 4'(fno)};
    a1 = {$urandom, 16'($urandom)}; a2 = {$urandom, 16'($urandom)}; a3 = {$urandom, 16'($urandom)};
    fcs = $urandom; ptr = 24'(16 * ($urandom % 4));
    for (int i = 3; i >= 0; i--) exp.push_back(fch[4*i +: 4]);
    for (int i = 3; i >= 0; i--) exp.push_back(did[4*i +: 4]);
    for (int i = 11; i >= 0; i--) exp.push_back(a1[4*i +: 4]);
    if (s == ST_RTS || s == ST_DATA) for (int i = 11; i >= 0; i--) exp.push_back(a2[4*i +: 4]);
    if (s == ST_DATA) begin
      for (int i = 11; i >= 0; i--) exp.push_back(a3[4*i +: 4]);
      for (int i = 3; i >= 0; i--) exp.push_back(fsc[4*i +: 4]);
      for (int w = 0; w < (fr ? 32 : 512); w++)
        for (int i = 7; i >= 0; i--) exp.push_back(mem[32'(ptr) + 2 + (fr ? fno * 32 : 0) + w][4*i +: 4]);
    end
    got.delete(); crcq.delete(); n_tc = 0;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    t = 0; first = -1; last = 0;
    while (n_tc == 0 && t < 50000) begin
      @(negedge clk); t++;
      if (got.size() > 0 && first < 0) first = t;
    end
    repeat (3) @(negedge clk);
    check(crcq.size() == exp.size(), $sformatf("%s: %0d nibbles to the CRC, expected %0d", what, crcq.size(), exp.size()));
    for (int i = 7; i >= 0; i--) exp.push_back(fcs[4*i +: 4]);
    check(got.size() == exp.size(), $sformatf("%s: %0d nibbles, expected %0d", what, got.size(), exp.size()));
    check(got == exp, {what, ": nibble stream"});
    check(n_tc == 1 && !busy, {what, ": one TRANSMIT_COMPLETE"});
    if (full_speed) check(t <= 3 * exp.size(), $sformatf("%s: %0d cycles at full speed", what, t));
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = $urandom;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    run(ST_CTS, 0, 0, "CTS");
    run(ST_ACK, 0, 0, "ACK");
    run(ST_RTS, 0, 0, "RTS");
    run(ST_DATA, 1, 0, "fragment 0");
    run(ST_DATA, 1, 5, "fragment 5");
    run(ST_DATA, 1, 15, "fragment 15");
    run(ST_DATA, 0, 0, "whole MSDU");
    full_speed = 1;
    run(ST_RTS, 0, 0, "RTS at full speed");
    run(ST_DATA, 1, 2, "fragment at full speed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
