// tb_build_frame: checks the header fields built for each frame kind.
// RTS: FCH 0x80B4 (Order set), DID = DIFS, address 1 = the destination read from the MSDU
// buffer, address 2 = own. CTS/ACK: DID = SIFS, address 1 = the reply address. Data: FCH
// with Retry and MoreFragments as expected, address 3 = IBSS, sequence number per station
// (a new MSDU takes the next number, fragments and retries keep it), fragment number in FSC.
// FRAGMENT / LAST_FRAG follow the fragmentation threshold. A destination with a top bit set
// must give error 0101 and an unknown one 0110.
`timescale 1ns/1ps
module tb_build_frame;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic en = 0, retry = 0; logic [3:0] sub = 0, fno = 0; logic [23:0] ptr = 0;
  logic [47:0] reply = 48'h04FF_FFFF_F042; logic [11:0] thr = 12'd256;
  logic rden; logic [23:0] rda; logic [31:0] rdd;
  logic frag, last, fd, err; logic [15:0] fch, did, fsc; logic [47:0] a1, a2, a3; logic [3:0] code;
  build_frame dut (.clk, .rst_n, .EN_BUILDFRAME(en), .SUBTYPE(sub), .RETRY(retry), .FRAG_NO(fno),
    .BUFF_PTR(ptr), .REPLY_ADDR(reply), .FRAG_THRESHOLD(thr), .buf_rd_en(rden), .buf_rd_addr(rda),
    .buf_rd_data(rdd), .FRAGMENT(frag), .LAST_FRAG(last), .FCH(fch), .DID(did), .ADDR1(a1),
    .ADDR2(a2), .ADDR3(a3), .FSC(fsc), .FRAME_DONE(fd), .BF_ERR(err), .BF_ERRCODE(code));

  logic [31:0] mem [64];
  always @(posedge clk) if (rden) rdd <= mem[rda[5:0]];

  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic build(input logic [3:0] s, input bit r, input int f, input int p, output bit ok);
    int c;
    sub = s; retry = r; fno = 4'(f); ptr = 24'(p);
    en = 1; @(negedge clk); en = 0;
    c = 0;
    while (!fd && !err && c < 20) begin @(negedge clk); c++; end
    ok = fd;
    check(c < 20, "build finished");
  endtask

  task automatic put_dest(input int p, input logic [47:0] a);
    mem[p] = a[47:16]; mem[p + 1] = {a[15:0], 16'h0};
  endtask

  initial begin
    bit ok;
    logic [47:0] st1 = 48'h04FF_FFFF_F041, st5 = 48'h04FF_FFFF_F045;
    for (int i = 0; i < 64; i++) mem[i] = $urandom;
    put_dest(0, st5); put_dest(16, st1); put_dest(32, 48'h44FF_FFFF_F041); put_dest(48, 48'h04FF_FFFF_F0AA);
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    build(ST_RTS, 0, 0, 0, ok);
    check(ok && fch == 16'h80B4 && did == 16'd50 && a1 == st5 && a2 == MY_MAC_ADDR, "RTS fields");
    build(ST_CTS, 0, 0, 0, ok);
    check(ok && fch == 16'h80C4 && did == 16'd10 && a1 == reply, "CTS fields");
    build(ST_ACK, 0, 0, 0, ok);
    check(ok && fch == 16'h80D4 && did == 16'd10 && a1 == reply, "ACK fields");
    // fragmented MSDU to station 5: sequence 0
    thr = 12'd256;
    for (int f = 0; f < 16; f++) begin
      build(ST_DATA, 0, f, 0, ok);
      check(ok && frag && last == (f == 15), $sformatf("fragment %0d flags", f));
      check(fch == (16'h8008 | (f != 15 ? 16'h0400 : 16'h0)) && did == 16'd50, $sformatf("fragment %0d FCH %h", f, fch));
      check(a1 == st5 && a2 == MY_MAC_ADDR && a3 == IBSS_ADDR, "Data addresses");
      check(fsc == {12'd0, 4'(f)}, $sformatf("fragment %0d FSC %h", f, fsc));
    end
    build(ST_DATA, 1, 7, 0, ok);
    check(ok && fch[11] && fsc == {12'd0, 4'd7}, "retry keeps the sequence number and sets Retry");
    // whole MSDU to station 5: next sequence; to station 1: its own counter
    thr = 12'd3000;
    build(ST_DATA, 0, 0, 0, ok);
    check(ok && !frag && last && fch == 16'h8008 && fsc == {12'd1, 4'd0}, $sformatf("whole MSDU, sequence 1 (%h)", fsc));
    build(ST_DATA, 0, 0, 16, ok);
    check(ok && a1 == st1 && fsc == {12'd0, 4'd0}, "other station starts at sequence 0");
    build(ST_DATA, 0, 0, 0, ok);
    check(ok && fsc == {12'd2, 4'd0}, "station 5 sequence 2");
    // address exceptions
    build(ST_RTS, 0, 0, 32, ok);
    check(!ok && err && code == TX_INVALID_ADDR, "invalid address: 0101");
    build(ST_DATA, 0, 0, 48, ok);
    check(!ok && err && code == TX_UNKNOWN_ADDR, "unknown station: 0110");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
