// tb_mac_transmitter: runs the whole transmitter on MSDUs from a buffer model.
// A responder model answers each RTS with REC_CTS and each Data frame with REC_ACK, except
// one Data frame it leaves unanswered. Every frame on TX_LINE is collected and checked: its
// FCS against a bitwise CRC-32 model, its kind in the order RTS, fragments 0..15 (fragment
// 2 twice, the second time with Retry), its addresses, and its body against the buffer.
// Then a whole MSDU must go as one Data frame, and an MSDU for an unknown station must give
// error 0110 with no frame sent.
`timescale 1ns/1ps
module tb_mac_transmitter;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [47:0] DEST = 48'h04FF_FFFF_F042;
  logic msdurdy = 0, rdata = 0, rcts = 0, rrts = 0, rack = 0, cs = 0, ready = 0;
  logic [23:0] ptr = 0; logic [11:0] thr = 12'd256;
  logic rden; logic [23:0] rda; logic [31:0] rdd;
  logic [3:0] line, code; logic valid, tc, mdone, err, revt, bevt, fevt, atoevt;
  mac_transmitter #(.RESP_TIMEOUT(300)) dut (.clk, .rst_n, .MSDURDY(msdurdy), .BUF_PTR(ptr),
    .REC_DATA(rdata), .REC_CTS(rcts), .REC_RTS(rrts), .REC_ACK(rack),
    .REPLY_ADDR(48'h04FF_FFFF_F041), .NAV_REG(16'd0), .CARRIER_SENSE(cs),
    .DOT11RTS_THRESHOLD(12'd500), .FRAG_THRESHOLD(thr), .buf_rd_en(rden), .buf_rd_addr(rda),
    .buf_rd_data(rdd), .TX_LINE(line), .tx_valid(valid), .tx_ready(ready),
    .TRANSMIT_COMPLETE(tc), .msdu_done(mdone), .TX_ERR(err), .TX_ERRCODE(code),
    .retry_evt(revt), .backoff_evt(bevt), .fragment_evt(fevt),
    .alloc_timeout_evt(atoevt));

  logic [31:0] mem [2048];
  always @(posedge clk) if (rden) rdd <= mem[rda[10:0]];
  always @(negedge clk) ready <= ($urandom % 4 != 0);

  initial begin repeat (400000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] ref_nib(input logic [31:0] c, input logic [3:0] n);
    for (int b = 3; b >= 0; b--) begin
      logic fb; fb = c[31] ^ n[b]; c = c << 1; if (fb) c ^= 32'h04C1_1DB7;
    end
    return c;
  endfunction

  // collected frames
  logic [3:0] cur [$];
  int n_frames = 0, n_bad_crc = 0, n_data = 0, drop_data = -1, n_bad_body = 0, n_retry_bit = 0;
  logic [3:0] kinds [$]; logic [3:0] frags [$];
  int base = 0; bit frag_mode = 1;

  function automatic logic [15:0] w16(input int at);
    return {cur[at], cur[at+1], cur[at+2], cur[at+3]};
  endfunction
  function automatic logic [47:0] w48(input int at);
    return {w16(at), w16(at + 4), w16(at + 8)};
  endfunction

  task automatic end_of_frame();
    logic [31:0] c; logic [15:0] fc; int n, fno;
    n = cur.size();
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < n - 8; i++) c = ref_nib(c, cur[i]);
    if ({cur[n-8], cur[n-7], cur[n-6], cur[n-5], cur[n-4], cur[n-3], cur[n-2], cur[n-1]} != ~c) n_bad_crc++;
    fc = w16(0);
    kinds.push_back(fc[7:4]);
    if (fc[7:4] == ST_DATA) begin
      fno = 32'(w16(44) & 16'hF);
      frags.push_back(4'(fno));
      if (fc[11]) n_retry_bit++;
      if (w48(8) != DEST || w48(20) != MY_MAC_ADDR || w48(32) != IBSS_ADDR) n_bad_body++;
      for (int wd = 0; wd < (frag_mode ? 32 : 512); wd++) begin
        logic [31:0] v;
        v = {w16(48 + 8*wd), w16(52 + 8*wd)};
        if (v != mem[base + 2 + (frag_mode ? 32 * fno : 0) + wd]) n_bad_body++;
      end
      if (n != 48 + 8 * (frag_mode ? 32 : 512) + 8) n_bad_body++;
    end else if (fc[7:4] == ST_RTS) begin
      if (n != 40 || w48(8) != DEST || w48(20) != MY_MAC_ADDR) n_bad_body++;
    end
    n_frames++;
    // responder
    fork begin
      logic [3:0] k; int d;
      k = fc[7:4]; d = n_data;
      repeat (10) @(negedge clk);
      if (k == ST_RTS) begin rcts = 1; @(negedge clk); rcts = 0; end
      if (k == ST_DATA) begin
        n_data++;
        if (d != drop_data) begin rack = 1; @(negedge clk); rack = 0; end
      end
    end join_none
    cur.delete();
  endtask

  always @(posedge clk) if (rst_n) begin
    if (valid && ready) cur.push_back(line);
    if (tc) end_of_frame();
  end

  int n_done = 0, n_retry = 0, n_frag = 0;
  always @(posedge clk) if (rst_n) begin
    if (mdone) n_done++;
    if (revt) n_retry++;
    if (fevt) n_frag++;
  end

  task automatic send(input int b, input int limit);
    int t;
    base = b; ptr = 24'(b);
    @(negedge clk); msdurdy = 1; @(negedge clk); msdurdy = 0;
    t = 0; while (n_done == 0 && !(err && code != TX_TIMEOUT) && t < limit) begin @(negedge clk); t++; end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 2048; i++) mem[i] = $urandom;
    mem[0] = DEST[47:16]; mem[1] = {DEST[15:0], 16'h0};
    mem[1024] = DEST[47:16]; mem[1025] = {DEST[15:0], 16'h0};
    mem[600] = 32'h04FF_FFFF; mem[601] = 32'hF099_0000;
    repeat (3) @(negedge clk); rst_n = 1; repeat (100) @(negedge clk);
    drop_data = 2;
    send(0, 200000);
    check(n_done == 1 && !(err && code != TX_TIMEOUT), "fragmented MSDU done");
    check(kinds.size() == 18 && kinds[0] == ST_RTS, $sformatf("RTS and %0d frames", kinds.size()));
    check(frags.size() == 17 && frags[2] == 2 && frags[3] == 2 && frags[16] == 15, "fragment order with one retry");
    check(n_retry_bit == 1 && n_retry == 1, "one retry with the Retry bit");
    check(n_frag == 17, $sformatf("%0d fragments built", n_frag));
    // whole MSDU
    n_done = 0; drop_data = -1; thr = 12'd3000; frag_mode = 0; kinds.delete(); frags.delete();
    send(1024, 200000);
    check(n_done == 1 && kinds.size() == 2 && kinds[1] == ST_DATA, "whole MSDU as one Data frame");
    // unknown destination
    n_done = 0; kinds.delete();
    send(600, 2000);
    check(err && code == TX_UNKNOWN_ADDR && kinds.size() == 0, "unknown station: 0110, nothing sent");
    check(n_bad_crc == 0, $sformatf("%0d frames with a wrong FCS", n_bad_crc));
    check(n_bad_body == 0, $sformatf("%0d wrong addresses or body words", n_bad_body));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
