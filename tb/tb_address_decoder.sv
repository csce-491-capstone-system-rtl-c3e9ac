// tb_address_decoder: checks address capture, the "for me" decision and the address checks.
// Addresses arrive as three 16-bit words, most significant first. Address 1 must be captured
// as the receiver address and compared with the station's own address; address 2 as the
// sender. Code 1001 for an address with either of its two top bits set, 0100 for a sender
// equal to the receiver (RTS and Data), 1110 for a fragment (counter non-zero) from a sender
// other than the one of the open burst.
`timescale 1ns/1ps
module tb_address_decoder;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [47:0] ME = 48'h04FF_FFFF_F044;
  logic [15:0] w = 0, cnt = 0; logic en = 0, ws = 0, fs = 0, clear = 0; logic [3:0] sub = ST_DATA;
  logic [47:0] sa, ra, a3; logic nfm, err; logic [3:0] code;
  address_decoder #(.MY_ADDR(ME)) dut (.clk, .rst_n, .SHFTOUT_BUS(w), .Enable_AD(en),
    .word_strobe(ws), .frame_start(fs), .clear, .FCH_Subtype(sub), .SCD_Counter(cnt),
    .SenderAddr(sa), .RecvAddr(ra), .Addr3(a3), .not_for_me(nfm), .ADR_ERR(err), .ADR_ERRCODE(code));

  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic send_addr(input logic [47:0] a);
    for (int i = 2; i >= 0; i--) begin
      w = a[16*i +: 16]; en = 1; ws = 1; @(negedge clk); en = 0; ws = 0;
    end
  endtask

  // one frame: returns the code and checks captures
  task automatic frame(input logic [3:0] s, input logic [47:0] r, input logic [47:0] t,
                       input logic [47:0] x, input logic [15:0] c, input logic [3:0] exp_code,
                       input string what);
    logic [47:0] old_sa;
    old_sa = sa;
    sub = s; cnt = c;
    fs = 1; @(negedge clk); fs = 0;
    send_addr(r);
    check(ra == r && nfm == (r != ME), {what, ": receiver address and for-me"});
    if (s == ST_RTS || s == ST_DATA) send_addr(t);
    if (s == ST_DATA) begin send_addr(x); check(a3 == x, {what, ": address 3"}); end
    check(code == exp_code && err == (exp_code != 0), $sformatf("%s: code %b expected %b", what, code, exp_code));
    if ((s == ST_RTS || s == ST_DATA) && exp_code == 0) check(sa == t, {what, ": sender captured"});
    if (exp_code != 0 && exp_code != RX_ADDR_FMT) check(sa == old_sa, {what, ": sender kept on error"});
  endtask

  initial begin
    logic [47:0] r, t;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    frame(ST_RTS, ME, 48'h04FF_FFFF_F045, 0, 0, RX_OK, "RTS for me");
    frame(ST_CTS, ME, 0, 0, 0, RX_OK, "CTS for me");
    frame(ST_ACK, 48'h04FF_FFFF_F041, 0, 0, 0, RX_OK, "ACK for another");
    frame(ST_DATA, ME, 48'h04FF_FFFF_F045, 48'h004F_FFFF_EE11, 0, RX_OK, "Data");
    frame(ST_DATA, ME, ME, 48'h004F_FFFF_EE11, 0, RX_ADDR_SYNC, "sender equals receiver");
    frame(ST_RTS, 48'hC4FF_FFFF_F044, 48'h04FF_FFFF_F045, 0, 0, RX_ADDR_FMT, "bad format address 1");
    frame(ST_RTS, ME, 48'h44FF_FFFF_F045, 0, 0, RX_ADDR_FMT, "bad format address 2");
    frame(ST_DATA, ME, 48'h04FF_FFFF_F045, 0, 3, RX_OK, "fragment from the burst sender");
    frame(ST_DATA, ME, 48'h04FF_FFFF_F042, 0, 3, RX_SENDER, "fragment from another sender");
    for (int i = 0; i < 300; i++) begin
      r = {2'b00, 46'($urandom) << 14 | 46'($urandom)}; t = {2'b00, 46'({$urandom, $urandom})};
      if ($urandom % 2) r = ME;
      if ($urandom % 8 == 0) r[47] = 1;
      if ($urandom % 8 == 0) t = r;
      frame(ST_RTS, r, t, 0, 0, r[47:46] != 0 ? RX_ADDR_FMT : (t == r ? RX_ADDR_SYNC : RX_OK), "random RTS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
