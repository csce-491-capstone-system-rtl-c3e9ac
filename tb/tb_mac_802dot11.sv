// tb_mac_802dot11: end-to-end test of the MAC with every parameter of the top at its default.
//
// Station A is the top itself. Station B (the destination, address ...F045) and station C
// (a bystander, address ...F046) are made of the receiver, transmitter and NAV blocks with
// their own addresses. A shared medium model carries each transmitted nibble, as it leaves
// the transmit shift register, to the receive drivers of the other two stations, and the
// physical carrier sense of every station is high while any frame is being delivered.
// Scenario:
//  1. A 2 KB MSDU with a fragmentation threshold of 256 bytes: RTS, CTS, then 16 fragments
//     of 128 bytes, each answered by an ACK. The medium is held busy when the MSDU is posted,
//     so A has to back off. Fragment 3 is corrupted on the air (B's CRC check fails, no ACK,
//     A times out and retries), and the ACK of fragment 5 is corrupted (A retries, B sees the
//     retried fragment again and acknowledges it once more).
//  2. A second 2 KB MSDU with the threshold above 2 KB: one unfragmented Data frame. The
//     medium is held busy longer than the allocation watchdog first, so A posts the
//     allocation timeout (0011), backs off again and then sends.
// Checks: both MSDUs complete at A, B reassembles exactly the bytes of each MSDU, B reports
// the CRC error and the retried frame, C loads its NAV from a frame not addressed to it, and
// every mechanism (backoff, retry, fragmentation, CRC error, retried frame, NAV update,
// allocation timeout, transmit stall, switch between fragmented and whole MSDUs, the four received frame kinds)
// happens at least once.
`timescale 1ns/1ps
module tb_mac_802dot11;
  import mac_pkg::*;

  localparam logic [47:0] ADDR_A = MY_MAC_ADDR;
  localparam logic [47:0] ADDR_B = 48'h04FF_FFFF_F045;
  localparam logic [47:0] ADDR_C = 48'h04FF_FFFF_F046;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- medium ----------------
  logic inject_busy = 0;
  logic medium_busy;
  logic actA, actB, actC;
  assign medium_busy = actA | actB | actC | inject_busy;

  // ---------------- station A (the top) ----------------
  logic [3:0]  A_PHY_in;  logic A_go, A_busy, A_done;  logic [11:0] A_fbc;
  logic [3:0]  A_tx;      logic A_txv, A_txr = 0, A_txend;
  logic        A_msdurdy = 0; logic [23:0] A_ptr = 0;
  logic        A_rd_en;   logic [23:0] A_rd_addr; logic [31:0] A_rd_data;
  logic [11:0] A_fragthr = 12'd256;
  logic [63:0] A_rxd;     logic A_rx_ready; logic [10:0] A_rx_words;
  logic        A_msdu_done, A_rx_err, A_rx_end, A_tx_err;
  logic [3:0]  A_rx_code, A_tx_code, A_rec;
  logic [15:0] A_nav;
  logic        A_retry, A_backoff, A_frag, A_ato, B_ato;

  mac_802dot11 dut (
    .clk, .rst_n, .PHY_in(A_PHY_in), .PHY_go(A_go), .MAC_shift_busy(A_busy),
    .MAC_shift_done(A_done), .FrameByteCount(A_fbc), .PHY_Tx(A_tx), .PHY_Tx_valid(A_txv),
    .PHY_Tx_ready(A_txr), .PHY_Tx_end(A_txend), .Carrier_sense(medium_busy), .nav_tick(1'b1),
    .MSDURDY(A_msdurdy), .BUFF_PTR(A_ptr), .buf_rd_en(A_rd_en), .buf_rd_addr(A_rd_addr),
    .buf_rd_data(A_rd_data), .DOT11RTS_THRESHOLD(12'd500), .FRAG_THRESHOLD(A_fragthr),
    .rx_rd_addr(8'd0), .rx_rd_data(A_rxd), .rx_msdu_ready(A_rx_ready),
    .rx_msdu_words(A_rx_words), .msdu_done(A_msdu_done), .RX_ERR(A_rx_err),
    .RX_ERRCODE(A_rx_code), .rx_frame_end(A_rx_end), .TX_ERR(A_tx_err), .TX_ERRCODE(A_tx_code),
    .NAV(A_nav), .rec_events(A_rec), .retry_evt(A_retry), .backoff_evt(A_backoff),
    .fragment_evt(A_frag), .alloc_timeout_evt(A_ato));

  // MSDU buffer of A: word 0/1 destination address, then 512 data words
  logic [31:0] bufA [2048];
  always @(posedge clk) if (A_rd_en) A_rd_data <= bufA[A_rd_addr[10:0]];

  tb_phy_rx_driver drvA (.clk, .PHY_in(A_PHY_in), .PHY_go(A_go), .busy(A_busy), .done(A_done),
                         .FrameByteCount(A_fbc), .active(actA));

  // ---------------- station B ----------------
  logic [3:0]  B_PHY_in;  logic B_go, B_busy, B_done;  logic [11:0] B_fbc;
  logic [3:0]  B_tx;      logic B_txv, B_txr = 0, B_txend;
  logic        B_rec_rts, B_rec_cts, B_rec_data, B_rec_ack, B_nav_load, B_rx_end;
  logic [47:0] B_sender;
  logic        B_rx_err;  logic [3:0] B_rx_code;
  logic [15:0] B_did, B_nav;
  logic [7:0]  B_rd_addr = 0; logic [63:0] B_rd_data;
  logic        B_rx_ready; logic [10:0] B_rx_words;
  logic        B_msdu_done, B_tx_err, B_retry, B_backoff, B_frag, B_navz, B_tr, B_rden;
  logic [3:0]  B_tx_code;
  logic [23:0] B_rdaddr;

  mac_receiver #(.MY_ADDR(ADDR_B)) uB_rx (
    .clk, .rst_n, .PHY_in(B_PHY_in), .PHY_go(B_go), .MAC_shift_busy(B_busy),
    .MAC_shift_done(B_done), .FrameByteCount(B_fbc), .rd_addr(B_rd_addr), .rd_data(B_rd_data),
    .msdu_ready(B_rx_ready), .msdu_words(B_rx_words), .REC_RTS(B_rec_rts), .REC_CTS(B_rec_cts),
    .REC_DATA(B_rec_data), .REC_ACK(B_rec_ack), .SenderAddr(B_sender), .RX_ERR(B_rx_err),
    .RX_ERRCODE(B_rx_code), .nav_load(B_nav_load), .did_value(B_did), .frame_end(B_rx_end),
    .table_ready(B_tr));
  nav_register uB_nav (.clk, .rst_n, .load(B_nav_load), .did_value(B_did), .tick(1'b1),
                       .NAV_REG(B_nav), .nav_zero(B_navz));
  mac_transmitter #(.MY_ADDR(ADDR_B), .SEED(16'h1D2B)) uB_tx (
    .clk, .rst_n, .MSDURDY(1'b0), .BUF_PTR(24'd0), .REC_DATA(B_rec_data), .REC_CTS(B_rec_cts),
    .REC_RTS(B_rec_rts), .REC_ACK(B_rec_ack), .REPLY_ADDR(B_sender), .NAV_REG(B_nav),
    .CARRIER_SENSE(medium_busy), .DOT11RTS_THRESHOLD(12'd500), .FRAG_THRESHOLD(12'd256),
    .buf_rd_en(B_rden), .buf_rd_addr(B_rdaddr), .buf_rd_data(32'd0), .TX_LINE(B_tx),
    .tx_valid(B_txv), .tx_ready(B_txr), .TRANSMIT_COMPLETE(B_txend), .msdu_done(B_msdu_done),
    .TX_ERR(B_tx_err), .TX_ERRCODE(B_tx_code), .retry_evt(B_retry), .backoff_evt(B_backoff),
    .fragment_evt(B_frag), .alloc_timeout_evt(B_ato));

  tb_phy_rx_driver drvB (.clk, .PHY_in(B_PHY_in), .PHY_go(B_go), .busy(B_busy), .done(B_done),
                         .FrameByteCount(B_fbc), .active(actB));

  // ---------------- station C (bystander) ----------------
  logic [3:0]  C_PHY_in;  logic C_go, C_busy, C_done;  logic [11:0] C_fbc;
  logic        C_rts, C_cts, C_data, C_ack, C_nav_load, C_end, C_err, C_ready, C_tr, C_navz;
  logic [47:0] C_sender;  logic [3:0] C_code; logic [15:0] C_did, C_nav;
  logic [63:0] C_rdd;     logic [10:0] C_words;

  mac_receiver #(.MY_ADDR(ADDR_C)) uC_rx (
    .clk, .rst_n, .PHY_in(C_PHY_in), .PHY_go(C_go), .MAC_shift_busy(C_busy),
    .MAC_shift_done(C_done), .FrameByteCount(C_fbc), .rd_addr(8'd0), .rd_data(C_rdd),
    .msdu_ready(C_ready), .msdu_words(C_words), .REC_RTS(C_rts), .REC_CTS(C_cts),
    .REC_DATA(C_data), .REC_ACK(C_ack), .SenderAddr(C_sender), .RX_ERR(C_err),
    .RX_ERRCODE(C_code), .nav_load(C_nav_load), .did_value(C_did), .frame_end(C_end),
    .table_ready(C_tr));
  nav_register uC_nav (.clk, .rst_n, .load(C_nav_load), .did_value(C_did), .tick(1'b1),
                       .NAV_REG(C_nav), .nav_zero(C_navz));

  tb_phy_rx_driver drvC (.clk, .PHY_in(C_PHY_in), .PHY_go(C_go), .busy(C_busy), .done(C_done),
                         .FrameByteCount(C_fbc), .active(actC));

  // ---------------- air: cut-through from a transmitter to the other two receivers -------
  logic frag_mode = 1;
  bit   verbose = 0;
  initial verbose = $test$plusargs("verbose");
  int   corruptA = -1, corruptB = -1;   // index of a frame to corrupt on the air
  int   framesA = 0, framesB = 0, nibA = 0, nibB = 0;
  logic [3:0] headA [4], headB [4];
  int   a_kind [16];                    // frames sent by A per subtype
  int   b_kind [16];

  function automatic int frame_bytes(input logic [15:0] fc);
    fch_t f;
    f = fch_t'(fc);
    if (f.ftype == TYPE_DATA) return DATA_HDR_BYTES + FCS_BYTES + (frag_mode ? 128 : 2048);
    if (f.subtype == ST_RTS) return RTS_BYTES;
    return CTS_BYTES;
  endfunction

  always @(negedge clk) begin
    A_txr <= (drvB.pending() < 4) && (drvC.pending() < 4);
    B_txr <= (drvA.pending() < 4) && (drvC.pending() < 4);
  end

  always @(posedge clk) if (rst_n) begin
    if (A_txv && A_txr) begin
      logic [3:0] n;
      n = A_tx;
      if (framesA == corruptA && nibA == 100) n = n ^ 4'h1;
      if (nibA < 4) begin
        headA[nibA] = n;
        if (nibA == 3) begin
          int len;
          len = frame_bytes({headA[0], headA[1], headA[2], headA[3]});
          a_kind[headA[2]]++;
          if (verbose) $display("%t A sends subtype %h frame %0d", $time, headA[2], framesA);
          drvB.push_len(len); drvC.push_len(len);
          for (int i = 0; i < 4; i++) begin drvB.push_nib(headA[i]); drvC.push_nib(headA[i]); end
        end
      end else begin
        drvB.push_nib(n); drvC.push_nib(n);
      end
      nibA++;
    end
    if (A_txend) begin framesA++; nibA = 0; end
    if (B_txv && B_txr) begin
      logic [3:0] n;
      n = B_tx;
      if (framesB == corruptB && nibB == 20) n = n ^ 4'h1;
      if (nibB < 4) begin
        headB[nibB] = n;
        if (nibB == 3) begin
          int len;
          len = frame_bytes({headB[0], headB[1], headB[2], headB[3]});
          b_kind[headB[2]]++;
          if (verbose) $display("%t B sends subtype %h frame %0d", $time, headB[2], framesB);
          drvA.push_len(len); drvC.push_len(len);
          for (int i = 0; i < 4; i++) begin drvA.push_nib(headB[i]); drvC.push_nib(headB[i]); end
        end
      end else begin
        drvA.push_nib(n); drvC.push_nib(n);
      end
      nibB++;
    end
    if (B_txend) begin framesB++; nibB = 0; end
  end

  // ---------------- event counters ----------------
  int n_backoff = 0, n_retry = 0, n_frag = 0, n_crc_err = 0, n_retry_frame = 0;
  int n_nav_c = 0, n_rec_a_cts = 0, n_rec_a_ack = 0, n_rec_b_rts = 0, n_rec_b_data = 0;
  int n_msdu_a = 0, n_msdu_b = 0, n_other_err = 0;
  int n_ato = 0;
  int c_nav_max = 0, n_stall = 0, n_mode_switch = 0;
  logic last_frag_mode = 1;
  always @(posedge clk) if (rst_n) begin
    if (A_txv && !A_txr) n_stall++;        // transmitter held by the PHY
    // a Data frame built in the other mode (fragment / whole MSDU) than the previous one
    if (dut.u_tx.frame_done && dut.u_tx.subtype == ST_DATA) begin
      if (dut.u_tx.fragment != last_frag_mode) n_mode_switch++;
      last_frag_mode <= dut.u_tx.fragment;
    end
    if (A_backoff) n_backoff++;
    if (A_ato)     n_ato++;
    if (A_retry)   n_retry++;
    if (A_frag)    n_frag++;
    if (A_rec[2])  n_rec_a_cts++;
    if (A_rec[0])  n_rec_a_ack++;
    if (B_rec_rts) n_rec_b_rts++;
    if (B_rec_data) n_rec_b_data++;
    if (C_nav_load) n_nav_c++;
    if (32'(C_nav) > c_nav_max) c_nav_max = 32'(C_nav);
    if (A_msdu_done) n_msdu_a++;
    if (B_rx_ready)  n_msdu_b++;
    if (uB_rx.u_exc.flush && B_rx_err) begin
      if (B_rx_code == RX_CRC)              n_crc_err++;
      else if (B_rx_code == RX_RETRY_FRAME) n_retry_frame++;
      else begin n_other_err++; $display("%t B exception code %b", $time, B_rx_code); end
      if (verbose) $display("%t B flush code %b", $time, B_rx_code);
    end
    if (dut.u_rx.u_exc.flush && A_rx_err) begin
      if (A_rx_code == RX_CRC) n_crc_err++;
      else begin n_other_err++; $display("A exception code %b", A_rx_code); end
    end
  end

  // ---------------- checks of the reassembled MSDU ----------------
  task automatic check_msdu(input int base);
    int bad;
    bad = 0;
    check(B_rx_words == 11'd1024, $sformatf("MSDU length %0d words", B_rx_words));
    for (int e = 0; e < 256; e++) begin
      @(negedge clk) B_rd_addr = 8'(e);
      @(negedge clk);
      if (B_rd_data !== {bufA[base + 2 + 2*e], bufA[base + 3 + 2*e]}) bad++;
    end
    check(bad == 0, $sformatf("reassembled MSDU differs in %0d entries", bad));
  endtask

  task automatic send_msdu(input int base, input int limit);
    int t;
    @(negedge clk);
    A_ptr     = 24'(base);
    A_msdurdy = 1;
    @(negedge clk);
    A_msdurdy = 0;
    t = 0;
    while (!(n_msdu_a > 0 && n_msdu_b > 0) && t < limit) begin @(negedge clk); t++; end
    check(t < limit, "MSDU transaction finished");
  endtask

  initial begin
    // watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) bufA[i] = $urandom;
    bufA[0]    = ADDR_B[47:16]; bufA[1]    = {ADDR_B[15:0], 16'h0};
    bufA[1024] = ADDR_B[47:16]; bufA[1025] = {ADDR_B[15:0], 16'h0};
    for (int i = 0; i < 16; i++) begin a_kind[i] = 0; b_kind[i] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);          // CRC tables

    // ---- 1: fragmented MSDU with busy medium, a lost fragment and a lost ACK ----
    corruptA    = 4;                      // RTS, frag0, frag1, frag2, frag3 <- corrupted
    corruptB    = 6;                      // CTS, ACK0..ACK3, ACK4, ACK5 <- corrupted
    frag_mode   = 1;
    A_fragthr   = 12'd256;
    inject_busy = 1;
    fork
      begin repeat (40) @(negedge clk); inject_busy = 0; end
      send_msdu(0, 300000);
    join
    check(a_kind[4'hB] == 1, $sformatf("one RTS sent (%0d)", a_kind[4'hB]));
    check(a_kind[4'h0] == 18, $sformatf("16 fragments plus 2 retries sent (%0d)", a_kind[4'h0]));
    check(b_kind[4'hD] == 17, $sformatf("B sent 17 ACKs (%0d)", b_kind[4'hD]));
    check_msdu(0);
    check(A_tx_code == TX_TIMEOUT, "A posted the transmit timeout");

    // ---- 2: unfragmented MSDU ----
    n_msdu_a  = 0; n_msdu_b = 0;
    corruptA  = -1; corruptB = -1;
    repeat (200) @(negedge clk);
    frag_mode = 0;
    A_fragthr = 12'd4000;
    inject_busy = 1;                      // longer than the allocation watchdog
    fork
      begin repeat (10000) @(negedge clk); inject_busy = 0; end
      send_msdu(1024, 300000);
    join
    check(a_kind[4'h0] == 19, "one whole Data frame sent");
    check_msdu(1024);
    check(A_tx_err && A_tx_code == TX_ALLOC_TIMEOUT, "allocation timeout posted for the second MSDU");

    // ---- mechanisms ----
    check(n_backoff > 0,      $sformatf("backoff happened %0d times", n_backoff));
    check(n_retry >= 2,       $sformatf("retries happened %0d times", n_retry));
    check(n_frag > 0,         $sformatf("fragmentation happened %0d times", n_frag));
    check(n_crc_err >= 2,     $sformatf("CRC errors detected %0d times", n_crc_err));
    check(n_retry_frame == 1, $sformatf("retried frame seen again %0d times", n_retry_frame));
    check(n_nav_c > 0 && c_nav_max == DIFS_VAL, $sformatf("NAV update at C %0d, max %0d", n_nav_c, c_nav_max));
    check(n_rec_a_cts == 2,   $sformatf("A received %0d CTS", n_rec_a_cts));
    check(n_rec_a_ack == 17,  $sformatf("A received %0d ACKs", n_rec_a_ack));
    check(n_rec_b_rts == 2,   $sformatf("B received %0d RTS", n_rec_b_rts));
    check(n_rec_b_data == 18, $sformatf("B received %0d Data (incl. the retried one)", n_rec_b_data));
    check(n_other_err == 0,   "no unexpected exception");
    check(n_ato > 0,          $sformatf("allocation timeouts %0d", n_ato));
    check(n_stall > 0,        $sformatf("transmit stalls %0d", n_stall));
    check(n_mode_switch > 0,  $sformatf("fragmented/whole mode switches %0d", n_mode_switch));
    $display("events: backoff=%0d retry=%0d frag=%0d crc=%0d retryframe=%0d nav=%0d stall=%0d switch=%0d alloc_timeout=%0d",
             n_backoff, n_retry, n_frag, n_crc_err, n_retry_frame, n_nav_c, n_stall, n_mode_switch, n_ato);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int DIFS_VAL = 50;
endmodule
