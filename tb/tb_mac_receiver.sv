// tb_mac_receiver: runs whole frames through the receiver, from the PHY nibble handshake to
// the REC_ outputs and the reassembled MSDU.
// Frames are built here word by word, their FCS computed with a bitwise CRC-32 model, and
// delivered by a PHY model. Checked: each control frame for this station raises its REC_
// pulse and gives the sender address; a frame for another station loads the NAV from its
// duration field; a fragmented MSDU is reassembled byte for byte; a corrupted frame gives
// error code 0001, a bad protocol version 0010 and an unknown subtype 0011, and a good frame
// after an error is received normally.
`timescale 1ns/1ps
module tb_mac_receiver;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [47:0] ME = 48'h04FF_FFFF_F044, PEER = 48'h04FF_FFFF_F045;
  logic [3:0] phy; logic go, busy, done, act; logic [11:0] fbc;
  logic [7:0] ra = 0; logic [63:0] rd; logic ready; logic [10:0] words;
  logic rts, cts, dat, ack, err, navl, fe, tr; logic [47:0] snd; logic [3:0] code; logic [15:0] did;
  mac_receiver #(.MY_ADDR(ME)) dut (.clk, .rst_n, .PHY_in(phy), .PHY_go(go), .MAC_shift_busy(busy),
    .MAC_shift_done(done), .FrameByteCount(fbc), .rd_addr(ra), .rd_data(rd), .msdu_ready(ready),
    .msdu_words(words), .REC_RTS(rts), .REC_CTS(cts), .REC_DATA(dat), .REC_ACK(ack),
    .SenderAddr(snd), .RX_ERR(err), .RX_ERRCODE(code), .nav_load(navl), .did_value(did),
    .frame_end(fe), .table_ready(tr));
  tb_phy_rx_driver drv (.clk, .PHY_in(phy), .PHY_go(go), .busy, .done, .FrameByteCount(fbc), .active(act));

  initial begin repeat (400000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int n_rec [4], n_nav = 0, n_ready = 0;
  logic [15:0] nav_did;
  always @(posedge clk) if (rst_n) begin
    if (rts) n_rec[0]++; if (cts) n_rec[1]++; if (dat) n_rec[2]++; if (ack) n_rec[3]++;
    if (navl) begin n_nav++; nav_did = did; end
    if (ready) n_ready++;
  end

  function automatic logic [31:0] ref_word(input logic [31:0] c, input logic [15:0] d);
    for (int b = 15; b >= 0; b--) begin
      logic fb; fb = c[31] ^ d[b]; c = c << 1; if (fb) c ^= 32'h04C1_1DB7;
    end
    return c;
  endfunction

  logic [15:0] fw [$];
  task automatic add48(input logic [47:0] a);
    fw.push_back(a[47:32]); fw.push_back(a[31:16]); fw.push_back(a[15:0]);
  endtask
  // send the words in fw with an FCS; flip one bit of word `bad` if bad >= 0
  task automatic send(input int bad);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    foreach (fw[i]) c = ref_word(c, fw[i]);
    fw.push_back(~c[31:16]); fw.push_back(~c[15:0]);
    if (bad >= 0) fw[bad][0] = ~fw[bad][0];
    drv.push_len(2 * fw.size());
    foreach (fw[i]) for (int k = 3; k >= 0; k--) drv.push_nib(fw[i][4*k +: 4]);
    fw.delete();
    while (drv.pending() > 0 || act) @(negedge clk);
    repeat (10) @(negedge clk);
  endtask

  logic [15:0] msdu [$];
  task automatic data(input int seq, input int frag, input bit more, input int nbody, input int bad);
    fw.push_back(more ? 16'h0408 : 16'h0008); fw.push_back(16'd50);
    add48(ME); add48(PEER); add48(IBSS_ADDR); fw.push_back({12'(seq), 4'(frag)});
    for (int i = 0; i < nbody; i++) begin
      logic [15:0] v; v = $urandom; fw.push_back(v); if (bad < 0) msdu.push_back(v);
    end
    send(bad);
  endtask

  initial begin
    int r0 [4];
    for (int i = 0; i < 4; i++) n_rec[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    wait (tr); @(negedge clk);
    // RTS, CTS, ACK for this station
    fw.push_back(16'h00B4); fw.push_back(16'd50); add48(ME); add48(PEER); send(-1);
    check(n_rec[0] == 1 && snd == PEER, $sformatf("RTS received %0d, sender %h", n_rec[0], snd));
    fw.push_back(16'h00C4); fw.push_back(16'd10); add48(ME); send(-1);
    check(n_rec[1] == 1, "CTS received");
    fw.push_back(16'h00D4); fw.push_back(16'd10); add48(ME); send(-1);
    check(n_rec[3] == 1, "ACK received");
    // RTS for another station
    fw.push_back(16'h00B4); fw.push_back(16'd123); add48(48'h04FF_FFFF_F046); add48(PEER); send(-1);
    check(n_nav == 1 && nav_did == 16'd123 && n_rec[0] == 1, "frame for another station loads the NAV");
    // three fragments of 128 bytes, the second corrupted once
    data(0, 0, 1, 64, -1);
    data(0, 1, 1, 64, 40);
    check(err && code == RX_CRC, "corrupted fragment: CRC error");
    data(0, 1, 1, 64, -1);
    data(0, 2, 0, 64, -1);
    check(n_rec[2] == 3, $sformatf("three fragments received (%0d)", n_rec[2]));
    check(n_ready == 1 && words == 11'd192, $sformatf("MSDU ready, %0d words", words));
    begin
      int bad;
      bad = 0;
      for (int k = 0; k < 48; k++) begin
        ra = 8'(k); @(negedge clk); @(negedge clk);
        if (rd != {msdu[4*k], msdu[4*k+1], msdu[4*k+2], msdu[4*k+3]}) bad++;
      end
      check(bad == 0, $sformatf("reassembled MSDU: %0d entries differ", bad));
      msdu.delete();
    end
    // header errors
    fw.push_back(16'h00B5); fw.push_back(16'd50); add48(ME); add48(PEER); send(-1);
    check(err && code == RX_PROT_VER, "protocol version error");
    fw.push_back(16'h00E4); fw.push_back(16'd50); add48(ME); send(-1);
    check(err && code == RX_TYPE_SUB, "unknown subtype error");
    // a whole 2 KB MSDU
    r0[2] = n_rec[2];
    data(1, 0, 0, 1024, -1);
    check(n_rec[2] == r0[2] + 1 && n_ready == 2 && words == 11'd1024 && !err, "2 KB MSDU received");
    check(n_rec[0] == 1 && n_rec[1] == 1 && n_rec[3] == 1, "no stray REC_ pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
