// tb_fcs_decoder: checks the receive CRC-32 check against a bitwise model.
// Random frames of header and body words are fed with en_crc (the first with frame_start),
// then the two FCS words, most significant first. With the correct FCS (the complement of
// the CRC register, initial value all ones, polynomial 0x04C11DB7) Frame_enable must pulse;
// with one bit flipped in the data or the FCS, FCS_ERR must rise with code 0001.
// CRC_out must hold the received FCS.
`timescale 1ns/1ps
module tb_fcs_decoder;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] w = 0; logic ws = 0, ec = 0, fs = 0, ef = 0, clear = 0;
  logic [31:0] co; logic done, fen, ready, err; logic [3:0] code;
  fcs_decoder dut (.clk, .rst_n, .SHFTOUT_BUS(w), .word_strobe(ws), .en_crc(ec), .frame_start(fs),
    .Enable_FCS(ef), .clear, .CRC_out(co), .crc_done(done), .Frame_enable(fen),
    .table_ready(ready), .FCS_ERR(err), .FCS_ERRCODE(code));

  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] ref_word(input logic [31:0] c, input logic [15:0] d);
    for (int b = 15; b >= 0; b--) begin
      logic fb; fb = c[31] ^ d[b]; c = c << 1; if (fb) c ^= 32'h04C1_1DB7;
    end
    return c;
  endfunction

  int n_en = 0, n_done = 0;
  always @(posedge clk) begin if (fen) n_en++; if (done) n_done++; end

  task automatic frame(input int nw, input int corrupt);
    logic [31:0] c, fcs;
    int e0, d0;
    e0 = n_en; d0 = n_done;
    c = 32'hFFFF_FFFF;
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < nw; i++) begin
      w = $urandom; c = ref_word(c, w);
      if (corrupt == 1 && i == nw / 2) w[3] = ~w[3];
      ws = 1; ec = 1; fs = (i == 0); @(negedge clk); ws = 0; ec = 0; fs = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    fcs = ~c;
    if (corrupt == 2) fcs[17] = ~fcs[17];
    for (int i = 0; i < 2; i++) begin
      w = i ? fcs[15:0] : fcs[31:16]; ws = 1; ef = 1; @(negedge clk); ws = 0; ef = 0;
    end
    @(negedge clk);
    check(n_done == d0 + 1 && co == fcs, "FCS captured");
    if (corrupt == 0) check(n_en == e0 + 1 && !err, $sformatf("%0d words: good frame accepted", nw));
    else check(n_en == e0 && err && code == RX_CRC, $sformatf("%0d words: corruption %0d detected", nw, corrupt));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (ready); @(negedge clk);
    frame(8, 0); frame(5, 0); frame(12, 0); frame(1036, 0);
    for (int i = 0; i < 60; i++) frame(2 + $urandom % 80, $urandom % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
