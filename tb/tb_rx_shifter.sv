// tb_rx_shifter: checks the PHY nibble handshake and word assembly.
// A PHY model delivers random nibbles with the four-phase PHY_go / MAC_shift_busy /
// MAC_shift_done handshake. Each group of four nibbles must come out as one word, most
// significant nibble first, with a one-cycle new_word pulse; new_frame must mark the first
// word after reset and after frame_end. Busy and done must never be high together, and a
// nibble must take at least three cycles.
`timescale 1ns/1ps
module tb_rx_shifter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] phy = 0; logic go = 0, busy, done, nw, nf, fe = 0; logic [15:0] w;
  rx_shifter dut (.clk, .rst_n, .PHY_in(phy), .PHY_go(go), .MAC_shift_busy(busy),
                  .MAC_shift_done(done), .Word_in(w), .new_word(nw), .new_frame(nf), .frame_end(fe));

  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [15:0] expq [$];
  bit          firstq [$];
  int          got = 0, both = 0, nibcyc_min = 1000;

  always @(posedge clk) if (rst_n) begin
    if (busy && done) both++;
    if (nw) begin
      got++;
      if (expq.size() == 0) check(0, "unexpected word");
      else begin
        logic [15:0] e; bit f;
        e = expq.pop_front(); f = firstq.pop_front();
        check(w == e, $sformatf("word %h expected %h", w, e));
        check(nf == f, $sformatf("new_frame %b expected %b", nf, f));
      end
    end
  end

  task automatic send_nib(input logic [3:0] n);
    int c;
    c = 0;
    while (busy) begin @(negedge clk); c++; end
    phy = n; go = 1;
    while (!done) begin @(negedge clk); c++; end
    go = 0; phy = $urandom;
    @(negedge clk); c++;
    if (c < nibcyc_min) nibcyc_min = c;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    logic [15:0] v;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int fr = 0; fr < 6; fr++) begin
      for (int k = 0; k < 5 + fr; k++) begin
        v = $urandom; expq.push_back(v); firstq.push_back(k == 0);
        for (int i = 3; i >= 0; i--) send_nib(v[4*i +: 4]);
      end
      @(negedge clk); fe = 1; @(negedge clk); fe = 0;
    end
    repeat (5) @(negedge clk);
    check(got == 45, $sformatf("%0d words received", got));
    check(both == 0, "busy and done never together");
    check(nibcyc_min >= 3, $sformatf("a nibble takes %0d cycles at least", nibcyc_min));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
