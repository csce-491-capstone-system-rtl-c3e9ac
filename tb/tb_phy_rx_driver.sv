// tb_phy_rx_driver: behavioural model of the PHY receive side for one station.
//
// Frames are pushed as a byte count (push_len) followed by their nibbles (push_nib), which
// may still be arriving while the frame is delivered (cut-through). Each nibble is handed
// over with the receive handshake: wait until MAC_shift_busy is low, post the nibble with
// PHY_go, wait for MAC_shift_done, drop PHY_go, wait for MAC_shift_done to fall.
// FrameByteCount holds the frame's byte count while it is delivered; active is high then.
module tb_phy_rx_driver (
  input  logic        clk,
  output logic [3:0]  PHY_in,
  output logic        PHY_go,
  input  logic        busy,
  input  logic        done,
  output logic [11:0] FrameByteCount,
  output logic        active
);
  logic [3:0] nq[$];
  int         lq[$];

  function automatic void push_len(input int bytes);
    lq.push_back(bytes);
  endfunction
  function automatic void push_nib(input logic [3:0] n);
    nq.push_back(n);
  endfunction
  function automatic int pending();
    return nq.size();
  endfunction

  initial begin
    PHY_in = '0;
    PHY_go = 1'b0;
    FrameByteCount = '0;
    active = 1'b0;
    forever begin
      @(negedge clk);
      if (lq.size() != 0) begin
        int n;
        n = lq.pop_front();
        FrameByteCount = 12'(n);
        active = 1'b1;
        for (int i = 0; i < 2 * n; i++) begin
          while (nq.size() == 0 || busy) @(negedge clk);
          PHY_in = nq.pop_front();
          PHY_go = 1'b1;
          while (!done) @(negedge clk);
          PHY_go = 1'b0;
          while (done) @(negedge clk);
        end
        repeat (4) @(negedge clk);
        active = 1'b0;
      end
    end
  end
endmodule
