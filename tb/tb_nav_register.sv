// tb_nav_register: checks the network allocation vector against a reference model.
// A DID value with bit 15 clear loads the NAV only if it is larger than the current value;
// bit 15 set never loads; the NAV counts down by one on each tick and stops at zero.
// Random loads and ticks are compared with a model every cycle.
`timescale 1ns/1ps
module tb_nav_register;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic load = 0, tick = 0; logic [15:0] did = 0, nav; logic nav_zero;
  nav_register dut (.clk, .rst_n, .load, .did_value(did), .tick, .NAV_REG(nav), .nav_zero);

  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int model = 0;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); check(nav == 0 && nav_zero, "NAV zero after reset");
    // directed: load 50, bit-15 value ignored, smaller value ignored, count down
    load = 1; did = 16'd50; @(negedge clk); load = 0; check(nav == 50, "load 50");
    load = 1; did = 16'h8000 | 16'd500; @(negedge clk); load = 0; check(nav == 50, "bit 15 set: no load");
    load = 1; did = 16'd20; @(negedge clk); load = 0; check(nav == 50, "smaller value: no load");
    tick = 1; repeat (50) @(negedge clk); tick = 0; check(nav == 0 && nav_zero, "count down to zero in 50 ticks");
    tick = 1; @(negedge clk); tick = 0; check(nav == 0, "stays at zero");
    model = 0;
    for (int i = 0; i < 3000; i++) begin
      load = ($urandom % 8) == 0; tick = $urandom % 2; did = 16'($urandom % 300);
      if ($urandom % 4 == 0) did[15] = 1;
      @(negedge clk);
      if (load && !did[15] && 32'(did[14:0]) > model) model = 32'(did[14:0]);
      else if (tick && model != 0) model--;
      check(32'(nav) == model && nav_zero == (model == 0), $sformatf("random step %0d nav %0d model %0d", i, nav, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
