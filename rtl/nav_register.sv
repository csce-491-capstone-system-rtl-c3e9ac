// nav_register: the network allocation vector (virtual carrier sense).
//
// load presents the duration field of a received frame that was addressed to another
// station. A duration field with bit 15 clear carries a duration in bits 14:0; it replaces
// the NAV only when it is larger than the present value. The NAV then counts down by one
// on each tick (one per microsecond in a real station; the tick rate is the integrator's
// choice) until it reaches zero; nav_zero tells the medium access control the medium is
// free as far as the NAV knows. NAV_REG is the 16-bit view used by the transmitter.
module nav_register (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] did_value,
  input  logic        tick,
  output logic [15:0] NAV_REG,
  output logic        nav_zero
);
  logic [14:0] nav;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nav <= '0;
    end else if (load && !did_value[15] && did_value[14:0] > nav) begin
      nav <= did_value[14:0];
    end else if (tick && nav != 15'd0) begin
      nav <= nav - 15'd1;
    end
  end
  assign NAV_REG  = {1'b0, nav};
  assign nav_zero = (nav == 15'd0);
endmodule
