// taillight_top: FPGA design of the Thunderbird tail-light controller.
//
// The host console supplies the five function inputs (LEFT, RIGHT, BRAKE,
// HAZARD, LIGHTS) together with the state clock CLK (about 2-3 Hz) and RESET;
// a function generator supplies DIMCLK (about 100 Hz, 50% duty cycle). The
// Moore state machine (taillight_fsm) handles turn, brake and hazard and
// produces six light signals; the running-lights logic (running_lights)
// combines them with LIGHTS and DIMCLK into the six LED drive outputs.
//
// Interface: plain 1-bit inputs, and two 3-bit LED outputs per side with bit
// 0 the innermost light. LEDs need external buffers or an inverter stage and
// series resistors. Timing: led_* follow a switch change one CLK rising edge
// later (Moore machine); LIGHTS and DIMCLK act on the outputs without a clock.
// RESET is asynchronous and active high.
module taillight_top
  import taillight_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       left,
  input  logic       right,
  input  logic       brake,
  input  logic       hazard,
  input  logic       lights,
  input  logic       dimclk,
  output logic [2:0] led_left,
  output logic [2:0] led_right
);

  ctrl_t  ctrl;
  lamps_t fsm_lamps;
  lamps_t led;

  assign ctrl = '{left: left, right: right, brake: brake, hazard: hazard};

  taillight_fsm u_fsm (
    .clk   (clk),
    .rst   (reset),
    .ctrl  (ctrl),
    .lamps (fsm_lamps)
  );

  running_lights u_dim (
    .fsm_lamps (fsm_lamps),
    .lights    (lights),
    .dimclk    (dimclk),
    .led       (led)
  );

  assign led_left  = led.left;
  assign led_right = led.right;

endmodule
