// running_lights: combinational LED drive logic for the running lights.
//
// The state machine's six light outputs say which lights are fully on. When
// LIGHTS is asserted, every light the state machine leaves dark is instead
// driven by DIMCLK, a ~100 Hz square wave of 50% duty cycle, so it looks lit
// at half brightness. A light that is on stays steadily on, and with LIGHTS
// off the state machine outputs pass unchanged. Per light:
//     led = fsm_lamp | (lights & dimclk)
// The logic sits after the state machine and leaves it untouched, as the lab
// asks; the equation itself is this design's reduction of the truth table.
// There is no clock: the outputs follow DIMCLK combinationally.
module running_lights
  import taillight_pkg::*;
(
  input  lamps_t fsm_lamps,
  input  logic   lights,
  input  logic   dimclk,
  output lamps_t led
);

  logic dim;

  always_comb begin
    dim       = lights & dimclk;
    led.left  = fsm_lamps.left  | {3{dim}};
    led.right = fsm_lamps.right | {3{dim}};
  end

endmodule
