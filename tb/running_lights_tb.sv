// running_lights_tb: exhaustive check of the running-lights logic.
//
// Applies all 64 state-machine light patterns with every combination of
// LIGHTS and DIMCLK and checks each of the six LED outputs against the rule:
// a light the state machine turns on stays on; a dark light copies DIMCLK
// while LIGHTS is asserted and stays dark otherwise.
module running_lights_tb;
  import taillight_pkg::*;

  lamps_t fsm_lamps;
  logic   lights, dimclk;
  lamps_t led;
  int checks = 0, failures = 0;

  running_lights dut (.fsm_lamps(fsm_lamps), .lights(lights), .dimclk(dimclk), .led(led));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] pat, got;
    logic       want;
    for (int p = 0; p < 64; p++) begin
      for (int m = 0; m < 4; m++) begin
        pat = 6'(p);
        fsm_lamps = pat;
        lights = m[1];
        dimclk = m[0];
        #1;
        got = {led.left, led.right};
        for (int i = 0; i < 6; i++) begin
          if (pat[i])      want = 1'b1;
          else if (lights) want = dimclk;
          else             want = 1'b0;
          checks++;
          if (got[i] !== want) begin
            failures++;
            $display("FAIL lamps=%b lights=%b dimclk=%b bit %0d: got %b want %b",
                     pat, lights, dimclk, i, got[i], want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
