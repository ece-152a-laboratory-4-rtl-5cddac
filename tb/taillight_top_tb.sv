// taillight_top_tb: end-to-end test of the tail-light controller.
//
// The testbench plays the parts of the host console and the function
// generator. The console toggles one function per key press (L, R, B, H and
// O for left, right, brake, hazard and running lights), holds RESET briefly
// at start-up and clocks the machine slowly; the generator drives DIMCLK 40
// times faster than CLK (about 100 Hz against 2.5 Hz). Time is in
// milliseconds of the real set-up: CLK period 400, DIMCLK period 10.
//
// Between two CLK edges every LED is sampled every time unit (except where
// DIMCLK toggles) and checked
// against the reference model: a light the model turns on must stay on, a
// dark light must follow DIMCLK while running lights are on and stay dark
// otherwise; the dimmed duty cycle must be 50%. Outputs may change only at a
// CLK rising edge (Moore timing) apart from the DIMCLK gating. A directed
// key sequence is followed by random key presses, and each mechanism of the
// design (turn sequences, abort, brake, brake with a turn, hazard flash, both
// turns as hazard, brake over hazard, running lights, reset) is counted; one
// that never happened counts as a failure.
module taillight_top_tb;
  import taillight_model_pkg::*;

  localparam int CLK_HALF = 200;
  localparam int DIM_HALF = 5;

  logic clk, reset, left, right, brake, hazard, lights, dimclk;
  logic [2:0] led_left, led_right;

  int checks = 0, failures = 0;

  taillight_top dut (
    .clk(clk), .reset(reset), .left(left), .right(right), .brake(brake),
    .hazard(hazard), .lights(lights), .dimclk(dimclk),
    .led_left(led_left), .led_right(led_right)
  );

  // Function generator
  initial begin
    dimclk = 1'b0;
    forever #DIM_HALF dimclk = ~dimclk;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tail_model  model;
  logic [5:0] expected;

  // Mechanism counters
  int n_left_seq, n_right_seq, n_abort, n_brake, n_brake_left, n_brake_right;
  int n_hazard_flash, n_both_hazard, n_brake_over_hazard, n_dim, n_reset;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Console key press: toggles one function.
  task automatic key(input byte k);
    case (k)
      "L": left   = ~left;
      "R": right  = ~right;
      "B": brake  = ~brake;
      "H": hazard = ~hazard;
      "O": lights = ~lights;
      default: ;
    endcase
  endtask

  // One CLK period: the rising edge, then the high and low halves, with the
  // LEDs checked every time unit. The switches are set during the low half
  // before this task is called.
  task automatic clock_cycle();
    logic [5:0] now;
    bit l = left, r = right, b = brake, h = hazard;
    int dim_hi = 0, dim_n = 0;
    // mechanism bookkeeping on the inputs seen at this edge
    if (!b && l && !r && !h && model.lstep == 3) n_left_seq++;
    if (!b && r && !l && !h && model.rstep == 3) n_right_seq++;
    if (!l && model.lstep inside {1, 2} && !b && !h && !r) n_abort++;
    if (!r && model.rstep inside {1, 2} && !b && !h && !l) n_abort++;
    if (b && !l && !r && !h) n_brake++;
    if (b && l && !r) n_brake_left++;
    if (b && r && !l) n_brake_right++;
    if (!b && (h || (l && r)) && model.flash_on) n_hazard_flash++;
    if (!b && !h && l && r) n_both_hazard++;
    if (b && (h || (l && r)) && (l == r)) n_brake_over_hazard++;
    expected = model.step(l, r, b, h);
    clk = 1'b1;
    for (int t = 0; t < 2 * CLK_HALF; t++) begin
      #1;
      if (t == CLK_HALF - 1) clk = 1'b0;
      // skip the instants at which DIMCLK itself toggles
      if ($time % 64'(DIM_HALF) == 0) continue;
      now = {led_left, led_right};
      for (int i = 0; i < 6; i++) begin
        if (expected[i]) check(now[i] == 1'b1, "light on");
        else if (lights) begin
          check(now[i] == dimclk, "dimmed light follows DIMCLK");
          dim_n++;
          if (now[i]) dim_hi++;
        end else check(now[i] == 1'b0, "light off");
      end
    end
    if (dim_n > 0) begin
      n_dim++;
      check(dim_hi * 2 == dim_n, "50% dimming duty cycle");
    end
  endtask

  task automatic do_reset();
    reset = 1'b1;
    #3;
    check({led_left, led_right} == (lights ? {6{dimclk}} : 6'b0), "reset clears lights");
    #(2 * CLK_HALF);
    reset = 1'b0;
    model.reset();
    expected = '0;
    n_reset++;
  endtask

  initial begin
    model = new();
    expected = '0;
    clk = 0; reset = 0;
    {left, right, brake, hazard, lights} = '0;
    #(CLK_HALF / 2);
    do_reset();

    // Directed session
    key("L"); repeat (6) clock_cycle();          // left sequence
    key("L"); repeat (2) clock_cycle();
    key("L"); repeat (2) clock_cycle(); key("L"); clock_cycle();  // abort mid-sequence
    key("R"); repeat (5) clock_cycle();
    key("B"); repeat (5) clock_cycle();          // right turn with brake
    key("R"); repeat (2) clock_cycle();          // brake alone
    key("H"); repeat (2) clock_cycle();          // brake over hazard
    key("B"); repeat (4) clock_cycle();          // hazard flash
    key("H"); key("L"); key("R"); repeat (4) clock_cycle();  // both turns -> hazard
    key("R"); key("B"); repeat (5) clock_cycle(); // left turn with brake
    key("O"); repeat (3) clock_cycle();          // running lights
    key("B"); repeat (4) clock_cycle();
    key("L"); repeat (2) clock_cycle();
    // Reset in mid-session with running lights on
    key("R"); repeat (2) clock_cycle();
    do_reset();
    repeat (3) clock_cycle();
    key("O"); key("R");

    // Random key presses, one or none per clock
    repeat (600) begin
      automatic int k = $urandom % 9;
      case (k)
        0: key("L");
        1: key("R");
        2: key("B");
        3: key("H");
        4: key("O");
        default: ;
      endcase
      clock_cycle();
    end

    $display("mechanisms: left_seq=%0d right_seq=%0d abort=%0d brake=%0d brake_left=%0d brake_right=%0d hazard_flash=%0d both_turns_hazard=%0d brake_over_hazard=%0d running_lights=%0d reset=%0d",
             n_left_seq, n_right_seq, n_abort, n_brake, n_brake_left, n_brake_right,
             n_hazard_flash, n_both_hazard, n_brake_over_hazard, n_dim, n_reset);
    check(n_left_seq > 0, "left sequence seen");
    check(n_right_seq > 0, "right sequence seen");
    check(n_abort > 0, "turn abort seen");
    check(n_brake > 0, "brake seen");
    check(n_brake_left > 0, "brake with left turn seen");
    check(n_brake_right > 0, "brake with right turn seen");
    check(n_hazard_flash > 0, "hazard flash seen");
    check(n_both_hazard > 0, "both turns as hazard seen");
    check(n_brake_over_hazard > 0, "brake over hazard seen");
    check(n_dim > 0, "running lights seen");
    check(n_reset > 1, "reset seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
