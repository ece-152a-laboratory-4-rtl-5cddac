// taillight_fsm_tb: self-checking testbench of the tail-light state machine.
//
// Part 1 runs directed scenarios whose expected light patterns are written
// out literally: the left and right turn sequences (period 4 clocks), an
// aborted turn, brake alone, brake with a turn (sequence continues across the
// press), hazard flashing (period 2), both turns -> hazard, brake over hazard,
// brake + hazard + one turn, and the asynchronous reset. It also checks the
// Moore timing: an input change shows no effect until the next clock edge.
// Part 2 drives random switch combinations and compares every clock with the
// reference model in taillight_model_pkg.
module taillight_fsm_tb;
  import taillight_pkg::*;
  import taillight_model_pkg::*;

  logic   clk = 0;
  logic   rst = 1;
  ctrl_t  ctrl = '0;
  lamps_t lamps;

  int checks = 0, failures = 0;

  taillight_fsm dut (.clk(clk), .rst(rst), .ctrl(ctrl), .lamps(lamps));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_lamps(input logic [2:0] l, input logic [2:0] r, input string what);
    checks++;
    if (lamps.left !== l || lamps.right !== r) begin
      failures++;
      $display("FAIL %s: got L=%b R=%b expected L=%b R=%b at %0t", what, lamps.left, lamps.right, l, r, $time);
    end
  endtask

  // Set the switches between clock edges, then take one edge.
  task automatic tick(input bit l, input bit r, input bit b, input bit h);
    ctrl = '{left: l, right: r, brake: b, hazard: h};
    @(posedge clk);
    #1;
  endtask

  tail_model model;

  initial begin
    logic [5:0] exp;
    model = new();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_lamps(3'b000, 3'b000, "after reset");

    // Left turn: dark -> 001 -> 011 -> 111 -> dark -> 001
    tick(1,0,0,0); expect_lamps(3'b001, 3'b000, "left 1");
    // Moore timing: changing the input between edges changes nothing
    ctrl = '{left: 0, right: 1, brake: 1, hazard: 1}; #2;
    expect_lamps(3'b001, 3'b000, "no change before edge");
    tick(1,0,0,0); expect_lamps(3'b011, 3'b000, "left 2");
    tick(1,0,0,0); expect_lamps(3'b111, 3'b000, "left 3");
    tick(1,0,0,0); expect_lamps(3'b000, 3'b000, "left 0");
    tick(1,0,0,0); expect_lamps(3'b001, 3'b000, "left 1 again");
    tick(1,0,0,0); expect_lamps(3'b011, 3'b000, "left 2 again");
    // abort
    tick(0,0,0,0); expect_lamps(3'b000, 3'b000, "left aborted");

    // Right turn
    tick(0,1,0,0); expect_lamps(3'b000, 3'b001, "right 1");
    tick(0,1,0,0); expect_lamps(3'b000, 3'b011, "right 2");
    tick(0,1,0,0); expect_lamps(3'b000, 3'b111, "right 3");
    tick(0,1,0,0); expect_lamps(3'b000, 3'b000, "right 0");
    tick(0,0,0,0); expect_lamps(3'b000, 3'b000, "right off");

    // Brake alone
    tick(0,0,1,0); expect_lamps(3'b111, 3'b111, "brake");
    tick(0,0,1,0); expect_lamps(3'b111, 3'b111, "brake held");
    tick(0,0,0,0); expect_lamps(3'b000, 3'b000, "brake released");

    // Left turn, then brake pressed mid-sequence: left continues, right all on
    tick(1,0,0,0); expect_lamps(3'b001, 3'b000, "left 1 before brake");
    tick(1,0,1,0); expect_lamps(3'b011, 3'b111, "left 2 with brake");
    tick(1,0,1,0); expect_lamps(3'b111, 3'b111, "left 3 with brake");
    tick(1,0,1,0); expect_lamps(3'b000, 3'b111, "left 0 with brake");
    tick(1,0,1,0); expect_lamps(3'b001, 3'b111, "left 1 with brake");
    tick(1,0,0,0); expect_lamps(3'b011, 3'b000, "left 2 brake released");
    // Right turn with brake
    tick(0,1,1,0); expect_lamps(3'b111, 3'b001, "right 1 with brake");
    tick(0,1,1,0); expect_lamps(3'b111, 3'b011, "right 2 with brake");
    tick(0,1,1,0); expect_lamps(3'b111, 3'b111, "right 3 with brake");
    tick(0,1,1,0); expect_lamps(3'b111, 3'b000, "right 0 with brake");
    tick(0,0,0,0); expect_lamps(3'b000, 3'b000, "all off");

    // Hazard: on/off alternating, overrides a turn signal
    tick(0,0,0,1); expect_lamps(3'b111, 3'b111, "hazard on");
    tick(0,0,0,1); expect_lamps(3'b000, 3'b000, "hazard off");
    tick(1,0,0,1); expect_lamps(3'b111, 3'b111, "hazard + left on");
    tick(0,1,0,1); expect_lamps(3'b000, 3'b000, "hazard + right off");
    tick(0,0,0,0); expect_lamps(3'b000, 3'b000, "hazard released");
    // Both turn signals act as hazard
    tick(1,1,0,0); expect_lamps(3'b111, 3'b111, "both turns on");
    tick(1,1,0,0); expect_lamps(3'b000, 3'b000, "both turns off");
    tick(1,1,0,0); expect_lamps(3'b111, 3'b111, "both turns on again");
    // Brake overrides hazard and both-turns hazard
    tick(0,0,1,1); expect_lamps(3'b111, 3'b111, "brake over hazard");
    tick(0,0,1,1); expect_lamps(3'b111, 3'b111, "brake over hazard held");
    tick(1,1,1,0); expect_lamps(3'b111, 3'b111, "brake over both turns");
    tick(1,1,1,0); expect_lamps(3'b111, 3'b111, "brake over both turns held");
    // Brake + hazard + single turn: the turn is honoured
    tick(1,0,1,1); expect_lamps(3'b001, 3'b111, "brake+hazard+left 1");
    tick(1,0,1,1); expect_lamps(3'b011, 3'b111, "brake+hazard+left 2");
    // Brake released, hazard still on: flash starts with on
    tick(1,0,0,1); expect_lamps(3'b111, 3'b111, "hazard after brake");
    tick(1,0,0,1); expect_lamps(3'b000, 3'b000, "hazard after brake off");

    // Asynchronous reset in the middle of a sequence, between clock edges
    tick(0,1,0,0); tick(0,1,0,0);
    expect_lamps(3'b000, 3'b011, "right 2 before reset");
    #2 rst = 1; #1;
    expect_lamps(3'b000, 3'b000, "async reset");
    @(posedge clk); #1;
    expect_lamps(3'b000, 3'b000, "reset held over edge");
    rst = 0;
    tick(0,1,0,0); expect_lamps(3'b000, 3'b001, "right 1 after reset");
    tick(0,0,0,0);

    // Random comparison with the reference model
    model.reset();
    void'(model.step(0,0,0,0));
    repeat (4000) begin
      bit l, r, b, h;
      int unsigned hold;
      l = ($urandom % 3) != 0;
      r = ($urandom % 3) == 0;
      if (($urandom % 2) != 0) {l, r} = {r, l};
      b = ($urandom % 4) == 0;
      h = ($urandom % 5) == 0;
      hold = 1 + $urandom % 6;
      repeat (hold) begin
        tick(l, r, b, h);
        exp = model.step(l, r, b, h);
        expect_lamps(exp[5:3], exp[2:0], "random vs model");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
