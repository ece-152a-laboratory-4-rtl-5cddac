// taillight_fsm: Moore state machine of a 1965 Ford Thunderbird tail-light
// controller (turn signals, brake lights and hazard flasher).
//
// Behaviour, per clock edge, with the inputs sampled at that edge:
//   * one turn signal on: that side runs the sequence dark -> inner ->
//     inner two -> all three -> dark ..., one step per clock (period 4);
//     the other side is dark. Releasing the switch aborts the sequence and
//     the lights go dark on the next edge.
//   * brake on: all six lights on, except that with exactly one turn signal
//     the turning side keeps sequencing (without restarting) while the other
//     side shows brake (all on). Brake overrides hazard.
//   * hazard on, or both turn signals on: all six lights flash together,
//     on for one clock and off for one clock, starting with on.
//   * nothing on: all dark.
// Priority therefore is brake (plus a single turn) > hazard / both turns >
// single turn > idle. The turn step is carried across a brake press or
// release, so the sequence continues where it was.
//
// Interface: clk, rst (asynchronous, active high, forces the all-dark idle
// state), ctrl (left/right/brake/hazard) and lamps (left/right 3-bit groups,
// bit 0 innermost). Being a Moore machine, lamps depends on the state only
// and follows an input change one clock edge later.
//
// The functions and their priorities follow the lab description. The state
// set (17 states, dark turn step merged with idle and with the dark hazard
// half), the flash starting with "on", the light order within a side and the
// asynchronous reset are this design's choices; the lab allows either reset.
module taillight_fsm
  import taillight_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  ctrl_t  ctrl,
  output lamps_t lamps
);

  state_t state, state_next;

  logic [1:0] left_step, right_step;   // current turn step of each side (0 if not turning)
  logic [1:0] left_next, right_next;   // step the side moves to if it keeps turning

  always_comb begin
    unique case (state)
      S_L1, S_LB1: left_step = 2'd1;
      S_L2, S_LB2: left_step = 2'd2;
      S_L3, S_LB3: left_step = 2'd3;
      default:     left_step = 2'd0;
    endcase
    unique case (state)
      S_R1, S_RB1: right_step = 2'd1;
      S_R2, S_RB2: right_step = 2'd2;
      S_R3, S_RB3: right_step = 2'd3;
      default:     right_step = 2'd0;
    endcase
    left_next  = left_step + 2'd1;
    right_next = right_step + 2'd1;
  end

  // Next-state logic in priority order.
  always_comb begin
    if (ctrl.brake && (ctrl.left ^ ctrl.right)) begin
      if (ctrl.left) begin
        unique case (left_next)
          2'd0: state_next = S_LB0;
          2'd1: state_next = S_LB1;
          2'd2: state_next = S_LB2;
          default: state_next = S_LB3;
        endcase
      end else begin
        unique case (right_next)
          2'd0: state_next = S_RB0;
          2'd1: state_next = S_RB1;
          2'd2: state_next = S_RB2;
          default: state_next = S_RB3;
        endcase
      end
    end else if (ctrl.brake) begin
      state_next = S_BRAKE;
    end else if (ctrl.hazard || (ctrl.left && ctrl.right)) begin
      state_next = (state == S_HAZ_ON) ? S_IDLE : S_HAZ_ON;
    end else if (ctrl.left) begin
      unique case (left_next)
        2'd0: state_next = S_IDLE;
        2'd1: state_next = S_L1;
        2'd2: state_next = S_L2;
        default: state_next = S_L3;
      endcase
    end else if (ctrl.right) begin
      unique case (right_next)
        2'd0: state_next = S_IDLE;
        2'd1: state_next = S_R1;
        2'd2: state_next = S_R2;
        default: state_next = S_R3;
      endcase
    end else begin
      state_next = S_IDLE;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= S_IDLE;
    else     state <= state_next;
  end

  // Moore output decode: the lights are a function of the state alone.
  always_comb begin
    unique case (state)
      S_L1, S_L2, S_L3:        lamps = '{left: turn_pattern(left_step),  right: SIDE_OFF};
      S_R1, S_R2, S_R3:        lamps = '{left: SIDE_OFF, right: turn_pattern(right_step)};
      S_HAZ_ON, S_BRAKE:       lamps = '{left: SIDE_ON,  right: SIDE_ON};
      S_LB0, S_LB1, S_LB2, S_LB3:
                               lamps = '{left: turn_pattern(left_step),  right: SIDE_ON};
      S_RB0, S_RB1, S_RB2, S_RB3:
                               lamps = '{left: SIDE_ON,  right: turn_pattern(right_step)};
      default:                 lamps = '{left: SIDE_OFF, right: SIDE_OFF};
    endcase
  end

  // Only one side can be in the middle of a turn sequence at a time (this
  // holds in reset too, where all lights are dark).
  a_one_turn_side: assert property (@(posedge clk)
    !((lamps.left  inside {3'b001, 3'b011}) && (lamps.right inside {3'b001, 3'b011})));

endmodule
