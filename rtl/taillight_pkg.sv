// taillight_pkg: types shared by the tail-light controller.
//
// ctrl_t bundles the four switch inputs the core state machine reacts to
// (LEFT, RIGHT, BRAKE, HAZARD). lamps_t holds one 3-bit group per side of the
// car; in both groups bit 0 is the light nearest the middle of the car and
// bit 2 the outermost one, so a turn sequence always fills a group from bit 0
// upward (001, 011, 111). That bit order is this design's choice.
// state_t names the states of the Moore machine; the encoding is left to the
// synthesis tool.
package taillight_pkg;

  typedef struct packed {
    logic left;
    logic right;
    logic brake;
    logic hazard;
  } ctrl_t;

  typedef struct packed {
    logic [2:0] left;
    logic [2:0] right;
  } lamps_t;

  localparam logic [2:0] SIDE_OFF = 3'b000;
  localparam logic [2:0] SIDE_ON  = 3'b111;

  // Lights of one side at step 0..3 of the turn sequence: dark, then the
  // inner light, then inner two, then all three.
  function automatic logic [2:0] turn_pattern(input logic [1:0] step);
    case (step)
      2'd0:    return 3'b000;
      2'd1:    return 3'b001;
      2'd2:    return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  typedef enum logic [4:0] {
    S_IDLE,     // all dark; also the dark half of the hazard flash and step 0 of a turn
    S_L1, S_L2, S_L3,                // left turn, right side dark
    S_R1, S_R2, S_R3,                // right turn, left side dark
    S_HAZ_ON,                        // hazard flash, all six on
    S_BRAKE,                         // brake, all six on
    S_LB0, S_LB1, S_LB2, S_LB3,      // left turn with brake: right side all on
    S_RB0, S_RB1, S_RB2, S_RB3       // right turn with brake: left side all on
  } state_t;

endpackage
