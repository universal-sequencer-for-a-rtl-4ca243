// stepper_pkg: types and constants shared by the four-phase unipolar
// stepper-motor pulse sequencer.
//
// The sequencer keeps its position in a 3-bit natural-binary counter
// (Q2 Q1 Q0, stable states S0..S7) and decodes it into the four phase
// commands A, B, C, D according to one of three drive modes:
//   wave drive   (SS): one phase at a time      A, B, C, D
//   normal drive (SD): two adjacent phases      AB, BC, CD, DA
//   half-step    (SM): alternating one and two  A, AB, B, BC, C, CD, D, DA
// The mode is given as three separate select lines {SM, SD, SS}, one of them
// high, as in the published state-assignment table. The sense input S selects
// clockwise (1, counting up) or anticlockwise (0, counting down) rotation.
package stepper_pkg;

  // Number of T flip-flops in the state counter (eight stable states).
  localparam int unsigned STATE_BITS = 3;

  typedef logic [STATE_BITS-1:0] state_t;

  // Drive-mode select lines; exactly one should be high.
  typedef struct packed {
    logic sm;   // half-step drive
    logic sd;   // normal (two-phase-on) drive
    logic ss;   // wave (one-phase-on) drive
  } mode_t;

  // Phase drive commands, 1 = phase energised.
  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
  } phases_t;

  localparam mode_t MODE_WAVE   = '{sm: 1'b0, sd: 1'b0, ss: 1'b1};
  localparam mode_t MODE_NORMAL = '{sm: 1'b0, sd: 1'b1, ss: 1'b0};
  localparam mode_t MODE_HALF   = '{sm: 1'b1, sd: 1'b0, ss: 1'b0};

  // Rotation sense.
  localparam logic SENSE_CW  = 1'b1;
  localparam logic SENSE_CCW = 1'b0;

endpackage
