// pulse_sequencer: universal reversible pulse sequencer for a four-phase
// unipolar stepper motor (top level).
//
// Each command pulse moves the motor one step. The position is kept in a
// 3-bit natural-binary counter of three T flip-flops (Q2 Q1 Q0). The
// excitation logic makes it count up for clockwise rotation (S = 1) and down
// for anticlockwise rotation (S = 0); the state decoder turns the count into
// the phase commands A, B, C, D of the selected drive mode:
//   wave (SS)       CW: A, B, C, D, ...             CCW: A, D, C, B, ...
//   normal (SD)     CW: AB, BC, CD, DA, ...         CCW: AB, DA, CD, BC, ...
//   half-step (SM)  CW: A, AB, B, BC, C, CD, D, DA  CCW: the reverse
// Using a counter rather than a ring shift register means a stray pulse can
// only move the position by one step: it cannot corrupt the pattern into one
// with the wrong number of phases on. Counter, T equations and decoding
// follow the published design; running from a system clock with a
// synchronised step enable, and the asynchronous reset to state S0, are this
// design's own choices.
//
// Ports: clk, rst_n (async, active low), step_pulse (raw pulse train),
// sense (S), mode {SM, SD, SS} -> phases {A, B, C, D}, state (Q2 Q1 Q0).
// Timing: the state advances on the clock edge SYNC_STAGES+1 cycles after the
// pulse's rising edge is first sampled; phases follow state combinationally.
// A mode change shows on the phases after SYNC_STAGES cycles without moving
// the counter.
module pulse_sequencer
  import stepper_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step_pulse,
  input  logic    sense,
  input  mode_t   mode,
  output phases_t phases,
  output state_t  state
);

  logic   step_en;
  logic   sense_s;
  mode_t  mode_s;
  state_t t;

  command_input #(.SYNC_STAGES(SYNC_STAGES)) u_cmd (
    .clk        (clk),
    .rst_n      (rst_n),
    .step_pulse (step_pulse),
    .sense_in   (sense),
    .mode_in    (mode),
    .step_en    (step_en),
    .sense      (sense_s),
    .mode       (mode_s)
  );

  excitation_logic u_exc (
    .sense (sense_s),
    .q     (state),
    .t     (t)
  );

  for (genvar i = 0; i < STATE_BITS; i++) begin : g_ff
    t_flip_flop u_tff (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (step_en),
      .t     (t[i]),
      .q     (state[i])
    );
  end

  state_decoder u_dec (
    .mode   (mode_s),
    .q      (state),
    .phases (phases)
  );

  // Each step moves the counter by exactly one position in the commanded
  // direction, and the counter never moves without a step.
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
    step_en |=> state == ($past(sense_s) ? $past(state) + 3'd1 : $past(state) - 3'd1))
    else $error("sequencer moved by other than one step");
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    !step_en |=> $stable(state))
    else $error("sequencer moved without a step");

endmodule
