// state_decoder: output logic that turns the counter state into phase commands.
//
// Sum-of-products equations for each phase, one term per drive mode:
//   A = SS.Q1'.Q0' + SD.NOT(Q1 xor Q0) + SM.(Q2'.Q1' + Q2.Q1.Q0)
//   B = SS.Q1'.Q0  + SD.Q1'            + SM.Q2'.(Q1 + Q0)
//   C = SS.Q1.Q0'  + SD.(Q1 xor Q0)    + SM.(Q2'.Q1.Q0 + Q2.Q1')
//   D = SS.Q1.Q0   + SD.Q1             + SM.Q2.(Q1 + Q0)
// Wave and normal drive use only Q1 Q0, so their four-state patterns repeat
// twice over the eight counter states; half-step drive uses all eight.
// These are the published state-decoding equations. For normal-drive phase A
// the state table is followed (A energised in AB and DA, states S0 and S3).
// With more than one mode line high the terms are simply ORed, and with none
// high every phase is off: the equations are not gated further.
// Purely combinational.
//
// Ports: mode {SM, SD, SS}, q (Q2 Q1 Q0) -> phases {A, B, C, D}.
module state_decoder
  import stepper_pkg::*;
(
  input  mode_t   mode,
  input  state_t  q,
  output phases_t phases
);

  always_comb begin
    phases.a = (mode.ss & ~q[1] & ~q[0])
             | (mode.sd & ~(q[1] ^ q[0]))
             | (mode.sm & ((~q[2] & ~q[1]) | (q[2] & q[1] & q[0])));
    phases.b = (mode.ss & ~q[1] & q[0])
             | (mode.sd & ~q[1])
             | (mode.sm & ~q[2] & (q[1] | q[0]));
    phases.c = (mode.ss & q[1] & ~q[0])
             | (mode.sd & (q[1] ^ q[0]))
             | (mode.sm & ((~q[2] & q[1] & q[0]) | (q[2] & ~q[1])));
    phases.d = (mode.ss & q[1] & q[0])
             | (mode.sd & q[1])
             | (mode.sm & q[2] & (q[1] | q[0]));
  end

endmodule
