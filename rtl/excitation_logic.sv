// excitation_logic: next-state (T input) logic of the reversible sequencer.
//
// The three T flip-flops form a natural-binary counter that counts up for
// clockwise rotation (S = 1) and down for anticlockwise rotation (S = 0).
// The same equations serve all three drive modes, read from the excitation
// table:
//   T0 = 1                      (the LSB toggles on every step)
//   T1 = NOT (S xor Q0)         (up: toggle when Q0 = 1; down: when Q0 = 0)
//   T2 = S'.Q1'.Q0' + S.Q1.Q0   (toggle when the lower bits wrap)
// Purely combinational. Q2 is an input of the excitation table but none of
// the minimised equations depends on it, so q[2] is deliberately unused (the
// port keeps the whole state so the block matches the table).
//
// Ports: sense (S), q (Q2 Q1 Q0) -> t (T2 T1 T0).
module excitation_logic
  import stepper_pkg::*;
(
  input  logic   sense,
  input  state_t q,
  output state_t t
);

  always_comb begin
    t[0] = 1'b1;
    t[1] = ~(sense ^ q[0]);
    t[2] = (~sense & ~q[1] & ~q[0]) | (sense & q[1] & q[0]);
  end

endmodule
