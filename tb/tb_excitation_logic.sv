// tb_excitation_logic: exhaustive check of the T-input equations.
// For every sense and present state the expected T2 T1 T0 are worked out as
// (next state) xor (present state), where the next state is the present one
// plus one (clockwise) or minus one (anticlockwise), modulo 8 -- the
// excitation table of a T flip-flop (T = 1 exactly where the bit changes).
module tb_excitation_logic;
  import stepper_pkg::*;
  logic   sense;
  state_t q, t, next, expected;
  int     checks = 0, failures = 0;

  excitation_logic dut (.sense(sense), .q(q), .t(t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int n = 0; n < 8; n++) begin
        sense = s[0];
        q     = state_t'(n);
        next  = s[0] ? state_t'((n + 1) % 8) : state_t'((n + 7) % 8);
        expected = next ^ q;
        #1;
        checks++;
        if (t !== expected) begin
          failures++;
          $display("FAIL S=%0d Q=%03b: T=%03b expected %03b", s, q, t, expected);
        end
      end
    end
    // Spot rows of the excitation table written out explicitly.
    sense = 1'b0; q = 3'b000; #1; checks++;
    if (t !== 3'b111) begin failures++; $display("FAIL row 20"); end
    sense = 1'b1; q = 3'b011; #1; checks++;
    if (t !== 3'b111) begin failures++; $display("FAIL row 33"); end
    sense = 1'b1; q = 3'b010; #1; checks++;
    if (t !== 3'b001) begin failures++; $display("FAIL row 32"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
