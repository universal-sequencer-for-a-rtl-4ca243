// tb_pulse_sequencer: end-to-end test of the pulse sequencer at its default
// parameters.
//
// The reference model knows nothing of the T equations or decoder: it keeps a
// step position k (mod 8) that goes up for a clockwise pulse and down for an
// anticlockwise one, and looks up the expected phases in the drive orders
// (wave A,B,C,D; normal AB,BC,CD,DA; half-step A,AB,B,BC,C,CD,D,DA). Directed
// runs compare whole anticlockwise sequences against the orders written out
// literally. Every pulse checks the step latency: the state must be unchanged
// SYNC_STAGES edges after the pulse is first sampled and moved one edge
// later. Mechanisms counted, each of which must occur at least once: steps in
// each mode and sense, a direction reversal, a mode switch between pulses, a
// reset in mid-run, and a long pulse that must give a single step.
module tb_pulse_sequencer;
  import stepper_pkg::*;
  localparam int unsigned LAT = 2 + 1;   // default SYNC_STAGES + edge detect

  logic    clk = 1'b0, rst_n = 1'b0, step_pulse = 1'b0, sense = SENSE_CW;
  mode_t   mode = MODE_WAVE;
  phases_t phases;
  state_t  state;
  int      checks = 0, failures = 0;
  int      k = 0;                        // reference step position
  logic    last_sense = SENSE_CW;
  mode_t   last_mode = MODE_WAVE;
  // Mechanism counters: [mode 0 wave, 1 normal, 2 half][sense].
  int      steps [3][2];
  int      reversals = 0, mode_switches = 0, resets = 0, long_pulses = 0;

  localparam logic [3:0] WAVE_ORD   [4] = '{4'b1000, 4'b0100, 4'b0010, 4'b0001};
  localparam logic [3:0] NORMAL_ORD [4] = '{4'b1100, 4'b0110, 4'b0011, 4'b1001};
  localparam logic [3:0] HALF_ORD   [8] = '{4'b1000, 4'b1100, 4'b0100, 4'b0110,
                                            4'b0010, 4'b0011, 4'b0001, 4'b1001};

  pulse_sequencer dut (
    .clk(clk), .rst_n(rst_n), .step_pulse(step_pulse), .sense(sense),
    .mode(mode), .phases(phases), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mode_idx(mode_t m);
    return m.sm ? 2 : (m.sd ? 1 : 0);
  endfunction

  function automatic logic [3:0] expected_phases(mode_t m, int pos);
    case (mode_idx(m))
      0:       return WAVE_ORD[pos % 4];
      1:       return NORMAL_ORD[pos % 4];
      default: return HALF_ORD[pos % 8];
    endcase
  endfunction

  task automatic check_phases(string what);
    logic [3:0] e;
    e = expected_phases(mode, k);
    checks++;
    if (phases !== e) begin
      failures++;
      $display("FAIL %s: mode=%03b k=%0d ABCD=%04b expected %04b", what, mode, k, phases, e);
    end
  endtask

  // Let a change of sense/mode settle through the synchroniser.
  task automatic settle();
    repeat (LAT + 1) @(negedge clk);
  endtask

  // One command pulse, high for `width` clocks, with latency checks.
  task automatic pulse(int width = 2);
    state_t prev;
    prev = state;
    if (sense != last_sense) reversals++;
    last_sense = sense;
    step_pulse = 1'b1;
    repeat (LAT - 1) @(posedge clk);
    #1 checks++;
    if (state !== prev) begin
      failures++;
      $display("FAIL latency: state moved early");
    end
    @(posedge clk);
    #1 checks++;
    if (state !== (sense ? prev + 3'd1 : prev - 3'd1)) begin
      failures++;
      $display("FAIL step: state %03b -> %03b sense=%0b", prev, state, sense);
    end
    k = sense ? (k + 1) % 8 : (k + 7) % 8;
    steps[mode_idx(mode)][sense]++;
    repeat (width > LAT ? width - LAT : 0) @(posedge clk);
    @(negedge clk) step_pulse = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (state !== (sense ? prev + 3'd1 : prev - 3'd1)) begin
      failures++;
      $display("FAIL: extra step for one pulse");
    end
    check_phases("after pulse");
  endtask

  task automatic set_mode(mode_t m);
    if (m != last_mode) mode_switches++;
    last_mode = m;
    mode = m;
    settle();
    check_phases("after mode change");
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 1'b0;
    #1 resets++;
    k = 0;
    checks++;
    if (state !== 3'b000) begin
      failures++;
      $display("FAIL reset: state=%03b", state);
    end
    @(negedge clk) rst_n = 1'b1;
    settle();
    check_phases("after reset");
  endtask

  // Run a directed sequence from reset and compare with a literal order.
  task automatic directed(mode_t m, logic s, logic [3:0] ord [], string name);
    mode = m; last_mode = m;
    sense = s;
    do_reset();
    for (int i = 0; i < ord.size(); i++) begin
      checks++;
      if (phases !== ord[i]) begin
        failures++;
        $display("FAIL %s step %0d: ABCD=%04b expected %04b", name, i, phases, ord[i]);
      end
      pulse();
    end
  endtask

  initial begin
    logic [3:0] ord [];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    settle();

    // Orders as listed for each mode; anticlockwise from state S0.
    ord = '{4'b1000, 4'b0100, 4'b0010, 4'b0001, 4'b1000, 4'b0100};        // A B C D A B
    directed(MODE_WAVE, SENSE_CW, ord, "wave cw");
    ord = '{4'b1000, 4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b0001};        // A D C B A D
    directed(MODE_WAVE, SENSE_CCW, ord, "wave ccw");
    ord = '{4'b1100, 4'b0110, 4'b0011, 4'b1001, 4'b1100};                 // AB BC CD DA AB
    directed(MODE_NORMAL, SENSE_CW, ord, "normal cw");
    ord = '{4'b1100, 4'b1001, 4'b0011, 4'b0110, 4'b1100, 4'b1001};        // AB AD CD BC AB AD
    directed(MODE_NORMAL, SENSE_CCW, ord, "normal ccw");
    ord = '{4'b1000, 4'b1100, 4'b0100, 4'b0110, 4'b0010, 4'b0011,
            4'b0001, 4'b1001, 4'b1000};                                   // A AB B BC C CD D AD A
    directed(MODE_HALF, SENSE_CW, ord, "half cw");
    ord = '{4'b1000, 4'b1001, 4'b0001, 4'b0011, 4'b0010, 4'b0110,
            4'b0100, 4'b1100, 4'b1000};                                   // A AD D CD C BC B AB A
    directed(MODE_HALF, SENSE_CCW, ord, "half ccw");

    // Random operation: pulses, reversals, mode switches, long pulses, resets.
    for (int i = 0; i < 600; i++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 15) begin
        sense = ~sense;
        settle();
      end else if (r < 25) begin
        set_mode(mode_t'(3'b001 << $urandom_range(0, 2)));
      end else if (r < 27) begin
        do_reset();
      end
      if ($urandom_range(0, 9) == 0) begin
        long_pulses++;
        pulse($urandom_range(6, 20));
      end else begin
        pulse($urandom_range(2, 4));
      end
    end

    // Every mechanism must have happened.
    for (int m = 0; m < 3; m++)
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (steps[m][s] == 0) begin
          failures++;
          $display("FAIL: no steps in mode %0d sense %0d", m, s);
        end
      end
    checks++; if (reversals == 0)     begin failures++; $display("FAIL: no reversal"); end
    checks++; if (mode_switches == 0) begin failures++; $display("FAIL: no mode switch"); end
    checks++; if (resets == 0)        begin failures++; $display("FAIL: no reset"); end
    checks++; if (long_pulses == 0)   begin failures++; $display("FAIL: no long pulse"); end
    $display("steps wave %0d/%0d normal %0d/%0d half %0d/%0d (ccw/cw), reversals %0d, mode switches %0d, resets %0d, long pulses %0d",
             steps[0][0], steps[0][1], steps[1][0], steps[1][1], steps[2][0], steps[2][1],
             reversals, mode_switches, resets, long_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
