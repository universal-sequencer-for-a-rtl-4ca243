// tb_command_input: checks the command synchroniser and step-edge detector.
// Applies pulses of random high and low widths (at least two clocks each) and
// checks that exactly one step_en appears per rising edge, SYNC_STAGES+1
// clock edges after the edge is first sampled, and that sense and mode come
// out delayed by SYNC_STAGES clocks.
module tb_command_input;
  import stepper_pkg::*;
  localparam int unsigned STAGES = 2;
  logic  clk = 1'b0, rst_n = 1'b0, step_pulse = 1'b0, sense_in = 1'b0;
  mode_t mode_in = MODE_WAVE;
  logic  step_en, sense;
  mode_t mode;
  int    checks = 0, failures = 0;
  int    cycle = 0, edges = 0, enables = 0;
  // Input history, one entry per clock edge, sampled at the edge.
  logic  hist_pulse [$];
  logic  hist_sense [$];
  mode_t hist_mode  [$];

  command_input #(.SYNC_STAGES(STAGES)) dut (
    .clk(clk), .rst_n(rst_n), .step_pulse(step_pulse), .sense_in(sense_in),
    .mode_in(mode_in), .step_en(step_en), .sense(sense), .mode(mode));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: the history holds STAGES zero entries for the reset state,
  // then the inputs sampled at each clock edge. After an edge, the outputs
  // show the entry STAGES back from the newest, and step_en is high when that
  // entry's pulse is 1 and the one before it is 0.
  always @(posedge clk) if (rst_n) begin
    hist_pulse.push_back(step_pulse);
    hist_sense.push_back(sense_in);
    hist_mode.push_back(mode_in);
    #1;
    cycle++;
    if (hist_pulse.size() > STAGES) begin
      int k;
      logic exp_en;
      k = hist_pulse.size() - STAGES;   // index of the input now at the output
      exp_en = hist_pulse[k] & ~hist_pulse[k-1];
      checks++;
      if (step_en !== exp_en || sense !== hist_sense[k] || mode !== hist_mode[k]) begin
        failures++;
        $display("FAIL cycle %0d: en=%0b/%0b sense=%0b/%0b mode=%03b/%03b", cycle,
                 step_en, exp_en, sense, hist_sense[k], mode, hist_mode[k]);
      end
    end
    if (step_en) enables++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Entries standing for the synchroniser's reset contents.
    for (int i = 0; i < STAGES; i++) begin
      hist_pulse.push_back(1'b0);
      hist_sense.push_back(1'b0);
      hist_mode.push_back('0);
    end
    for (int i = 0; i < 200; i++) begin
      repeat ($urandom_range(2, 6)) @(negedge clk);
      step_pulse = 1'b1;
      edges++;
      sense_in = $urandom_range(0, 1) == 1;
      mode_in  = mode_t'(3'b001 << $urandom_range(0, 2));
      repeat ($urandom_range(2, 6)) @(negedge clk);
      step_pulse = 1'b0;
    end
    repeat (STAGES + 3) @(negedge clk);
    checks++;
    if (enables != edges) begin
      failures++;
      $display("FAIL: %0d step enables for %0d pulses", enables, edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
