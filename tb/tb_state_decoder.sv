// tb_state_decoder: exhaustive check of the state decoding.
// The expected phase patterns are written out per mode and state as in the
// state-decoding table (wave: A B C D A B C D; normal: AB BC CD DA twice;
// half-step: A AB B BC C CD D DA), independently of the decoder equations.
// Mode inputs that are not one-hot are checked to give the OR of the
// selected modes' patterns, and no mode gives all phases off.
module tb_state_decoder;
  import stepper_pkg::*;
  mode_t   mode;
  state_t  q;
  phases_t phases;
  int      checks = 0, failures = 0;

  // {A,B,C,D} per state S0..S7.
  localparam logic [3:0] WAVE_TBL   [8] = '{4'b1000, 4'b0100, 4'b0010, 4'b0001,
                                            4'b1000, 4'b0100, 4'b0010, 4'b0001};
  localparam logic [3:0] NORMAL_TBL [8] = '{4'b1100, 4'b0110, 4'b0011, 4'b1001,
                                            4'b1100, 4'b0110, 4'b0011, 4'b1001};
  localparam logic [3:0] HALF_TBL   [8] = '{4'b1000, 4'b1100, 4'b0100, 4'b0110,
                                            4'b0010, 4'b0011, 4'b0001, 4'b1001};

  state_decoder dut (.mode(mode), .q(q), .phases(phases));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++) begin
      for (int n = 0; n < 8; n++) begin
        logic [3:0] expected;
        mode = mode_t'(m);
        q    = state_t'(n);
        expected = 4'b0000;
        if (mode.ss) expected |= WAVE_TBL[n];
        if (mode.sd) expected |= NORMAL_TBL[n];
        if (mode.sm) expected |= HALF_TBL[n];
        #1;
        checks++;
        if (phases !== expected) begin
          failures++;
          $display("FAIL mode=%03b Q=%03b: ABCD=%04b expected %04b", m, n, phases, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
