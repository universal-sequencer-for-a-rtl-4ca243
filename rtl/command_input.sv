// command_input: takes over the command signals of the sequencer.
//
// The command pulse train, the rotation sense S and the mode lines
// {SM, SD, SS} arrive from outside (TTL/CMOS levels) with no relation to the
// system clock. Each is passed through a chain of SYNC_STAGES flip-flops;
// one more register on the pulse line detects its rising edge, which becomes
// a one-cycle step enable for the state counter. Sense and mode go through
// the same number of stages as the pulse, so the sense seen with a step
// enable is the one that was present when the pulse rose.
// What this block does follows the description of the drive (it accepts the
// command pulses, sense and sequence-type signals); synchroniser and edge
// detector are this design's own way of doing it with a single clock.
//
// Ports: clk, rst_n, step_pulse, sense_in, mode_in -> step_en, sense, mode.
// Timing: step_en is high for one cycle, SYNC_STAGES+1 clock edges after the
// pulse's rising edge is first sampled. The pulse must stay high and low for
// at least two clock periods each to be counted once.
module command_input
  import stepper_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step_pulse,
  input  logic  sense_in,
  input  mode_t mode_in,
  output logic  step_en,
  output logic  sense,
  output mode_t mode
);

  // One synchroniser word per stage: {pulse, sense, mode}.
  typedef struct packed {
    logic  pulse;
    logic  sense;
    mode_t mode;
  } cmd_t;

  cmd_t sync_q [SYNC_STAGES];
  logic pulse_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) sync_q[i] <= '0;
      pulse_d <= 1'b0;
    end else begin
      sync_q[0] <= '{pulse: step_pulse, sense: sense_in, mode: mode_in};
      for (int i = 1; i < SYNC_STAGES; i++) sync_q[i] <= sync_q[i-1];
      pulse_d <= sync_q[SYNC_STAGES-1].pulse;
    end
  end

  assign step_en = sync_q[SYNC_STAGES-1].pulse & ~pulse_d;
  assign sense   = sync_q[SYNC_STAGES-1].sense;
  assign mode    = sync_q[SYNC_STAGES-1].mode;

endmodule
