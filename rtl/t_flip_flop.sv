// t_flip_flop: toggle flip-flop, the storage element of the sequencer's
// state counter.
//
// On a rising clock edge with en high the output becomes Q xor T: it toggles
// when T = 1 and holds when T = 0 (the T flip-flop truth table). With en low
// it holds. The toggle rule is the published one; the clock enable (one cycle
// per command pulse) and the asynchronous active-low reset to 0 are choices of
// this design, which runs from a single system clock instead of clocking the
// flip-flops with the command pulse train.
//
// Ports: clk, rst_n (async, active low), en, t -> q.
// Timing: q changes one clock edge after en is sampled high.
module t_flip_flop (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic t,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= t ^ q;
  end

endmodule
