// tb_t_flip_flop: self-checking test of the T flip-flop.
// Drives random t/en for many cycles plus resets, and compares q with a
// reference that applies the truth table (T = 0 hold, T = 1 toggle) only on
// enabled edges.
module tb_t_flip_flop;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, t = 1'b0, q;
  int   checks = 0, failures = 0;
  logic model_q;

  t_flip_flop dut (.clk(clk), .rst_n(rst_n), .en(en), .t(t), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== model_q) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, model_q);
    end
  endtask

  initial begin
    model_q = 1'b0;
    repeat (2) @(posedge clk);
    #1 check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 3) != 0;
      t  = $urandom_range(0, 1) == 1;
      if (i % 250 == 249) begin
        en    = 1'b0;
        rst_n = 1'b0;
        #1 model_q = 1'b0;
        check("async reset");
        @(negedge clk) rst_n = 1'b1;
        continue;
      end
      @(posedge clk);
      if (en) model_q = t ? ~model_q : model_q;
      #1 check("step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
