// tb_max_select: random signed scores, arg-max with lowest index on ties,
// captured only on the capture pulse, with a one-cycle valid.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_max_select;
  localparam int N = 10;
  logic clk = 0, rst = 1, capture = 0; logic [N-1:0][15:0] score; logic [3:0] digit; logic valid;
  max_select #(.N_CAND(N), .W(16)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  int best, held = 0;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) score[i] = 16'($signed($urandom_range(40)) - 20);
      best = 0;
      for (int i = 1; i < N; i++) if ($signed(score[i]) > $signed(score[best])) best = i;
      capture = $urandom_range(1);
      @(negedge clk);
      check(valid == capture, "valid follows capture by one cycle");
      if (capture) held = best;
      check(int'(digit) == held, "digit is the arg-max at the last capture");
      capture = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
