// tb_l2_input_select: the selected layer-1 output follows the count of step
// pulses and wraps after the last source.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_l2_input_select;
  localparam int N = 20;
  logic clk = 0, rst = 1, step = 0; logic [N-1:0][15:0] src; logic [15:0] dout; logic [4:0] idx;
  l2_input_select #(.N_SRC(N), .W(16)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  int k = 0;
  initial begin
    for (int i = 0; i < N; i++) src[i] = 16'($urandom);
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 120; i++) begin
      #1; check(dout == src[k], "selected source");
      step = $urandom_range(1); @(negedge clk);
      if (step) k = (k + 1) % N;
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
