// tb_subroutine_stack: random nested calls and returns against a queue.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_subroutine_stack;
  localparam int D = 4, AW = 6;
  logic clk = 0, rst = 1, push = 0, pop = 0; logic [AW-1:0] din = '0, top;
  subroutine_stack #(.DEPTH(D), .AW(AW)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [AW-1:0] q [$];
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int r = 0; r < 100; r++) begin
      bit doit;
      doit = (q.size() == 0) || (q.size() < D && $urandom_range(1));
      push = doit; pop = !doit; din = AW'($urandom);
      @(negedge clk);
      if (doit) q.push_back(din); else void'(q.pop_back());
      push = 0; pop = 0; #1;
      if (q.size() > 0) check(top == q[$], "top of stack is the latest return address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
