// tb_branch_stack: nested pushes, updates of the executed half, pops back
// to empty, and the empty register.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_branch_stack;
  localparam int N = 8, D = 4;
  logic clk = 0, rst = 1, push = 0, set_exec = 0, pop = 0;
  logic [N-1:0] push_active = '0, exec_in = '0, top_exec, top_before; logic empty;
  branch_stack #(.N_CORES(N), .DEPTH(D)) dut (.clk, .rst, .push, .push_active, .set_exec,
    .exec_in, .pop, .top_exec, .top_before(top_before), .empty);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [N-1:0] m_prev [$], m_exec [$];
  initial begin
    repeat (2) @(negedge clk); rst = 0; #1;
    check(empty, "empty after reset");
    for (int r = 0; r < 400; r++) begin
      int op;
      op = $urandom_range(2);
      if (m_prev.size() == 0) op = 0;
      if (m_prev.size() == D) op = 2;
      push = (op == 0); set_exec = (op == 1); pop = (op == 2);
      push_active = N'($urandom); exec_in = N'($urandom);
      @(negedge clk);
      if (op == 0) begin m_prev.push_back(push_active); m_exec.push_back('0); end
      else if (op == 1) m_exec[m_exec.size()-1] = exec_in;
      else begin void'(m_prev.pop_back()); void'(m_exec.pop_back()); end
      push = 0; set_exec = 0; pop = 0; #1;
      check(empty == (m_prev.size() == 0), "empty register");
      if (m_prev.size() > 0)
        check(top_before == m_prev[$] && top_exec == m_exec[$], "top entry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
