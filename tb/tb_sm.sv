// tb_sm: runs a small program (tb/sm_test.hex) on a 4-core SM whose cores
// hold the values -5, 0, 7, 0 on top of their stacks. The program builds
// an if / else-if / else on the sign of that value (results 1, 2, 3), calls
// a subroutine from inside a branch, calls a second subroutine that holds a
// nested branch, pushes in a loop, pops, and writes with only cores 0 and 2
// active. The testbench samples the output registers at the three sync
// pulses and compares them with the values the program must produce.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench, apart from the program file
// it loads into the instruction ROM.
`timescale 1ns/1ps
module tb_sm;
  localparam int N = 4, W = 16;
  logic clk = 0, rst = 1;
  logic [1:0][W-1:0] inputs = '0;
  logic [N-1:0][1:0][W-1:0] outputs;
  logic [2:0] sync; logic [N-1:0] active; logic [5:0] pc; logic branch_empty;
  logic ld_en = 0; logic [1:0] ld_core = '0; logic [5:0] ld_addr = '0; logic [W-1:0] ld_data = '0;
  sm #(.N_CORES(N), .INSTR_W(12), .W(W), .N_REGS(3), .N_OUT(2), .RAM_DEPTH(64), .SP_INIT(8),
       .N_INPUTS(2), .ROM_DEPTH(64), .LOOP_W(9), .SYNC_BITS(3), .BRANCH_DEPTH(4), .SUB_DEPTH(4),
       .SHIFT(8), .ROM_FILE("tb/sm_test.hex")) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  int v [N] = '{-5, 0, 7, 0};
  int e0_r0 [N] = '{1, 2, 3, 2};
  int e0_r1 [N] = '{0, 0, 5, 0};
  int e1_r1 [N] = '{20, 10, 10, 10};
  int e2_r0 [N] = '{99, 2, 99, 2};
  int seen = 0;
  always @(posedge clk) if (!rst) begin
    if (sync[0]) begin
      seen++;
      for (int c = 0; c < N; c++) begin
        check(int'($signed(outputs[c][0])) == e0_r0[c], $sformatf("if/else-if/else result core %0d = %0d", c, $signed(outputs[c][0])));
        check(int'($signed(outputs[c][1])) == e0_r1[c], $sformatf("call inside branch, core %0d", c));
      end
      check(active == '1, "end_branch restores all cores");
    end
    if (sync[1]) begin
      seen++;
      for (int c = 0; c < N; c++)
        check(int'($signed(outputs[c][1])) == e1_r1[c], $sformatf("nested branch in subroutine, core %0d", c));
    end
    if (sync[2]) begin
      seen++;
      for (int c = 0; c < N; c++) begin
        check(int'($signed(outputs[c][0])) == e2_r0[c], $sformatf("partial activation core %0d", c));
        check(int'($signed(outputs[c][1])) == e0_r0[c], $sformatf("push loop then pop core %0d", c));
      end
      check(branch_empty, "branch stack empty at the end");
    end
  end

  initial begin
    @(negedge clk);
    for (int c = 0; c < N; c++) begin
      ld_en = 1; ld_core = 2'(c); ld_addr = 6'd7; ld_data = W'(v[c]); @(negedge clk);
    end
    ld_en = 0;
    @(negedge clk); rst = 0;
    repeat (200) @(negedge clk);
    check(seen == 3, "all three sync points reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
