// tb_reg_bank: random writes and reads against a shadow copy; checks both
// read ports, the output registers and reset.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_reg_bank;
  localparam int W = 16, N = 4, NO = 2;
  logic clk = 0, rst = 1, we = 0;
  logic [1:0] a_addr = '0, b_addr = '0; logic [W-1:0] wdata = '0, a_data, b_data;
  logic [NO-1:0][W-1:0] out_regs;
  reg_bank #(.W(W), .N_REGS(N), .N_OUT(NO)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [W-1:0] shadow [N];
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < N; i++) shadow[i] = 0;
    for (int i = 0; i < 300; i++) begin
      a_addr = 2'($urandom); b_addr = 2'($urandom); #1;
      check(a_data == shadow[a_addr] && b_data == shadow[b_addr], "read ports");
      check(out_regs[0] == shadow[0] && out_regs[1] == shadow[1], "output registers");
      we = $urandom_range(1); wdata = W'($urandom);
      if (we) shadow[a_addr] = wdata;
      @(negedge clk);
    end
    we = 0; rst = 1; @(negedge clk); rst = 0; a_addr = 3; b_addr = 1; #1;
    check(a_data == 0 && b_data == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
