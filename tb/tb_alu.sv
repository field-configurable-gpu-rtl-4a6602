// tb_alu: checks the ALU wrapper: MACC and bias-add opmodes write P, the
// requantizing shift (opmode 127) appears on y without an execute and never
// writes P, and the zero/negative flags follow y.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_alu;
  localparam int W = 16;
  logic clk = 0, rst = 1, wr = 0;
  logic signed [W-1:0] a = '0, b = '0, y;
  logic [4:0] inmode = '0; logic [6:0] opmode = '0; logic [3:0] alumode = '0;
  gpu_pkg::alu_flags_t flags;
  alu #(.W(W), .SHIFT(8)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin
    logic signed [W-1:0] acc, bias, s;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 30; t++) begin
      // clear P
      opmode = 7'd0; wr = 1; @(negedge clk);
      check(y == 0 && flags.zero && !flags.negative, "cleared, zero flag");
      opmode = 7'd37; acc = 0;
      for (int i = 0; i < 20; i++) begin
        a = W'($urandom_range(3)); b = W'($signed($urandom_range(255)) - 128);
        acc = acc + W'(a * b); @(negedge clk);
      end
      check(y == acc, "MACC");
      // bias: C (=A) + A:B (=B)
      opmode = 7'd51; bias = W'($signed($urandom_range(8000)) - 4000);
      a = acc; b = bias; @(negedge clk);
      s = acc + bias;
      check(y == s, "bias add");
      // requantize: just load the opmode
      wr = 0; opmode = 7'd127; #1;
      check(y == (s >>> 8), "shift right appears on y");
      check(flags.negative == s[W-1], "negative flag follows shifted value");
      check(flags.zero == ((s >>> 8) == 0), "zero flag");
      wr = 1; a = W'($urandom); b = W'($urandom); @(negedge clk);
      opmode = 7'd2; wr = 0; #1;   // X = P: shows the raw P
      check(y == s, "opmode 127 with write leaves P untouched");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
