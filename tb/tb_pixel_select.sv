// tb_pixel_select: the pixel address advances once per step pulse, wraps
// after the last pixel, and the pixel is zero-extended.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_pixel_select;
  localparam int NP = 12;
  logic clk = 0, rst = 1, step = 0; logic [3:0] rd_addr; logic [1:0] rd_data; logic [15:0] pixel;
  pixel_select #(.N_PIX(NP), .PIX_W(2), .W(16)) dut (.*);
  assign rd_data = 2'(rd_addr * 3 + 1);   // stand-in buffer contents
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  int idx = 0;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 100; i++) begin
      #1; check(int'(rd_addr) == idx, "address follows step count");
      check(int'(pixel) == (idx * 3 + 1) % 4, $sformatf("pixel zero-extended %0d %0d", pixel, idx));
      step = $urandom_range(1); @(negedge clk);
      if (step) idx = (idx + 1) % NP;
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
