// tb_pixel_buffer: writes a random image and reads it back in random order.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_pixel_buffer;
  logic clk = 0, wr_en = 0; logic [8:0] wr_addr = '0, rd_addr = '0; logic [1:0] wr_data = '0, rd_data;
  pixel_buffer dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [1:0] img [400];
  initial begin
    @(negedge clk);
    for (int p = 0; p < 400; p++) begin
      img[p] = 2'($urandom); wr_en = 1; wr_addr = 9'(p); wr_data = img[p]; @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 800; i++) begin
      rd_addr = 9'($urandom_range(399)); #1; check(rd_data == img[rd_addr], "pixel read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
