// tb_core_ram: load port, offset reads relative to the stack pointer,
// push/pop stack discipline and pointer wrap-around.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_core_ram;
  localparam int W = 16, D = 64, SPI = 40;
  logic clk = 0, rst = 1, push = 0, pop = 0, ld_en = 0;
  logic [5:0] ofs = '0, sp, ld_addr = '0; logic [W-1:0] wdata = '0, rdata, ld_data = '0;
  core_ram #(.W(W), .DEPTH(D), .SP_INIT(SPI)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [W-1:0] shadow [D];
  int s;
  initial begin
    repeat (2) @(negedge clk);
    for (int i = 0; i < D; i++) begin
      shadow[i] = W'($urandom); ld_en = 1; ld_addr = 6'(i); ld_data = shadow[i]; @(negedge clk);
    end
    ld_en = 0; rst = 0; #1;
    check(sp == SPI, "stack pointer reset value");
    for (int o = 0; o < D; o++) begin
      ofs = 6'(o); #1; check(rdata == shadow[(SPI - o + D) % D], "offset read");
    end
    @(negedge clk);
    s = SPI;
    for (int i = 0; i < 200; i++) begin
      if ($urandom_range(1)) begin
        push = 1; pop = 0; wdata = W'($urandom); shadow[s] = wdata; s = (s + 1) % D;
      end else begin
        push = 0; pop = 1; ofs = 1; #1;
        check(rdata == shadow[(s - 1 + D) % D], $sformatf("pop reads top of stack s=%0d sp=%0d rd=%h exp=%h", s, sp, rdata, shadow[(s - 1 + D) % D]));
        s = (s - 1 + D) % D;
      end
      @(negedge clk); push = 0; pop = 0; #1;
      check(int'(sp) == s, "stack pointer tracks pushes and pops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
