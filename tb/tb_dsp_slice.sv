// tb_dsp_slice: checks the DSP slice model against an independent
// evaluation of the opmode table (X/Y/Z selections and ALUMODE arithmetic)
// with random operands, plus the clock enable and reset of P.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_dsp_slice;
  localparam int W = 16;
  logic clk = 0, rst = 1, ce = 0;
  logic signed [W-1:0] a = '0, b = '0, c = '0, pcin = '0, p;
  logic [4:0] inmode = '0; logic [6:0] opmode = '0; logic [3:0] alumode = '0;
  dsp_slice #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  function automatic logic signed [W-1:0] model(logic [6:0] op, logic [3:0] am,
      logic signed [W-1:0] pa, pb, pc, pp, pi);
    logic signed [W-1:0] x, y, z, s;
    case (op[1:0]) 0: x = 0; 1: x = W'(pa * pb); 2: x = pp; default: x = pb; endcase
    case (op[3:2]) 2: y = -1; 3: y = pc; default: y = 0; endcase
    case (op[6:4]) 1: z = pi; 2, 4: z = pp; 3: z = pc; 5: z = pi >>> 17; 6: z = pp >>> 17; default: z = 0; endcase
    case (am) 1: s = -z + (x + y) - 1; 2: s = -(z + x + y) - 1; 3: s = z - (x + y); default: s = z + x + y; endcase
    return s;
  endfunction

  logic [6:0] ops [8] = '{7'd0, 7'd37, 7'd51, 7'b0110000, 7'b0101000, 7'b0100010, 7'b0011100, 7'b0010011};
  initial begin
    logic signed [W-1:0] exp_p;
    repeat (2) @(negedge clk);
    check(p == 0, "reset clears P");
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); pcin = W'($urandom);
      opmode = ops[$urandom_range(7)]; alumode = 4'($urandom_range(3));
      ce = ($urandom_range(3) != 0);
      exp_p = ce ? model(opmode, alumode, a, b, c, p, pcin) : p;
      @(negedge clk);
      check(p == exp_p, $sformatf("op %b am %b", opmode, alumode));
    end
    // a MACC sequence
    opmode = 7'd0; ce = 1; @(negedge clk);
    opmode = 7'd37; alumode = 0;
    exp_p = 0;
    for (int i = 0; i < 10; i++) begin
      a = W'($urandom_range(3)); b = W'($signed($urandom_range(100)) - 50);
      exp_p = exp_p + W'(a * b);
      @(negedge clk);
    end
    check(p == exp_p, "MACC accumulates");
    rst = 1; @(negedge clk); check(p == 0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
