// tb_core: drives one core's control word directly, one instruction per
// cycle, and checks the data path: immediate and input loads, push/pop
// through the stack RAM, MACC over RAM words with the offset addressing,
// saving the ALU output, the requantizing shift, the conditional register
// (AND/OR/negate, reset), jump_ok, and that an inactive core writes nothing.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_core;
  import gpu_pkg::*;
  localparam int W = 16, D = 64, SPI = 40;
  logic clk = 0, rst = 1, active = 1;
  logic [4:0] inmode = '0; logic [6:0] opmode = '0; logic [3:0] alumode = '0;
  logic alu_wr = 0, a_sel = 0, b_sel = 0, reg_wr = 0, push = 0, pop = 0, cmp_reset = 0;
  logic [W-1:0] imm = '0; logic [2:0] in_sel = '0; logic [1:0] a_addr = '0, b_addr = '0;
  logic [5:0] ram_ofs = '0; logic [1:0] cmp_flag = '0, cmp_set = '0;
  logic [1:0][W-1:0] inputs = '0; logic [1:0][W-1:0] outputs; logic jump_ok;
  logic ld_en = 0; logic [5:0] ld_addr = '0; logic [W-1:0] ld_data = '0;
  core #(.W(W), .N_REGS(3), .N_OUT(2), .RAM_DEPTH(D), .SP_INIT(SPI), .N_INPUTS(2), .SHIFT(8)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  task automatic idle();
    alu_wr = 0; a_sel = 0; b_sel = 0; reg_wr = 0; push = 0; pop = 0; cmp_reset = 0;
    in_sel = 3'(SEL_ALU); cmp_flag = FLAG_NONE;
  endtask
  task automatic step(); @(negedge clk); idle(); endtask

  logic signed [W-1:0] mem [D];
  logic signed [W-1:0] acc, v;
  initial begin
    idle();
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      mem[i] = W'($signed($urandom_range(200)) - 100);
      ld_en = 1; ld_addr = 6'(i); ld_data = mem[i]; @(negedge clk);
    end
    ld_en = 0; rst = 0;
    // load_imm r0, 1234
    imm = 16'd1234; in_sel = 3'(SEL_IMM); a_addr = 0; reg_wr = 1; step();
    check(outputs[0] == 1234, "load_imm into output register 0");
    // load_in r1, input 1
    inputs[1] = 16'hBEEF; in_sel = 3'(SEL_INPUT + 1); a_addr = 1; reg_wr = 1; step();
    check(outputs[1] == 16'hBEEF, "load_in from input 1");
    // push r0 ; pop r1
    b_addr = 0; in_sel = 3'(SEL_REGB); push = 1; step();
    a_addr = 1; in_sel = 3'(SEL_RAM); ram_ofs = 1; reg_wr = 1; pop = 1; step();
    check(outputs[1] == 1234, "push then pop moves r0 to r1");
    // MACC: P = 0; P += r2 * RAM[sp - (k+2)], k = 5..1, r2 = input 0
    opmode = 7'd0; alu_wr = 1; step();
    opmode = 7'd37; acc = 0;
    for (int k = 5; k >= 1; k--) begin
      inputs[0] = W'($urandom_range(3));
      in_sel = 3'(SEL_INPUT); a_addr = 2; reg_wr = 1; step();
      a_addr = 2; a_sel = 0; b_sel = 1; in_sel = 3'(SEL_RAM); ram_ofs = 6'(k + 2); alu_wr = 1;
      acc = acc + W'($signed(inputs[0]) * mem[SPI - (k + 2)]);
      step();
    end
    a_addr = 0; reg_wr = 1; step();        // save_to_reg r0
    check($signed(outputs[0]) == acc, "MACC over RAM offsets, saved to r0");
    // bias add with opmode 51: r0 + RAM[sp-10]
    opmode = 7'd51; a_addr = 0; b_sel = 1; in_sel = 3'(SEL_RAM); ram_ofs = 10; alu_wr = 1; step();
    v = acc + mem[SPI - 10];
    opmode = 7'd127; #1;
    // compare: cond = !negative (settings 2)
    cmp_reset = 1; step();
    cmp_flag = FLAG_NEGATIVE; cmp_set = 2'b10; step();
    check(jump_ok == !((v >>> 8) < 0), "compare !negative on shifted value");
    a_addr = 1; reg_wr = 1; step();
    check($signed(outputs[1]) == (v >>> 8), "requantized value saved");
    // OR mode: cond |= zero (never zero here unless v>>>8 == 0)
    cmp_flag = FLAG_ZERO; cmp_set = 2'b01; step();
    check(jump_ok == (!((v >>> 8) < 0) || ((v >>> 8) == 0)), "compare OR mode");
    // AND with negated zero of a known non-zero value
    opmode = 7'd0; alu_wr = 1; step();     // P = 0 -> zero flag set
    cmp_flag = FLAG_ZERO; cmp_set = 2'b10; step();  // cond &= !zero = 0
    check(!jump_ok, "compare AND with negated flag clears the condition");
    cmp_reset = 1; step();
    check(jump_ok, "reset compare sets the condition");
    cmp_flag = FLAG_ZERO; cmp_set = 2'b10; step();
    check(!jump_ok, "condition cleared again");
    // inactive core: no writes, jump_ok forced
    active = 0; #1;
    check(jump_ok, "inactive core is available to jump");
    imm = 16'd77; in_sel = 3'(SEL_IMM); a_addr = 0; reg_wr = 1; step();
    b_addr = 0; in_sel = 3'(SEL_REGB); push = 1; step();
    cmp_reset = 1; step();
    check($signed(outputs[0]) == acc, "inactive core does not write registers");
    active = 1; #1;
    check(jump_ok, "reset compare reaches inactive cores too");
    a_addr = 1; in_sel = 3'(SEL_RAM); ram_ofs = 1; reg_wr = 1; step();
    check(outputs[1] == mem[SPI - 1], "inactive core did not push (top of stack unchanged)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
