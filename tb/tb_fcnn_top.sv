// tb_fcnn_top: end-to-end test of the FCNN classifier at its default size
// (20 cores, 400 pixels, 12-bit instructions, base program).
//
// For three images it loads random weights, biases and pixels, releases
// reset and waits for the result. A reference model in the testbench
// computes, with the same 16-bit wrap-around arithmetic, every layer-1
// neuron (MACC over the pixels, plus bias, arithmetic shift right by 8,
// ReLU) and every layer-2 neuron (MACC over the 20 layer-1 results, plus
// bias), then the arg-max. Biases are chosen so that the three images take
// the three paths through the ReLU branch: mixed signs (cores diverge),
// all non-negative (branch taken by all), all negative (update_branch
// jumps to the end). It also checks that one loop iteration takes 6 cycles
// and that a whole image takes within 2 % of 2594 cycles, the figure
// reported for the original, and counts how often each mechanism occurred.
// A second instance of the top, with a deeper ROM, first runs a short
// program (tb/fcnn_mech.hex) that uses what the classifier does not: calls
// nested inside a branch, push/pop, an OR-chained compare, the zero flag,
// a nested branch, load_in_and_sync and a partial core mask; every core's
// two output registers and the digit are checked against a model.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench.
`timescale 1ns/1ps
module tb_fcnn_top;
  import gpu_pkg::*;
  localparam int NPIX = 400, NL1 = 20, NL2 = 10, SP = 424;
  localparam int LOOP_CYC = 6, REF_CYC = 2594, TOL_PCT = 2;

  logic clk = 0, rst = 1;
  logic pix_wr_en = 0; logic [8:0] pix_wr_addr = '0; logic [1:0] pix_wr_data = '0;
  logic ld_en = 0; logic [4:0] ld_core = '0; logic [8:0] ld_addr = '0; logic [15:0] ld_data = '0;
  logic [3:0] digit; logic digit_valid; logic [NL2-1:0][15:0] scores; logic [2:0] sync;

  fcnn_top dut (.*);

  // Second instance: same top, but running a short program that uses the
  // instructions the classifier program does not (call/return, push/pop,
  // OR-chained compares, the zero flag, load_in_and_sync, nested branches).
  // It needs 79 ROM words, hence the deeper ROM.
  logic m_rst = 1, m_pix_wr_en = 0, m_ld_en = 0;
  logic [8:0] m_pix_wr_addr = '0, m_ld_addr = '0; logic [1:0] m_pix_wr_data = '0;
  logic [4:0] m_ld_core = '0; logic [15:0] m_ld_data = '0;
  logic [3:0] m_digit; logic m_digit_valid; logic [NL2-1:0][15:0] m_scores; logic [2:0] m_sync;
  fcnn_top #(.ROM_DEPTH(128), .ROM_FILE("tb/fcnn_mech.hex")) dut_m (
    .clk(clk), .rst(m_rst), .pix_wr_en(m_pix_wr_en), .pix_wr_addr(m_pix_wr_addr),
    .pix_wr_data(m_pix_wr_data), .ld_en(m_ld_en), .ld_core(m_ld_core), .ld_addr(m_ld_addr),
    .ld_data(m_ld_data), .digit(m_digit), .digit_valid(m_digit_valid), .scores(m_scores),
    .sync(m_sync));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic signed [15:0] w1 [NL1][NPIX];
  logic signed [15:0] b1 [NL1];
  logic signed [15:0] w2 [NL2][NL1];
  logic signed [15:0] b2 [NL2];
  logic        [1:0]  pix [NPIX];
  logic signed [15:0] r1 [NL1];
  logic signed [15:0] r2 [NL2];

  // mechanism counters
  int n_branch_all = 0, n_branch_div = 0, n_upd_jump = 0, n_upd_cont = 0;
  int n_loop_jump = 0, n_l2_active10 = 0, n_sync0 = 0, n_sync1 = 0, n_sync2 = 0;
  int last_sync0 = -1, last_sync1 = -1;
  always @(posedge clk) if (!rst) begin
    if (dut.u_sm.u_cu.state == ST_BRANCH) begin
      if (&dut.u_sm.u_cu.jump_ok) n_branch_all++; else n_branch_div++;
    end
    if (dut.u_sm.u_cu.done && dut.u_sm.u_cu.dec_op == OP_UPDATE_BRANCH) begin
      if (dut.u_sm.u_cu.exec_now == dut.u_sm.u_cu.bs_top_before) n_upd_jump++; else n_upd_cont++;
    end
    if (dut.u_sm.u_cu.done && dut.u_sm.u_cu.dec_op == OP_LOOP && dut.u_sm.u_cu.loop_dec != 0)
      n_loop_jump++;
    if (sync[1] && dut.u_sm.active == 20'h003FF) n_l2_active10++;
    if (sync[0]) begin
      if (last_sync0 >= 0 && cyc - last_sync0 < 100) check(cyc - last_sync0 == LOOP_CYC, "layer-1 loop iteration cycles");
      last_sync0 = cyc; n_sync0++;
    end
    if (sync[1]) begin
      if (last_sync1 >= 0 && cyc - last_sync1 < 100) check(cyc - last_sync1 == LOOP_CYC, "layer-2 loop iteration cycles");
      last_sync1 = cyc; n_sync1++;
    end
    if (sync[2]) n_sync2++;
  end

  logic [8:0] m_sp [NL1];
  for (genvar g = 0; g < NL1; g++) begin : g_sp
    assign m_sp[g] = dut_m.u_sm.g_core[g].u_core.u_ram.sp;
  end

  // mechanism counters of the second instance
  int n_call = 0, n_ret = 0, n_push = 0, n_pop = 0, n_cmp_or = 0, n_cmp_zero = 0;
  int n_in_sync = 0, n_nested = 0, n_requant = 0;
  always @(posedge clk) if (!m_rst && dut_m.u_sm.u_cu.done) begin
    unique case (dut_m.u_sm.u_cu.dec_op)
      OP_CALL:         n_call++;
      OP_RETURN:       n_ret++;
      OP_PUSH:         n_push++;
      OP_POP:          n_pop++;
      OP_LOAD_IN_SYNC: n_in_sync++;
      OP_NEW_BRANCH:   if (!dut_m.u_sm.branch_empty) n_nested++;
      OP_COMPARE: begin
        if (dut_m.u_sm.u_cu.ib[2]) n_cmp_or++;
        if (dut_m.u_sm.u_cu.ib[1:0] == 2'd1) n_cmp_zero++;
      end
      OP_LOAD_OPMODE:  if (dut_m.u_sm.u_cu.ib[6:0] == 7'd127) n_requant++;
      default: ;
    endcase
  end

  function automatic logic signed [15:0] mul16(logic signed [15:0] a, logic signed [15:0] b);
    return 16'(a * b);
  endfunction

  task automatic make_image(int mode);
    for (int c = 0; c < NL1; c++) begin
      for (int p = 0; p < NPIX; p++) w1[c][p] = 16'($signed($urandom_range(80)) - 40);
      case (mode)
        0: b1[c] = (c % 2 == 0) ? 16'sd12000 : -16'sd12000;
        1: b1[c] = 16'sd20000;
        default: b1[c] = -16'sd20000;
      endcase
    end
    for (int k = 0; k < NL2; k++) begin
      for (int j = 0; j < NL1; j++) w2[k][j] = 16'($signed($urandom_range(200)) - 100);
      b2[k] = 16'($signed($urandom_range(2000)) - 1000);
    end
    for (int p = 0; p < NPIX; p++) pix[p] = 2'($urandom_range(3));
  endtask

  task automatic load_all();
    rst = 1;
    @(negedge clk);
    for (int c = 0; c < NL1; c++) begin
      for (int p = 0; p < NPIX; p++) begin
        ld_en = 1; ld_core = 5'(c); ld_addr = 9'(SP - (400 - p)); ld_data = w1[c][p];
        @(negedge clk);
      end
      ld_addr = 9'(SP - 401); ld_data = b1[c]; @(negedge clk);
      if (c < NL2) begin
        for (int j = 0; j < NL1; j++) begin
          ld_addr = 9'(SP - (421 - j)); ld_data = w2[c][j]; @(negedge clk);
        end
        ld_addr = 9'(SP - 422); ld_data = b2[c]; @(negedge clk);
      end
    end
    ld_en = 0;
    for (int p = 0; p < NPIX; p++) begin
      pix_wr_en = 1; pix_wr_addr = 9'(p); pix_wr_data = pix[p]; @(negedge clk);
    end
    pix_wr_en = 0;
  endtask

  function automatic int reference();
    logic signed [15:0] acc, s;
    int best = 0;
    for (int c = 0; c < NL1; c++) begin
      acc = '0;
      for (int p = 0; p < NPIX; p++) acc = acc + mul16(16'(pix[p]), w1[c][p]);
      s = acc + b1[c];
      s = s >>> 8;
      r1[c] = s[15] ? 16'sd0 : s;
    end
    for (int k = 0; k < NL2; k++) begin
      acc = '0;
      for (int j = 0; j < NL1; j++) acc = acc + mul16(r1[j], w2[k][j]);
      r2[k] = acc + b2[k];
      if (r2[k] > r2[best]) best = k;
    end
    return best;
  endfunction

  task automatic run_image(int mode);
    int t0, exp_digit, ncyc;
    make_image(mode);
    load_all();
    exp_digit = reference();
    @(negedge clk); rst = 0; t0 = cyc;
    last_sync0 = -1; last_sync1 = -1;
    while (!digit_valid) @(negedge clk);
    ncyc = cyc - t0;
    $display("image mode %0d: %0d cycles, digit %0d (expected %0d)", mode, ncyc, digit, exp_digit);
    check(digit_valid, "digit_valid pulses after sync 2");
    check(int'(digit) == exp_digit, "recognised digit");
    for (int c = 0; c < NL1; c++)
      check(dut.sm_out[c][0] == r1[c], $sformatf("layer-1 neuron %0d", c));
    for (int k = 0; k < NL2; k++)
      check(scores[k] == r2[k], $sformatf("layer-2 neuron %0d: %0d vs %0d", k, $signed(scores[k]), r2[k]));
    check(ncyc > REF_CYC * (100 - TOL_PCT) / 100 && ncyc < REF_CYC * (100 + TOL_PCT) / 100, "cycles per image close to the reported figure");
    @(negedge clk);
    check(!digit_valid, "digit_valid is a single pulse");
  endtask

  // Mechanism program, per core i: v at SP-1, u at SP-2, w[0..2] at
  // SP-5..SP-3. Expected: r1 = class of v (1 neg, 2 zero, 3 pos) if u != 0,
  // else 0; +10 unless (u == 0 or v < 0); + sum of pixel[k] * w[k];
  // + v of core 0 on the odd cores 1..9; then r0 = r1 >>> 8.
  task automatic run_mech();
    logic signed [15:0] v [NL1], u [NL1], w [NL1][3], e1 [NL1];
    logic [1:0] pm [3];
    logic signed [15:0] e0;
    int best = 0;
    for (int i = 0; i < NL1; i++) begin
      v[i] = (i % 3 == 0) ? 16'(-(i + 5) * 7) : (i % 3 == 1) ? 16'sd0 : 16'((i + 3) * 11);
      u[i] = (i % 4 == 0) ? 16'sd0 : 16'(i + 1);
      for (int k = 0; k < 3; k++) w[i][k] = 16'($signed($urandom_range(4000)) - 2000);
    end
    for (int k = 0; k < 3; k++) pm[k] = 2'($urandom_range(3));
    @(negedge clk);
    for (int i = 0; i < NL1; i++) begin
      m_ld_en = 1; m_ld_core = 5'(i);
      m_ld_addr = 9'(SP - 1); m_ld_data = v[i]; @(negedge clk);
      m_ld_addr = 9'(SP - 2); m_ld_data = u[i]; @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        m_ld_addr = 9'(SP - 5 + k); m_ld_data = w[i][k]; @(negedge clk);
      end
    end
    m_ld_en = 0;
    for (int k = 0; k < 3; k++) begin
      m_pix_wr_en = 1; m_pix_wr_addr = 9'(k); m_pix_wr_data = pm[k]; @(negedge clk);
    end
    m_pix_wr_en = 0;
    for (int i = 0; i < NL1; i++) begin
      e1[i] = (u[i] == 0) ? 16'sd0 : (v[i] < 0) ? 16'sd1 : (v[i] == 0) ? 16'sd2 : 16'sd3;
      if (!(u[i] == 0 || v[i] < 0)) e1[i] = e1[i] + 16'sd10;
      for (int k = 0; k < 3; k++) e1[i] = e1[i] + mul16(16'(pm[k]), w[i][k]);
      if (i < NL2 && i % 2 == 1) e1[i] = e1[i] + v[0];
    end
    for (int k = 0; k < NL2; k++) if (e1[k] > e1[best]) best = k;
    m_rst = 0;
    while (!m_digit_valid) @(negedge clk);
    $display("mechanism program: digit %0d (expected %0d)", m_digit, best);
    check(int'(m_digit) == best, "mechanism program digit");
    for (int i = 0; i < NL1; i++) begin
      check(dut_m.sm_out[i][1] == e1[i], $sformatf("mechanism program r1 of core %0d: %0d vs %0d", i, $signed(dut_m.sm_out[i][1]), e1[i]));
      e0 = e1[i] >>> 8;
      check(dut_m.sm_out[i][0] == e0, $sformatf("mechanism program r0 of core %0d", i));
      check(m_sp[i] == 9'(SP), "stack pointer back after push/pop");
    end
    $display("call=%0d return=%0d push=%0d pop=%0d compare-or=%0d compare-zero=%0d load_in_and_sync=%0d nested-branch=%0d requant=%0d",
             n_call, n_ret, n_push, n_pop, n_cmp_or, n_cmp_zero, n_in_sync, n_nested, n_requant);
    check(n_call == 2 && n_ret == 2, "subroutine call and nested call returned");
    check(n_push > 0 && n_pop > 0, "push and pop happened");
    check(n_cmp_or > 0, "OR-chained compare happened");
    check(n_cmp_zero > 0, "zero-flag compare happened");
    check(n_in_sync == 3, "load_in_and_sync happened");
    check(n_nested > 0, "nested branch happened");
    check(n_requant > 0, "requantize opmode happened");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run_mech();
    run_image(0);
    run_image(1);
    run_image(2);
    $display("branch all-jump=%0d diverge=%0d update-jump=%0d update-continue=%0d loop-jumps=%0d l2-with-10-cores=%0d sync0=%0d sync1=%0d sync2=%0d",
             n_branch_all, n_branch_div, n_upd_jump, n_upd_cont, n_loop_jump, n_l2_active10, n_sync0, n_sync1, n_sync2);
    check(n_branch_all > 0, "branch taken by all cores happened");
    check(n_branch_div > 0, "divergent branch happened");
    check(n_upd_jump > 0, "update_branch jump to end happened");
    check(n_upd_cont > 0, "update_branch continue happened");
    check(n_loop_jump > 0, "loop repetition happened");
    check(n_l2_active10 > 0, "layer 2 ran on 10 active cores");
    check(n_sync0 == 3 * NPIX && n_sync1 == 3 * NL1 && n_sync2 == 3, "sync pulse counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
