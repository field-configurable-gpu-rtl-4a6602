// tb_control_unit: runs the base FCNN program (12-bit words) through the
// control unit alone. The cores are replaced by a fixed condition mask:
// cores 0-3 "want to jump" at the ReLU branch. Checks: the RAM offsets of
// the layer-1 MACCs count 400 down to 1 and those of layer 2 run 421..402;
// sync 0 fires 400 times, 6 cycles apart, sync 1 20 times; the divergent
// branch switches cores 0-3 off, update_branch switches exactly them back
// on, end_branch restores all 20; layer 2 runs with cores 0-9; the final
// jump returns the program counter to 0; every data-bus selector and write
// strobe seen matches what the instruction requires.
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench, apart from the program file
// it loads into the instruction ROM.
`timescale 1ns/1ps
module tb_control_unit;
  import gpu_pkg::*;
  localparam int N = 20;
  logic clk = 0, rst = 1;
  logic [5:0] rom_addr; logic [11:0] rom_data; logic [N-1:0] jump_ok;
  logic [N-1:0] active; logic [4:0] inmode; logic [6:0] opmode; logic [3:0] alumode;
  logic alu_wr, a_sel, b_sel, reg_wr, push, pop, cmp_reset; logic [15:0] imm;
  logic [2:0] in_sel; logic [1:0] a_addr, b_addr; logic [8:0] ram_ofs;
  logic [1:0] cmp_flag, cmp_set; logic [2:0] sync; logic [5:0] pc; logic branch_empty;
  control_unit #(.N_CORES(N), .INSTR_W(12), .W(16), .N_REGS(3), .RAM_DEPTH(512), .N_INPUTS(2),
    .ROM_DEPTH(64), .LOOP_W(9), .SYNC_BITS(3), .BRANCH_DEPTH(4), .SUB_DEPTH(4)) dut (.*);
  logic [11:0] rom [64];
  initial begin
    for (int i = 0; i < 64; i++) rom[i] = '0;
    $readmemh("rtl/fcnn_prog_base.hex", rom);
  end
  assign rom_data = rom[rom_addr];
  localparam logic [N-1:0] WANT = 20'h0000F;
  assign jump_ok = WANT | ~active;

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin #2_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  int cyc = 0, n_s0 = 0, n_s1 = 0, last_s0 = -1, exp_ofs1 = 400, exp_ofs2 = 421, n_macc = 0;
  int phase = 0;   // 0 layer 1, 1 after branch, 2 after update, 3 after end, 4 layer 2
  logic [N-1:0] prev_active;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (sync[0]) begin
      if (last_s0 >= 0) check(cyc - last_s0 == 6, "sync 0 every 6 cycles");
      last_s0 = cyc; n_s0++;
    end
    if (sync[1]) n_s1++;
    if (alu_wr && b_sel) begin
      check(in_sel == 3'(SEL_RAM), "exec from RAM selects the RAM on the data bus");
      if (opmode == 7'd37) begin
        n_macc++;
        if (n_macc <= 400) begin check(int'(ram_ofs) == exp_ofs1, "layer-1 offset = loop counter"); exp_ofs1--; end
        else begin check(int'(ram_ofs) == exp_ofs2, "layer-2 offset = loop counter + 401"); exp_ofs2--; end
      end else begin
        check(opmode == 7'd51, "bias add opmode");
        check(ram_ofs == 9'(n_macc <= 400 ? 401 : 422), "bias offset");
      end
    end
    if (reg_wr && in_sel == 3'(SEL_IMM)) check(imm == 0 && a_addr == 0, "load_imm res_layer_1, 0");
    if (active != prev_active) begin
      case (phase)
        0: check(active == ~WANT, "branch switches off the cores that want to jump");
        1: check(active == WANT, "update_branch activates the remaining cores");
        2: check(active == '1, "end_branch restores all cores");
        3: check(active == 20'h003FF, "activate_cores 1023 keeps cores 0-9");
        4: check(active == '1, "activate_all at program restart");
        default: ;
      endcase
      phase++;
    end
    prev_active = active;
    if (sync[2]) begin
      check(n_s0 == 400 && n_s1 == 20, "sync pulse counts per image");
      check(n_macc == 420, "420 MACCs per image");
      check(branch_empty, "branch stack empty after the image");
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    prev_active = '1;
    rst = 0;
    while (!sync[2]) @(negedge clk);
    repeat (4) @(negedge clk);
    check(pc <= 6'd2, "jump_addr returned to the program start");
    check(phase == 5, "all active-mask transitions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
