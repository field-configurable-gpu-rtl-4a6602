// tb_instr_rom: reads the FCNN base program and compares the first words
// with the encoding worked out by hand: activate_all (opcode 0) in one word;
// load_op 0,0,0 (opcode 2, 21 bits) as 12 bits then 9 right-aligned bits;
// exec_op temp,temp (opcode 4, regs 2,2: 9 bits, left-aligned); load_op
// 0,37,0; begin_loop 400 (opcode 12, 14 bits).
//
// No ports. It prints one line TB_RESULT checks=<n> failures=<m> and ends
// with $finish; a watchdog ends a run that hangs. Stimulus and expected
// values are generated inside the testbench, apart from the program file
// it loads into the instruction ROM.
`timescale 1ns/1ps
module tb_instr_rom;
  logic [5:0] addr = '0; logic [11:0] data;
  instr_rom #(.W(12), .DEPTH(64), .INIT_FILE("rtl/fcnn_prog_base.hex")) dut (.*);
  int checks = 0, failures = 0;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [11:0] expw [8];
  initial begin
    expw[0] = 12'b00000_0000000;            // activate_all
    expw[1] = 12'b00010_0000000;            // load_op: opcode + 7 zero bits
    expw[2] = 12'b000_000000000;            // remaining 9 bits
    expw[3] = 12'b00100_10_10_000;          // exec_op r2, r2
    expw[4] = 12'b00010_0000001;            // load_op 0, 37, 0 : inmode 00000, opmode[6:5]=01
    expw[5] = 12'b000_0101_0000;            // opmode[4:0]=00101, alumode 0000
    expw[6] = 12'b01100_1100100;            // begin_loop 400 = 1_1001_0000
    expw[7] = 12'h000;
    for (int i = 0; i < 8; i++) begin
      addr = 6'(i); #1; check(data == expw[i], $sformatf("word %0d = %h", i, data));
    end
    addr = 6'd63; #1; check(data == 12'h000, "unfilled words read as zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
