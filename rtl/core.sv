// core: one SIMT thread of the streaming multiprocessor.
//
// All cores receive the same decoded control word from the control unit
// and differ only in their data. The data bus is driven by the input
// multiplexer (ALU output by default, RAM, register port B, the immediate,
// or one of the external inputs); the A and B selectors feed the ALU either
// from the register bank or from the data bus; the register bank writes the
// data bus at the A address; the RAM pushes the data bus onto the core's
// private stack. A core whose `active` bit is low performs no write of any
// kind (registers, RAM, stack pointer, ALU, conditional register): the
// original gates the control word with transparent latches, here the write
// enables are simply ANDed with `active`.
//
// The conditional register holds the result of compare instructions:
// flag f (zero or negative of the ALU output), optionally negated by
// settings bit 1, is ANDed (settings bit 0 = 0) or ORed (= 1) into the
// previous value. "Reset compare" sets it back to 1. jump_ok tells the
// control unit that this core agrees to take a branch: its condition holds,
// or it is inactive and does not care.
//
// Timing: every control input is a register in the control unit and is
// acted on in the cycle it is present; all state updates on the rising edge.
module core
  import gpu_pkg::*;
#(
  parameter int unsigned W         = 16,
  parameter int unsigned N_REGS    = 3,
  parameter int unsigned N_OUT     = 2,
  parameter int unsigned RAM_DEPTH = 512,
  parameter int unsigned SP_INIT   = 0,
  parameter int unsigned N_INPUTS  = 2,
  parameter int unsigned SHIFT     = 8,
  localparam int unsigned RW       = (N_REGS > 1) ? $clog2(N_REGS) : 1,
  localparam int unsigned RAW      = $clog2(RAM_DEPTH),
  localparam int unsigned SW       = $clog2(SEL_INPUT + N_INPUTS)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      active,
  // control word
  input  logic [INMODE_W-1:0]       inmode,
  input  logic [OPMODE_W-1:0]       opmode,
  input  logic [ALUMODE_W-1:0]      alumode,
  input  logic                      alu_wr,
  input  logic [W-1:0]              imm,
  input  logic [SW-1:0]             in_sel,
  input  logic                      a_sel,
  input  logic                      b_sel,
  input  logic [RW-1:0]             a_addr,
  input  logic [RW-1:0]             b_addr,
  input  logic                      reg_wr,
  input  logic [RAW-1:0]            ram_ofs,
  input  logic                      push,
  input  logic                      pop,
  input  logic [FLAG_W-1:0]         cmp_flag,
  input  logic [CMPSET_W-1:0]       cmp_set,
  input  logic                      cmp_reset,
  // data
  input  logic [N_INPUTS-1:0][W-1:0] inputs,
  output logic [N_OUT-1:0][W-1:0]   outputs,
  output logic                      jump_ok,
  // RAM load port
  input  logic                      ld_en,
  input  logic [RAW-1:0]            ld_addr,
  input  logic [W-1:0]              ld_data
);
  logic [W-1:0] bus, ram_rd, reg_a, reg_b, alu_a, alu_b, alu_y;
  logic [RAW-1:0] sp;
  alu_flags_t flags;
  logic cond, flag_sel, flag_eval;

  // Input multiplexer.
  always_comb begin
    if (in_sel >= SW'(SEL_INPUT) && (int'(in_sel) - int'(SEL_INPUT)) < int'(N_INPUTS))
      bus = inputs[int'(in_sel) - int'(SEL_INPUT)];
    else unique case (int'(in_sel))
      SEL_RAM:  bus = ram_rd;
      SEL_REGB: bus = reg_b;
      SEL_IMM:  bus = imm;
      default:  bus = alu_y;
    endcase
  end

  assign alu_a = a_sel ? bus : reg_a;
  assign alu_b = b_sel ? bus : reg_b;

  reg_bank #(.W(W), .N_REGS(N_REGS), .N_OUT(N_OUT)) u_regs (
    .clk(clk), .rst(rst), .we(reg_wr && active),
    .a_addr(a_addr), .b_addr(b_addr), .wdata(bus),
    .a_data(reg_a), .b_data(reg_b), .out_regs(outputs)
  );

  core_ram #(.W(W), .DEPTH(RAM_DEPTH), .SP_INIT(SP_INIT)) u_ram (
    .clk(clk), .rst(rst), .push(push && active), .pop(pop && active),
    .ofs(ram_ofs), .wdata(bus), .rdata(ram_rd), .sp(sp),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data)
  );

  alu #(.W(W), .SHIFT(SHIFT)) u_alu (
    .clk(clk), .rst(rst), .wr(alu_wr && active),
    .a(alu_a), .b(alu_b), .inmode(inmode), .opmode(opmode), .alumode(alumode),
    .y(alu_y), .flags(flags)
  );

  // Conditional register.
  always_comb begin
    unique case (cmp_flag)
      FLAG_ZERO:     flag_sel = flags.zero;
      FLAG_NEGATIVE: flag_sel = flags.negative;
      default:       flag_sel = 1'b0;
    endcase
    flag_eval = flag_sel ^ cmp_set[1];
  end

  always_ff @(posedge clk) begin
    if (rst || cmp_reset)
      cond <= 1'b1;
    else if (active && cmp_flag != FLAG_NONE)
      cond <= cmp_set[0] ? (cond | flag_eval) : (cond & flag_eval);
  end

  assign jump_ok = cond || !active;

  logic unused_sp;
  assign unused_sp = ^sp;
endmodule
