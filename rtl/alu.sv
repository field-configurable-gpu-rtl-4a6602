// alu: the arithmetic unit of one core, a wrapper around the DSP slice.
//
// Operands A and B come from the core's A/B selectors. A drives the DSP's
// A and C ports, B drives its B port (and hence A:B). When `wr` is high and
// the opmode is a valid DSP code, the DSP's P register takes the result.
// Opmodes with Z = 111, undefined for the DSP, select the "other
// instructions" block instead: the only one defined is the requantizing
// shift, which presents P arithmetically shifted right by SHIFT bits (16-bit
// layer results cut to 8 bits in the FCNN). It is combinational, so loading
// that opmode alone makes the shifted value appear on y; it never writes P.
// A comparator derives the zero and negative flags from y.
//
// The split between DSP and extra instructions, the output multiplexer and
// the comparator follow the original design; which DSP port C is wired to,
// and that the extra block is combinational on P, are this design's choice.
//
// Timing: y and flags are combinational from P and the opmode; P updates on
// the rising clock edge when wr is high.
module alu #(
  parameter int unsigned W     = 16,
  parameter int unsigned SHIFT = 8
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           wr,
  input  logic signed [W-1:0]            a,
  input  logic signed [W-1:0]            b,
  input  logic [gpu_pkg::INMODE_W-1:0]   inmode,
  input  logic [gpu_pkg::OPMODE_W-1:0]   opmode,
  input  logic [gpu_pkg::ALUMODE_W-1:0]  alumode,
  output logic signed [W-1:0]            y,
  output gpu_pkg::alu_flags_t            flags
);
  logic               invalid_dsp;
  logic signed [W-1:0] p, other_y;

  assign invalid_dsp = (opmode[6:4] == 3'b111);

  dsp_slice #(.W(W)) u_dsp (
    .clk(clk), .rst(rst), .ce(wr && !invalid_dsp),
    .a(a), .b(b), .c(a), .pcin('0),
    .inmode(inmode), .opmode(opmode), .alumode(alumode),
    .p(p)
  );

  // Extra instruction: requantization by arithmetic shift right.
  assign other_y = p >>> SHIFT;

  assign y = invalid_dsp ? other_y : p;

  assign flags.zero     = (y == '0);
  assign flags.negative = y[W-1];
endmodule
