// dsp_slice: reduced-width model of the DSP48E1 arithmetic path that the
// ALU of every core is built around.
//
// The OPMODE word drives three operand multiplexers, as in the vendor's
// opmode table: X = opmode[1:0], Y = opmode[3:2], Z = opmode[6:4].
//   X: 00 zero, 01 multiplier, 10 P (accumulator), 11 A:B
//   Y: 00 zero, 01 multiplier, 10 all ones,        11 C
//   Z: 000 zero, 001 PCIN, 010 P, 011 C, 100 P, 101 PCIN>>>17, 110 P>>>17
// Z = 111 has no defined behaviour; the ALU wrapper uses those codes for its
// own instructions and never writes P with them (ce is low).
// The post-adder follows ALUMODE: 0000 Z+(X+Y), 0001 -Z+(X+Y)-1,
// 0010 -(Z+X+Y)-1, 0011 Z-(X+Y); other codes (the logic unit) are not
// modelled and add like 0000.
//
// Departures from the vendor part, all of this design's choosing: every
// operand and P are W bits wide instead of 30/18/48; the multiplier is W x W
// signed, truncated to W bits, and feeds X and Y as one product (the two
// partial products are not split, so Y=01 adds nothing on its own); A:B,
// the concatenation of A and B cut to W bits, is B; the INMODE pre-adder and
// carry input are not modelled (INMODE is accepted and ignored); the
// OPMODE/ALUMODE/INMODE input registers are bypassed, as the original
// design does, and only the P register is kept.
//
// Timing: p is registered. On a rising clock with ce high, p takes the
// adder result; rst clears p.
module dsp_slice #(
  parameter int unsigned W = 16
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           ce,
  input  logic signed [W-1:0]            a,
  input  logic signed [W-1:0]            b,
  input  logic signed [W-1:0]            c,
  input  logic signed [W-1:0]            pcin,
  input  logic [gpu_pkg::INMODE_W-1:0]   inmode,
  input  logic [gpu_pkg::OPMODE_W-1:0]   opmode,
  input  logic [gpu_pkg::ALUMODE_W-1:0]  alumode,
  output logic signed [W-1:0]            p
);
  logic signed [W-1:0] m, xv, yv, zv, xy, res;

  always_comb begin
    m = a * b;
    unique case (opmode[1:0])
      2'b00: xv = '0;
      2'b01: xv = m;
      2'b10: xv = p;
      default: xv = b;              // A:B cut to W bits
    endcase
    unique case (opmode[3:2])
      2'b10: yv = '1;
      2'b11: yv = c;
      default: yv = '0;             // 00, and 01 (product already on X)
    endcase
    unique case (opmode[6:4])
      3'b001: zv = pcin;
      3'b010, 3'b100: zv = p;
      3'b011: zv = c;
      3'b101: zv = pcin >>> 17;
      3'b110: zv = p >>> 17;
      default: zv = '0;
    endcase
    xy = xv + yv;
    unique case (alumode)
      4'b0001: res = xy - zv - W'(1);
      4'b0010: res = ~(zv + xy);
      4'b0011: res = zv - xy;
      default: res = zv + xy;
    endcase
  end

  // INMODE selects pre-adder paths that this model does not have.
  logic unused_inmode;
  assign unused_inmode = ^inmode;

  always_ff @(posedge clk) begin
    if (rst)     p <= '0;
    else if (ce) p <= res;
  end
endmodule
