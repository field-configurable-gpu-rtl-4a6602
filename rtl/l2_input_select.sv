// l2_input_select: feeds the layer-2 input of the cores with the layer-1
// results, one neuron at a time.
//
// Every core's layer-1 output register is wired in; a counter picks one and
// advances on each pulse of the SM's second sync signal, wrapping after the
// last source. The selected value goes to every core's second input.
//
// Timing: the counter moves on the rising edge after a step pulse; the
// output is combinational.
//
// Ports: step (a sync pulse), src[N_SRC] (the layer-1 outputs), dout (the
// selected value) and idx (its index).
// The original names this block and says it picks its input by counting
// sync pulses; the counter with wrap-around is this design's realisation.
module l2_input_select #(
  parameter int unsigned N_SRC = 20,
  parameter int unsigned W     = 16,
  localparam int unsigned CW   = (N_SRC > 1) ? $clog2(N_SRC) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  step,
  input  logic [N_SRC-1:0][W-1:0] src,
  output logic [W-1:0]          dout,
  output logic [CW-1:0]         idx
);
  always_ff @(posedge clk) begin
    if (rst) idx <= '0;
    else if (step) idx <= (idx == CW'(N_SRC - 1)) ? '0 : idx + 1'b1;
  end

  assign dout = src[idx];
endmodule
