// max_select: turns the output-layer scores into the recognised digit.
//
// On a pulse of the SM's third sync signal, raised once the output layer
// is complete, it registers the index of the largest signed score; on equal
// scores the lower index wins. `valid` pulses for one cycle with each new
// result.
//
// Timing: digit and valid update on the rising edge after the capture
// pulse.
//
// Ports: capture (sync pulse), score[N_CAND] (signed W-bit scores),
// digit (index) and valid.
// The original only shows a max block fed by the output neurons; signed
// comparison, the tie rule and the registered result are this design's
// choice.
module max_select #(
  parameter int unsigned N_CAND = 10,
  parameter int unsigned W      = 16,
  localparam int unsigned IW    = (N_CAND > 1) ? $clog2(N_CAND) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    capture,
  input  logic [N_CAND-1:0][W-1:0] score,
  output logic [IW-1:0]           digit,
  output logic                    valid
);
  logic [IW-1:0]      best;
  logic signed [W-1:0] best_v;

  always_comb begin
    best   = '0;
    best_v = $signed(score[0]);
    for (int i = 1; i < int'(N_CAND); i++)
      if ($signed(score[i]) > best_v) begin
        best   = IW'(i);
        best_v = $signed(score[i]);
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      digit <= '0;
      valid <= 1'b0;
    end else begin
      valid <= capture;
      if (capture) digit <= best;
    end
  end
endmodule
