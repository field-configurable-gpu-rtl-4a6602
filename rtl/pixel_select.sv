// pixel_select: feeds the layer-1 input of the cores one pixel at a time.
//
// A counter addresses the pixel buffer and advances on every pulse of the
// SM's first sync signal, which the program raises after each
// multiply-accumulate; after the last pixel it returns to 0 for the next
// image. The pixel is presented zero-extended to the data width. Counting
// sync pulses instead of selecting inside the SM keeps the SM's input
// multiplexer small, as in the original.
//
// Timing: the counter moves on the rising edge after a step pulse; pixel is
// combinational from the counter and the buffer.
//
// Ports: step (sync pulse), rd_addr/rd_data to the pixel buffer, pixel to
// the cores. The upper W-PIX_W bits of pixel are constant zero and its low
// bits are rd_data passed straight through.
module pixel_select #(
  parameter int unsigned N_PIX = 400,
  parameter int unsigned PIX_W = 2,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(N_PIX)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step,
  output logic [AW-1:0]    rd_addr,
  input  logic [PIX_W-1:0] rd_data,
  output logic [W-1:0]     pixel
);
  always_ff @(posedge clk) begin
    if (rst) rd_addr <= '0;
    else if (step) rd_addr <= (rd_addr == AW'(N_PIX - 1)) ? '0 : rd_addr + 1'b1;
  end

  assign pixel = W'(rd_data);
endmodule
