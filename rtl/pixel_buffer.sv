// pixel_buffer: holds one image for the FCNN, N_PIX pixels of PIX_W bits.
//
// The writer (camera, host) fills it through the write port; the pixel
// select block reads it. The FCNN example uses 20x20 images quantized to
// 2 bits per pixel. The read port is asynchronous.
//
// Ports: wr_en/wr_addr/wr_data write one pixel on the rising edge;
// rd_addr/rd_data read one pixel combinationally.
// The original names the buffer and gives its size and pixel width; the
// simple dual-port array is this design's choice.
module pixel_buffer #(
  parameter int unsigned N_PIX = 400,
  parameter int unsigned PIX_W = 2,
  localparam int unsigned AW   = $clog2(N_PIX)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [PIX_W-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [PIX_W-1:0] rd_data
);
  logic [PIX_W-1:0] mem [N_PIX];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  assign rd_data = mem[rd_addr];
endmodule
