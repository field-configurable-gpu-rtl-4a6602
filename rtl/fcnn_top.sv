// fcnn_top: handwritten-digit classifier built around one streaming
// multiprocessor.
//
// A two-layer fully connected network (400 inputs -> 20 ReLU neurons ->
// 10 outputs) runs on a 20-core SM: each core is one neuron and keeps its
// weights and bias in its own RAM. The program (ROM_FILE) first has all 20
// cores multiply-accumulate the 400 pixels, which the pixel select block
// streams from the pixel buffer on sync 0; it adds the bias, requantizes to
// 8 bits and applies ReLU with a divergent branch. Then only the first 10
// cores stay active and accumulate the 20 layer-1 results, which the
// layer-2 input selector streams on sync 1. Sync 2 tells the max block to
// pick the winning output neuron. The program then starts over.
//
// Interface: pix_wr_* fill the pixel buffer (2-bit pixels, 400 of them);
// ld_* write one word of one core's RAM (weights and biases, loaded before
// reset is released); digit/digit_valid give the result, scores the ten
// output neurons, sync the SM's pulses (bit 2 marks a finished image).
// The RAM layout per core, counted down from the stack pointer (424):
// layer-1 weight of pixel p at SP-(400-p), layer-1 bias at SP-401, layer-2
// weight of layer-1 neuron j at SP-(421-j), layer-2 bias at SP-422.
//
// Following the original: 20 cores, 400 2-bit pixels, 20 + 10 neurons,
// sync-driven input selectors, shift-right requantization, the RAM layout
// of the weights. This design's choice: the load port instead of a RAM
// file, the stack pointer value, the opcode numbering and the max block's
// tie rule.
module fcnn_top #(
  parameter int unsigned N_PIX     = 400,
  parameter int unsigned PIX_W     = 2,
  parameter int unsigned N_L1      = 20,
  parameter int unsigned N_L2      = 10,
  parameter int unsigned W         = 16,
  parameter int unsigned INSTR_W   = 12,
  parameter int unsigned RAM_DEPTH = 512,
  parameter int unsigned SP_INIT   = 424,
  parameter int unsigned ROM_DEPTH = 64,
  parameter int unsigned LOOP_W    = 9,
  parameter string       ROM_FILE  = "rtl/fcnn_prog_base.hex",
  localparam int unsigned PAW = $clog2(N_PIX),
  localparam int unsigned RAW = $clog2(RAM_DEPTH),
  localparam int unsigned CW  = $clog2(N_L1),
  localparam int unsigned DW  = $clog2(N_L2)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      pix_wr_en,
  input  logic [PAW-1:0]            pix_wr_addr,
  input  logic [PIX_W-1:0]          pix_wr_data,
  input  logic                      ld_en,
  input  logic [CW-1:0]             ld_core,
  input  logic [RAW-1:0]            ld_addr,
  input  logic [W-1:0]              ld_data,
  output logic [DW-1:0]             digit,
  output logic                      digit_valid,
  output logic [N_L2-1:0][W-1:0]    scores,
  output logic [2:0]                sync
);
  logic [PAW-1:0]               pix_rd_addr;
  logic [PIX_W-1:0]             pix_rd_data;
  logic [1:0][W-1:0]            sm_in;
  logic [N_L1-1:0][1:0][W-1:0]  sm_out;
  logic [N_L1-1:0][W-1:0]       l1_res;
  logic [N_L1-1:0]              active;
  logic [$clog2(ROM_DEPTH)-1:0] pc;
  logic                         branch_empty;
  logic [CW-1:0]                l2_idx;

  pixel_buffer #(.N_PIX(N_PIX), .PIX_W(PIX_W)) u_pixbuf (
    .clk(clk), .wr_en(pix_wr_en), .wr_addr(pix_wr_addr), .wr_data(pix_wr_data),
    .rd_addr(pix_rd_addr), .rd_data(pix_rd_data)
  );

  pixel_select #(.N_PIX(N_PIX), .PIX_W(PIX_W), .W(W)) u_pixsel (
    .clk(clk), .rst(rst), .step(sync[0]),
    .rd_addr(pix_rd_addr), .rd_data(pix_rd_data), .pixel(sm_in[0])
  );

  always_comb
    for (int i = 0; i < int'(N_L1); i++) l1_res[i] = sm_out[i][0];

  l2_input_select #(.N_SRC(N_L1), .W(W)) u_l2sel (
    .clk(clk), .rst(rst), .step(sync[1]), .src(l1_res), .dout(sm_in[1]),
    .idx(l2_idx)
  );

  sm #(
    .N_CORES(N_L1), .INSTR_W(INSTR_W), .W(W), .N_REGS(3), .N_OUT(2),
    .RAM_DEPTH(RAM_DEPTH), .SP_INIT(SP_INIT), .N_INPUTS(2),
    .ROM_DEPTH(ROM_DEPTH), .LOOP_W(LOOP_W), .SYNC_BITS(3), .SHIFT(8),
    .ROM_FILE(ROM_FILE)
  ) u_sm (
    .clk(clk), .rst(rst), .inputs(sm_in), .outputs(sm_out), .sync(sync),
    .active(active), .pc(pc), .branch_empty(branch_empty),
    .ld_en(ld_en), .ld_core(ld_core), .ld_addr(ld_addr), .ld_data(ld_data)
  );

  always_comb
    for (int i = 0; i < int'(N_L2); i++) scores[i] = sm_out[i][1];

  max_select #(.N_CAND(N_L2), .W(W)) u_max (
    .clk(clk), .rst(rst), .capture(sync[2]), .score(scores),
    .digit(digit), .valid(digit_valid)
  );

  logic unused;
  assign unused = ^{active, pc, branch_empty, l2_idx};
endmodule
