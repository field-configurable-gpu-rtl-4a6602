// core_ram: private data memory and stack of one core.
//
// Every access is relative to the core's own stack pointer: the read port
// returns RAM[sp - ofs], so offset 1 is the top of the stack and larger
// offsets reach deeper (the FCNN keeps its weights there and walks them
// with the loop counter). A push writes wdata at RAM[sp] and increments sp;
// a pop decrements sp (the popped word is read with offset 1 in the same
// cycle). There is no overflow protection: sp simply wraps, as in the
// original. A separate load port fills the memory before a program runs
// (the original loads it from a file at configuration time; the port is
// this design's replacement). The read is asynchronous, matching the
// distributed (LUT) RAM the original maps to.
//
// Timing: rdata is combinational; writes and sp change on the rising edge.
// rst sets sp to SP_INIT.
module core_ram #(
  parameter int unsigned W       = 16,
  parameter int unsigned DEPTH   = 512,
  parameter int unsigned SP_INIT = 0,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          push,
  input  logic          pop,
  input  logic [AW-1:0] ofs,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  output logic [AW-1:0] sp,
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  logic [W-1:0]  ld_data
);
  logic [W-1:0] mem [DEPTH];

  assign rdata = mem[AW'(sp - ofs)];

  always_ff @(posedge clk) begin
    if (ld_en)     mem[ld_addr] <= ld_data;
    else if (push) mem[sp]      <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst)       sp <= AW'(SP_INIT);
    else if (push) sp <= sp + 1'b1;
    else if (pop)  sp <= sp - 1'b1;
  end
endmodule
