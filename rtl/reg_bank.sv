// reg_bank: the general-purpose registers of one core.
//
// Two combinational read ports (A and B addresses come from the control
// unit) and one write port that always writes at the A address, as the
// control unit's "write to regs" register describes. The first N_OUT
// registers are the registers a program declares as outputs; their contents
// leave the core continuously as its peripheral outputs.
// Reset clears every register (the original leaves reset values open).
//
// Timing: reads are combinational; a write lands on the rising clock edge.
module reg_bank #(
  parameter int unsigned W      = 16,
  parameter int unsigned N_REGS = 3,
  parameter int unsigned N_OUT  = 2,
  localparam int unsigned AW    = (N_REGS > 1) ? $clog2(N_REGS) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 we,
  input  logic [AW-1:0]        a_addr,
  input  logic [AW-1:0]        b_addr,
  input  logic [W-1:0]         wdata,
  output logic [W-1:0]         a_data,
  output logic [W-1:0]         b_data,
  output logic [N_OUT-1:0][W-1:0] out_regs
);
  logic [W-1:0] regs [N_REGS];

  assign a_data = regs[a_addr];
  assign b_data = regs[b_addr];

  always_comb
    for (int i = 0; i < int'(N_OUT); i++) out_regs[i] = regs[i];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N_REGS); i++) regs[i] <= '0;
    end else if (we) begin
      regs[a_addr] <= wdata;
    end
  end

  initial assert (N_OUT <= N_REGS) else $error("N_OUT exceeds N_REGS");
endmodule
