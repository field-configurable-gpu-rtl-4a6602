// subroutine_stack: return-address stack for nested subroutine calls.
//
// Each entry is one program address wide. A call pushes the address of the
// instruction after the call; a return pops it. The pointer counts the
// entries and wraps without protection when more than DEPTH calls nest.
//
// Timing: `top` is the most recently pushed address, combinational; push
// and pop act on the rising edge (push wins if both are raised).
//
// Ports: push with din, pop, top.
// The original describes a separate stack of return addresses for nested
// calls, without overflow protection; the depth of 4 is this design's
// choice.
module subroutine_stack #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned AW    = 6,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          push,
  input  logic [AW-1:0] din,
  input  logic          pop,
  output logic [AW-1:0] top
);
  logic [AW-1:0] mem [DEPTH];
  logic [PW-1:0] ptr, top_idx;

  assign top_idx = PW'((int'(ptr) + int'(DEPTH) - 1) % int'(DEPTH));
  assign top     = mem[top_idx];

  always_ff @(posedge clk)
    if (push) mem[ptr] <= din;

  always_ff @(posedge clk) begin
    if (rst)       ptr <= '0;
    else if (push) ptr <= PW'((int'(ptr) + 1) % int'(DEPTH));
    else if (pop)  ptr <= top_idx;
  end
endmodule
