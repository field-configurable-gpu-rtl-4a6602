// branch_stack: the SIMT divergence stack of the control unit.
//
// Each entry is 2*N_CORES bits wide: the right half holds the cores that
// were active when the branch construct began (pushed by new_branch), the
// left half the cores that have already executed one of its segments
// (updated by update_branch). Entries nest, so branch constructs can be
// nested up to DEPTH levels. The pointer addresses the top entry; popping
// the last entry sets the `empty` register instead of moving the pointer.
// As everywhere in this design, there is no overflow protection: pushing
// onto a full stack wraps the pointer.
//
// Timing: top_* are combinational views of the top entry; push, pop and
// set_exec take effect on the rising edge. A push clears the new entry's
// executed half. Push has priority over set_exec, set_exec over pop.
module branch_stack #(
  parameter int unsigned N_CORES = 20,
  parameter int unsigned DEPTH   = 4,
  localparam int unsigned PW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               push,
  input  logic [N_CORES-1:0] push_active,
  input  logic               set_exec,
  input  logic [N_CORES-1:0] exec_in,
  input  logic               pop,
  output logic [N_CORES-1:0] top_exec,
  output logic [N_CORES-1:0] top_before,
  output logic               empty
);
  typedef struct packed {
    logic [N_CORES-1:0] executed;
    logic [N_CORES-1:0] prev_active;
  } entry_t;

  entry_t        mem [DEPTH];
  logic [PW-1:0] ptr, wr_idx;

  assign top_exec   = mem[ptr].executed;
  assign top_before = mem[ptr].prev_active;
  assign wr_idx     = empty ? ptr : PW'((int'(ptr) + 1) % int'(DEPTH));

  always_ff @(posedge clk) begin
    if (push)          mem[wr_idx] <= '{executed: '0, prev_active: push_active};
    else if (set_exec) mem[ptr].executed <= exec_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr   <= '0;
      empty <= 1'b1;
    end else if (push) begin
      ptr   <= wr_idx;
      empty <= 1'b0;
    end else if (pop && !set_exec && !empty) begin
      if (ptr == '0) empty <= 1'b1;
      else           ptr   <= ptr - 1'b1;
    end
  end
endmodule
