// control_unit: fetch, decode and SIMT flow control of the streaming
// multiprocessor.
//
// Instructions are a 5-bit opcode plus operands whose widths follow the
// configuration (register count, RAM depth, ROM depth, loop width, ...).
// They are packed into ROM words of INSTR_W bits, most significant bit
// first. An instruction that does not fit one word continues in the next:
// all words but the last are full, and the last holds the remaining bits
// right-aligned (its unused high bits are "no data"). A single-word
// instruction is left-aligned, with unused low bits. The decoder therefore
// spends one cycle per ROM word: FETCH reads the first word and finds the
// opcode, CONT collects the rest. The original generates one decoding state
// per instruction type; this design uses one generic collector with the
// same cycle count.
//
// When the last word of an instruction arrives, the control registers of
// the original's register table are loaded (ALU modes, write strobes, data
// bus and A/B selectors, register addresses, immediate, RAM offset, push,
// pop, compare, sync). They are registers, so the cores act on an
// instruction in the cycle after its last word was read, while the next
// instruction is already being fetched. Write strobes, compare, reset
// compare and sync are one-cycle pulses; the selectors fall back to their
// defaults (data bus from the ALU, A and B from the register bank).
//
// Flow control:
//   jump_addr, call, return, and a loop that repeats spend one extra cycle
//   in JUMP, where the program counter is loaded.
//   begin_loop loads the loop counter; loop decrements it and jumps back
//   while the new value is not zero, so a body runs N times with counter
//   values N..1 (used as RAM offset by exec_op_loop_offset).
//   new_branch pushes the active-core mask on the branch stack and resets
//   the cores' conditional registers.
//   branch waits one cycle in BRANCH, until the preceding compare has
//   updated the cores, then: if every core agrees to jump (jump_ok), the
//   program counter is loaded; otherwise the cores that want to jump are
//   switched off and the rest execute the following segment. Either way
//   the conditional registers are reset.
//   update_branch adds the active cores to the executed set on the stack;
//   if that set equals the cores active before the branch, it jumps to its
//   target (the end of the construct), else it activates the cores that
//   have not executed yet and continues.
//   end_branch pops the stack and restores the active mask.
//   call pushes the next instruction's address on the subroutine stack,
//   return pops it.
//
// a_sel is the A selector of the original's control registers. No
// instruction of this set feeds the data bus into ALU operand A, so it
// stays 0 and synthesis sees a constant output. It is kept so that an
// added instruction can use it.
module control_unit
  import gpu_pkg::*;
#(
  parameter int unsigned N_CORES      = 20,
  parameter int unsigned INSTR_W      = 12,
  parameter int unsigned W            = 16,
  parameter int unsigned N_REGS       = 3,
  parameter int unsigned RAM_DEPTH    = 512,
  parameter int unsigned N_INPUTS     = 2,
  parameter int unsigned ROM_DEPTH    = 64,
  parameter int unsigned LOOP_W       = 9,
  parameter int unsigned SYNC_BITS    = 3,
  parameter int unsigned BRANCH_DEPTH = 4,
  parameter int unsigned SUB_DEPTH    = 4,
  localparam int unsigned RW  = (N_REGS > 1) ? $clog2(N_REGS) : 1,
  localparam int unsigned RAW = $clog2(RAM_DEPTH),
  localparam int unsigned SW  = $clog2(SEL_INPUT + N_INPUTS),
  localparam int unsigned PW  = $clog2(ROM_DEPTH),
  localparam int unsigned YW  = (SYNC_BITS > 1) ? $clog2(SYNC_BITS) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  // program memory
  output logic [PW-1:0]        rom_addr,
  input  logic [INSTR_W-1:0]   rom_data,
  // from the cores
  input  logic [N_CORES-1:0]   jump_ok,
  // control word to the cores
  output logic [N_CORES-1:0]   active,
  output logic [INMODE_W-1:0]  inmode,
  output logic [OPMODE_W-1:0]  opmode,
  output logic [ALUMODE_W-1:0] alumode,
  output logic                 alu_wr,
  output logic [W-1:0]         imm,
  output logic [SW-1:0]        in_sel,
  output logic                 a_sel,
  output logic                 b_sel,
  output logic [RW-1:0]        a_addr,
  output logic [RW-1:0]        b_addr,
  output logic                 reg_wr,
  output logic [RAW-1:0]       ram_ofs,
  output logic                 push,
  output logic                 pop,
  output logic [FLAG_W-1:0]    cmp_flag,
  output logic [CMPSET_W-1:0]  cmp_set,
  output logic                 cmp_reset,
  // synchronisation pulses to external blocks
  output logic [SYNC_BITS-1:0] sync,
  // status
  output logic [PW-1:0]        pc,
  output logic                 branch_empty
);
  // ---------------------------------------------------------------- widths
  function automatic int unsigned operand_bits(opcode_e op);
    unique case (op)
      OP_ACTIVATE_CORES: return N_CORES;
      OP_LOAD_OP:        return INMODE_W + OPMODE_W + ALUMODE_W;
      OP_LOAD_OPMODE:    return OPMODE_W;
      OP_EXEC_OP:        return 2 * RW;
      OP_EXEC_LOOP_OFS,
      OP_EXEC_STACK:     return RW + RAW;
      OP_LOAD_IN:        return RW + SW;
      OP_LOAD_IMM:       return RW + W;
      OP_SAVE_TO_REG,
      OP_PUSH, OP_POP:   return RW;
      OP_BEGIN_LOOP:     return LOOP_W;
      OP_LOOP, OP_BRANCH, OP_UPDATE_BRANCH,
      OP_JUMP_ADDR, OP_CALL: return PW;
      OP_SYNC_SIGNAL:    return YW;
      OP_LOAD_IN_SYNC:   return RW + SW + YW;
      OP_COMPARE:        return CMPSET_W + FLAG_W;
      default:           return 0;
    endcase
  endfunction

  function automatic int unsigned max_len();
    int unsigned m = 0;
    for (int i = 0; i < (1 << OPC_W); i++)
      if (OPC_W + operand_bits(opcode_e'(i)) > m) m = OPC_W + operand_bits(opcode_e'(i));
    return m;
  endfunction

  localparam int unsigned MAXL = (max_len() > INSTR_W) ? max_len() : INSTR_W;
  localparam int unsigned LW   = $clog2(MAXL + 1);

  // ------------------------------------------------------------- registers
  cu_state_e          state;
  logic [MAXL-1:0]    ibuf;
  logic [LW-1:0]      rem;          // bits still to collect
  opcode_e            cur_op;
  logic [LOOP_W-1:0]  loop_cnt;
  logic [PW-1:0]      target;

  // ------------------------------------------------------ collect (comb.)
  logic               done;
  opcode_e            dec_op;
  logic [MAXL-1:0]    ib;           // finished instruction, right-aligned
  logic [MAXL-1:0]    ibuf_nxt;
  // The widest instruction sets the buffer width; bits above an operand
  // field are simply not read by the narrower instructions.
  logic               unused_ib;
  assign unused_ib = ^ib;
  logic [LW-1:0]      rem_nxt;
  opcode_e            first_op;
  int unsigned        first_len, take;

  assign rom_addr = pc;
  assign first_op = opcode_e'(rom_data[INSTR_W-1 -: OPC_W]);

  always_comb begin
    first_len = OPC_W + operand_bits(first_op);
    take      = 0;
    done      = 1'b0;
    dec_op    = cur_op;
    ib        = '0;
    ibuf_nxt  = ibuf;
    rem_nxt   = rem;
    if (state == ST_FETCH) begin
      dec_op = first_op;
      if (first_len <= INSTR_W) begin
        done = 1'b1;
        ib   = MAXL'(rom_data >> (INSTR_W - first_len));
      end else begin
        ibuf_nxt = MAXL'(rom_data);
        rem_nxt  = LW'(first_len - INSTR_W);
      end
    end else if (state == ST_CONT) begin
      take     = (int'(rem) >= int'(INSTR_W)) ? INSTR_W : int'(rem);
      ibuf_nxt = (ibuf << take) | (MAXL'(rom_data) & ((MAXL'(1) << take) - 1'b1));
      rem_nxt  = rem - LW'(take);
      if (rem_nxt == '0) begin
        done = 1'b1;
        ib   = ibuf_nxt;
      end
    end
  end

  // ----------------------------------------------------------- stacks
  logic               bs_push, bs_set_exec, bs_pop;
  logic [N_CORES-1:0] bs_exec_in, bs_top_exec, bs_top_before, exec_now;
  logic               ss_push, ss_pop;
  logic [PW-1:0]      ss_top;

  assign exec_now = bs_top_exec | active;

  branch_stack #(.N_CORES(N_CORES), .DEPTH(BRANCH_DEPTH)) u_bstack (
    .clk(clk), .rst(rst), .push(bs_push), .push_active(active),
    .set_exec(bs_set_exec), .exec_in(bs_exec_in), .pop(bs_pop),
    .top_exec(bs_top_exec), .top_before(bs_top_before), .empty(branch_empty)
  );

  subroutine_stack #(.DEPTH(SUB_DEPTH), .AW(PW)) u_sstack (
    .clk(clk), .rst(rst), .push(ss_push), .din(PW'(pc + 1'b1)), .pop(ss_pop),
    .top(ss_top)
  );

  always_comb begin
    bs_push     = 1'b0;
    bs_set_exec = 1'b0;
    bs_pop      = 1'b0;
    bs_exec_in  = exec_now;
    ss_push     = 1'b0;
    ss_pop      = 1'b0;
    if (done) begin
      unique case (dec_op)
        OP_NEW_BRANCH:    bs_push     = 1'b1;
        OP_UPDATE_BRANCH: bs_set_exec = 1'b1;
        OP_END_BRANCH:    bs_pop      = 1'b1;
        OP_CALL:          ss_push     = 1'b1;
        OP_RETURN:        ss_pop      = 1'b1;
        default: ;
      endcase
    end
  end

  // --------------------------------------------------------- sequencing
  logic [LOOP_W-1:0] loop_dec;
  assign loop_dec = loop_cnt - 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_FETCH;
      pc        <= '0;
      ibuf      <= '0;
      rem       <= '0;
      cur_op    <= OP_ACTIVATE_ALL;
      loop_cnt  <= '0;
      target    <= '0;
      active    <= '1;
      inmode    <= '0;
      opmode    <= '0;
      alumode   <= '0;
      imm       <= '0;
      a_addr    <= '0;
      b_addr    <= '0;
      ram_ofs   <= '0;
      cmp_set   <= '0;
      alu_wr    <= 1'b0;
      in_sel    <= SW'(SEL_ALU);
      a_sel     <= 1'b0;
      b_sel     <= 1'b0;
      reg_wr    <= 1'b0;
      push      <= 1'b0;
      pop       <= 1'b0;
      cmp_flag  <= FLAG_NONE;
      cmp_reset <= 1'b0;
      sync      <= '0;
    end else begin
      // one-cycle strobes and per-instruction selectors return to default
      alu_wr    <= 1'b0;
      in_sel    <= SW'(SEL_ALU);
      a_sel     <= 1'b0;
      b_sel     <= 1'b0;
      reg_wr    <= 1'b0;
      push      <= 1'b0;
      pop       <= 1'b0;
      cmp_flag  <= FLAG_NONE;
      cmp_reset <= 1'b0;
      sync      <= '0;

      unique case (state)
        ST_FETCH, ST_CONT: begin
          pc   <= pc + 1'b1;
          ibuf <= ibuf_nxt;
          rem  <= rem_nxt;
          if (state == ST_FETCH) cur_op <= first_op;
          state <= done ? ST_FETCH : ST_CONT;
          if (done) begin
            unique case (dec_op)
              OP_ACTIVATE_ALL:   active <= '1;
              OP_ACTIVATE_CORES: active <= ib[N_CORES-1:0];
              OP_LOAD_OP: begin
                inmode  <= ib[ALUMODE_W+OPMODE_W +: INMODE_W];
                opmode  <= ib[ALUMODE_W +: OPMODE_W];
                alumode <= ib[0 +: ALUMODE_W];
              end
              OP_LOAD_OPMODE:    opmode <= ib[0 +: OPMODE_W];
              OP_EXEC_OP: begin
                a_addr <= ib[RW +: RW];
                b_addr <= ib[0 +: RW];
                alu_wr <= 1'b1;
              end
              OP_EXEC_LOOP_OFS, OP_EXEC_STACK: begin
                a_addr  <= ib[RAW +: RW];
                in_sel  <= SW'(SEL_RAM);
                b_sel   <= 1'b1;
                alu_wr  <= 1'b1;
                ram_ofs <= (dec_op == OP_EXEC_LOOP_OFS)
                           ? RAW'(ib[0 +: RAW] + RAW'(loop_cnt)) : ib[0 +: RAW];
              end
              OP_LOAD_IN: begin
                a_addr <= ib[SW +: RW];
                in_sel <= ib[0 +: SW];
                reg_wr <= 1'b1;
              end
              OP_LOAD_IN_SYNC: begin
                a_addr <= ib[YW+SW +: RW];
                in_sel <= ib[YW +: SW];
                reg_wr <= 1'b1;
                sync   <= SYNC_BITS'(1) << ib[0 +: YW];
              end
              OP_LOAD_IMM: begin
                a_addr <= ib[W +: RW];
                imm    <= ib[0 +: W];
                in_sel <= SW'(SEL_IMM);
                reg_wr <= 1'b1;
              end
              OP_SAVE_TO_REG: begin
                a_addr <= ib[0 +: RW];
                reg_wr <= 1'b1;
              end
              OP_PUSH: begin
                b_addr <= ib[0 +: RW];
                in_sel <= SW'(SEL_REGB);
                push   <= 1'b1;
              end
              OP_POP: begin
                a_addr  <= ib[0 +: RW];
                in_sel  <= SW'(SEL_RAM);
                ram_ofs <= RAW'(1);
                reg_wr  <= 1'b1;
                pop     <= 1'b1;
              end
              OP_BEGIN_LOOP:  loop_cnt <= ib[0 +: LOOP_W];
              OP_LOOP: begin
                loop_cnt <= loop_dec;
                target   <= ib[0 +: PW];
                if (loop_dec != '0) state <= ST_JUMP;
              end
              OP_SYNC_SIGNAL: sync <= SYNC_BITS'(1) << ib[0 +: YW];
              OP_NEW_BRANCH:  cmp_reset <= 1'b1;
              OP_COMPARE: begin
                cmp_set  <= ib[FLAG_W +: CMPSET_W];
                cmp_flag <= ib[0 +: FLAG_W];
              end
              OP_BRANCH: begin
                target <= ib[0 +: PW];
                state  <= ST_BRANCH;
              end
              OP_UPDATE_BRANCH: begin
                target <= ib[0 +: PW];
                if (exec_now == bs_top_before) state <= ST_JUMP;
                else active <= bs_top_before & ~exec_now;
              end
              OP_END_BRANCH: active <= bs_top_before;
              OP_JUMP_ADDR, OP_CALL: begin
                target <= ib[0 +: PW];
                state  <= ST_JUMP;
              end
              OP_RETURN: begin
                target <= ss_top;
                state  <= ST_JUMP;
              end
              default: ;
            endcase
          end
        end
        ST_JUMP: begin
          pc    <= target;
          state <= ST_FETCH;
        end
        ST_BRANCH: begin
          cmp_reset <= 1'b1;
          if (&jump_ok) pc <= target;
          else          active <= active & ~jump_ok;
          state <= ST_FETCH;
        end
        default: state <= ST_FETCH;
      endcase
    end
  end
endmodule
