// gpu_pkg: constants and types shared by the streaming multiprocessor.
//
// The instruction set is the one used by the FCNN example programs: each
// instruction is a 5-bit opcode followed by its operands, most significant
// bit first. The operand widths follow the configuration parameters of the
// SM (register count, RAM depth, ROM depth, ...) and are therefore computed
// inside the control unit, not here. The opcode numbers themselves are this
// design's own assignment; only the mnemonics and their operands come from
// the original description.
package gpu_pkg;

  localparam int unsigned OPC_W     = 5;  // 20+ instructions -> 5 bits
  localparam int unsigned INMODE_W  = 5;  // DSP48E1 INMODE
  localparam int unsigned OPMODE_W  = 7;  // DSP48E1 OPMODE, Z[6:4] Y[3:2] X[1:0]
  localparam int unsigned ALUMODE_W = 4;  // DSP48E1 ALUMODE
  localparam int unsigned CMPSET_W  = 2;  // compare settings: [1] negate, [0] OR
  localparam int unsigned FLAG_W    = 2;  // compare flag code

  typedef enum logic [OPC_W-1:0] {
    OP_ACTIVATE_ALL    = 5'd0,   // -
    OP_ACTIVATE_CORES  = 5'd1,   // mask[N_CORES]
    OP_LOAD_OP         = 5'd2,   // inmode, opmode, alumode
    OP_LOAD_OPMODE     = 5'd3,   // opmode
    OP_EXEC_OP         = 5'd4,   // regA, regB
    OP_EXEC_LOOP_OFS   = 5'd5,   // regA, ram offset   (B = RAM[sp-(loop+ofs)])
    OP_EXEC_STACK      = 5'd6,   // regA, ram offset   (B = RAM[sp-ofs])
    OP_LOAD_IN         = 5'd7,   // regA, data selector
    OP_LOAD_IMM        = 5'd8,   // regA, immediate
    OP_SAVE_TO_REG     = 5'd9,   // regA                (regA <= ALU output)
    OP_PUSH            = 5'd10,  // reg
    OP_POP             = 5'd11,  // reg
    OP_BEGIN_LOOP      = 5'd12,  // count
    OP_LOOP            = 5'd13,  // program address
    OP_SYNC_SIGNAL     = 5'd14,  // sync bit index
    OP_LOAD_IN_SYNC    = 5'd15,  // regA, data selector, sync bit index
    OP_NEW_BRANCH      = 5'd16,  // -
    OP_COMPARE         = 5'd17,  // settings, flag
    OP_BRANCH          = 5'd18,  // program address
    OP_UPDATE_BRANCH   = 5'd19,  // program address
    OP_END_BRANCH      = 5'd20,  // -
    OP_JUMP_ADDR       = 5'd21,  // program address
    OP_CALL            = 5'd22,  // program address
    OP_RETURN          = 5'd23   // -
  } opcode_e;

  // Data bus (input multiplexer) sources; inputs follow from code 4 on.
  localparam int unsigned SEL_ALU   = 0;
  localparam int unsigned SEL_RAM   = 1;
  localparam int unsigned SEL_REGB  = 2;
  localparam int unsigned SEL_IMM   = 3;
  localparam int unsigned SEL_INPUT = 4;

  // Flag codes of the compare instruction; 0 means "no compare".
  localparam logic [FLAG_W-1:0] FLAG_NONE     = 2'd0;
  localparam logic [FLAG_W-1:0] FLAG_ZERO     = 2'd1;
  localparam logic [FLAG_W-1:0] FLAG_NEGATIVE = 2'd2;

  // ALU flags produced by the comparator.
  typedef struct packed {
    logic negative;
    logic zero;
  } alu_flags_t;

  // Decoder states. FETCH reads the first word of an instruction, CONT the
  // following words, JUMP loads the program counter, BRANCH resolves a
  // branch once the cores' conditional registers hold the compare result.
  typedef enum logic [1:0] {
    ST_FETCH  = 2'd0,
    ST_CONT   = 2'd1,
    ST_JUMP   = 2'd2,
    ST_BRANCH = 2'd3
  } cu_state_e;

endpackage
