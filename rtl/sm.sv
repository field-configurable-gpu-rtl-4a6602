// sm: the streaming multiprocessor, a single-warp SIMT processor.
//
// One instruction ROM and one control unit drive N_CORES identical cores in
// lockstep: all cores see the same decoded control word, the control unit's
// active-core mask switches individual cores off during divergent branches,
// and each core reports whether it agrees to take a branch. Each core has
// N_INPUTS external data inputs and brings out its N_OUT output registers;
// SYNC_BITS one-cycle pulses, raised by sync instructions, let external
// blocks follow the program (e.g. advance an input selector).
//
// The defaults are those of the FCNN example: 20 cores, 12-bit
// instructions, 16-bit data, 3 registers of which 2 are outputs, 512-word
// RAM per core, 2 inputs, 3 sync bits. ROM depth, loop counter width, stack
// depths and the initial stack pointer are this design's choice (424 places
// the FCNN weights as the example's RAM layout requires).
// The RAM load port writes one word into one core's RAM before a program
// runs; it replaces loading the RAM contents from a file.
//
// Timing: see control_unit; an instruction's effects in the cores happen
// in the cycle after its last ROM word was read.
module sm
  import gpu_pkg::*;
#(
  parameter int unsigned N_CORES      = 20,
  parameter int unsigned INSTR_W      = 12,
  parameter int unsigned W            = 16,
  parameter int unsigned N_REGS       = 3,
  parameter int unsigned N_OUT        = 2,
  parameter int unsigned RAM_DEPTH    = 512,
  parameter int unsigned SP_INIT      = 424,
  parameter int unsigned N_INPUTS     = 2,
  parameter int unsigned ROM_DEPTH    = 64,
  parameter int unsigned LOOP_W       = 9,
  parameter int unsigned SYNC_BITS    = 3,
  parameter int unsigned BRANCH_DEPTH = 4,
  parameter int unsigned SUB_DEPTH    = 4,
  parameter int unsigned SHIFT        = 8,
  parameter string       ROM_FILE     = "rtl/fcnn_prog_base.hex",
  localparam int unsigned RAW = $clog2(RAM_DEPTH),
  localparam int unsigned CW  = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int unsigned PW  = $clog2(ROM_DEPTH)
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [N_INPUTS-1:0][W-1:0]           inputs,
  output logic [N_CORES-1:0][N_OUT-1:0][W-1:0] outputs,
  output logic [SYNC_BITS-1:0]                 sync,
  output logic [N_CORES-1:0]                   active,
  output logic [PW-1:0]                        pc,
  output logic                                 branch_empty,
  // RAM load port
  input  logic                                 ld_en,
  input  logic [CW-1:0]                        ld_core,
  input  logic [RAW-1:0]                       ld_addr,
  input  logic [W-1:0]                         ld_data
);
  localparam int unsigned RW = (N_REGS > 1) ? $clog2(N_REGS) : 1;
  localparam int unsigned SW = $clog2(SEL_INPUT + N_INPUTS);

  logic [PW-1:0]        rom_addr;
  logic [INSTR_W-1:0]   rom_data;
  logic [N_CORES-1:0]   jump_ok;
  logic [INMODE_W-1:0]  inmode;
  logic [OPMODE_W-1:0]  opmode;
  logic [ALUMODE_W-1:0] alumode;
  logic                 alu_wr, a_sel, b_sel, reg_wr, push, pop, cmp_reset;
  logic [W-1:0]         imm;
  logic [SW-1:0]        in_sel;
  logic [RW-1:0]        a_addr, b_addr;
  logic [RAW-1:0]       ram_ofs;
  logic [FLAG_W-1:0]    cmp_flag;
  logic [CMPSET_W-1:0]  cmp_set;

  instr_rom #(.W(INSTR_W), .DEPTH(ROM_DEPTH), .INIT_FILE(ROM_FILE)) u_rom (
    .addr(rom_addr), .data(rom_data)
  );

  control_unit #(
    .N_CORES(N_CORES), .INSTR_W(INSTR_W), .W(W), .N_REGS(N_REGS),
    .RAM_DEPTH(RAM_DEPTH), .N_INPUTS(N_INPUTS), .ROM_DEPTH(ROM_DEPTH),
    .LOOP_W(LOOP_W), .SYNC_BITS(SYNC_BITS), .BRANCH_DEPTH(BRANCH_DEPTH),
    .SUB_DEPTH(SUB_DEPTH)
  ) u_cu (
    .clk(clk), .rst(rst), .rom_addr(rom_addr), .rom_data(rom_data),
    .jump_ok(jump_ok), .active(active),
    .inmode(inmode), .opmode(opmode), .alumode(alumode), .alu_wr(alu_wr),
    .imm(imm), .in_sel(in_sel), .a_sel(a_sel), .b_sel(b_sel),
    .a_addr(a_addr), .b_addr(b_addr), .reg_wr(reg_wr), .ram_ofs(ram_ofs),
    .push(push), .pop(pop), .cmp_flag(cmp_flag), .cmp_set(cmp_set),
    .cmp_reset(cmp_reset), .sync(sync), .pc(pc), .branch_empty(branch_empty)
  );

  for (genvar i = 0; i < int'(N_CORES); i++) begin : g_core
    core #(
      .W(W), .N_REGS(N_REGS), .N_OUT(N_OUT), .RAM_DEPTH(RAM_DEPTH),
      .SP_INIT(SP_INIT), .N_INPUTS(N_INPUTS), .SHIFT(SHIFT)
    ) u_core (
      .clk(clk), .rst(rst), .active(active[i]),
      .inmode(inmode), .opmode(opmode), .alumode(alumode), .alu_wr(alu_wr),
      .imm(imm), .in_sel(in_sel), .a_sel(a_sel), .b_sel(b_sel),
      .a_addr(a_addr), .b_addr(b_addr), .reg_wr(reg_wr), .ram_ofs(ram_ofs),
      .push(push), .pop(pop), .cmp_flag(cmp_flag), .cmp_set(cmp_set),
      .cmp_reset(cmp_reset),
      .inputs(inputs), .outputs(outputs[i]), .jump_ok(jump_ok[i]),
      .ld_en(ld_en && ld_core == CW'(i)), .ld_addr(ld_addr), .ld_data(ld_data)
    );
  end
endmodule
