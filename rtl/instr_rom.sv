// instr_rom: program memory of the streaming multiprocessor.
//
// DEPTH words of W bits (the instruction width), filled from a hex file at
// elaboration; locations the file does not cover read as zero. The read is
// asynchronous, as in the distributed-ROM mapping of the original, so the
// control unit sees the word at `addr` in the same cycle.
//
// Ports: addr (AW bits) in, data (W bits) out; no clock.
// The original also loads its program from a file produced by its
// assembler; depth and file name are this design's choice (64 words hold
// the 51-word classifier program). The file path is relative to the
// directory the simulator or synthesis tool is started from. FPGA tools
// and simulators honour the $readmemh initialisation; a synthesis front end
// that ignores initial blocks will see an empty ROM with constant outputs.
module instr_rom #(
  parameter int unsigned W         = 12,
  parameter int unsigned DEPTH     = 64,
  parameter string       INIT_FILE = "rtl/fcnn_prog_base.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  data
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];
endmodule
