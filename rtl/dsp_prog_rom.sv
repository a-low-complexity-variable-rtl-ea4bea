// dsp_prog_rom: program ROM of the controller unit.
//
// 1024 instructions of 24 bits (the document's program size and word
// width) with an asynchronous read, so the controller can fetch the next
// instruction during the cycle in which the current one executes.  The
// image is read from PROG_FILE (hex, one instruction per line, address 0
// first); words not in the file read as zero, which decodes as NOP.  The
// default image is the windowing, autocorrelation and first reflection
// coefficient program described in
// dsp_core.
module dsp_prog_rom
  import dsp_pkg::*;
#(
  parameter int    DEPTH     = 1024,
  parameter string PROG_FILE = "rtl/dsp_prog_autocorr.hex"
) (
  input  paddr_t addr,
  output instr_t data
);

  instr_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (PROG_FILE != "") $readmemh(PROG_FILE, mem);
  end

  assign data = (int'(addr) < DEPTH) ? mem[addr] : '0;

endmodule
