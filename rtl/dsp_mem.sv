// dsp_mem: one data memory space of the DSP (used twice, as X and Y memory).
//
// A space holds 256 words of RAM and 256 words of ROM, 16 bits wide, with an
// asynchronous (combinational) read, as the document gives.  The 10-bit
// address reaches 1024 words; the address map is this design's choice:
// RAM at 0x000-0x0FF, ROM at 0x100-0x1FF, nothing above (reads return 0,
// writes are ignored).  Writes to RAM take effect at the rising clock edge
// when we is high; writes to ROM are ignored.  The document says the ROMs
// hold the algorithm's fixed values (filter coefficients, window, LSP
// quantisation table, bandwidth expansion factors) but does not print them,
// so the ROM image is read from ROM_FILE (hex, one word per line, ROM
// address 0 first); with ROM_FILE empty the ROM reads as zero.
module dsp_mem
  import dsp_pkg::*;
#(
  parameter int    RAM_WORDS = 256,
  parameter int    ROM_WORDS = 256,
  parameter string ROM_FILE  = ""
) (
  input  logic  clk,
  input  addr_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata
);

  word_t ram [RAM_WORDS];
  word_t rom [ROM_WORDS];

  initial begin
    for (int i = 0; i < ROM_WORDS; i++) rom[i] = '0;
    if (ROM_FILE != "") $readmemh(ROM_FILE, rom);
  end

  localparam int RAW = (RAM_WORDS > 1) ? $clog2(RAM_WORDS) : 1;
  localparam int ROW = (ROM_WORDS > 1) ? $clog2(ROM_WORDS) : 1;

  logic [RAW-1:0] ram_idx;
  logic [ROW-1:0] rom_idx;
  addr_t          rom_off;
  assign ram_idx = addr[RAW-1:0];
  assign rom_off = addr - addr_t'(RAM_WORDS);
  assign rom_idx = rom_off[ROW-1:0];

  logic in_ram, in_rom;
  assign in_ram = int'(addr) < RAM_WORDS;
  assign in_rom = !in_ram && (int'(addr) < RAM_WORDS + ROM_WORDS);

  always_comb begin
    if (in_ram)      rdata = ram[ram_idx];
    else if (in_rom) rdata = rom[rom_idx];
    else             rdata = '0;
  end

  always_ff @(posedge clk) begin
    if (we && in_ram) ram[ram_idx] <= wdata;
  end

endmodule
