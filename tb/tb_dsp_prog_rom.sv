`timescale 1ns/1ps
// tb_dsp_prog_rom: self-checking test of the program ROM.
//
// Reads every address of the default program image and compares it with
// the image file read here; addresses past the end of the file must read
// as zero (NOP).  The read is asynchronous: data is checked 1 ns after the
// address changes.
module tb_dsp_prog_rom;
  import dsp_pkg::*;

  paddr_t addr;
  instr_t data;
  instr_t image [1024];
  int checks = 0, failures = 0, last = -1;

  dsp_prog_rom dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) image[i] = '0;
    $readmemh("rtl/dsp_prog_autocorr.hex", image);
    for (int i = 0; i < 1024; i++) if (image[i] != 0) last = i;
    checks++;
    if (last < 10) begin failures++; $display("image too short"); end
    for (int i = 0; i < 1024; i++) begin
      addr = paddr_t'(i);
      #1;
      checks++;
      if (data !== image[i]) begin
        failures++;
        $display("address %0d: got %h expected %h", i, data, image[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
