`timescale 1ns/1ps
// tb_dsp_mem: self-checking test of one data memory space.
//
// Writes random words to random RAM addresses and keeps a copy here; reads
// back (asynchronous read, value visible in the same cycle); checks that
// the ROM holds the image file (Hamming window and filter coefficients), that writes to
// ROM and above the ROM are ignored and that unmapped addresses read 0.
module tb_dsp_mem;
  import dsp_pkg::*;

  logic  clk = 1'b0;
  addr_t addr;
  logic  we;
  word_t wdata, rdata;

  int checks = 0, failures = 0;
  word_t shadow [256];
  logic [15:0] image [256];

  dsp_mem #(.ROM_FILE("rtl/dsp_yrom_tables.hex")) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) image[i] = '0;
    $readmemh("rtl/dsp_yrom_tables.hex", image);
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); addr = addr_t'(i); wdata = word_t'($urandom); we = 1;
      shadow[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = addr_t'($urandom_range(0, 255));
      we = $urandom_range(0, 1);
      wdata = word_t'($urandom);
      #1 check("RAM read", int'(rdata), int'(shadow[addr[7:0]]));
      if (we) shadow[addr[7:0]] = wdata;
    end
    // ROM: the image (zero beyond the file); writes ignored
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); addr = addr_t'(256 + i); we = 1; wdata = 16'hDEAD;
      @(negedge clk); we = 0;
      #1 check("ROM read", int'(rdata), int'(image[i]));
    end
    for (int i = 512; i < 1024; i += 37) begin
      @(negedge clk); addr = addr_t'(i); we = 1; wdata = 16'hBEEF;
      @(negedge clk); we = 0;
      #1 check("unmapped read", int'(rdata), 0);
    end
    // RAM contents unaffected by the ignored writes
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); addr = addr_t'(i);
      #1 check("RAM keep", int'(rdata), int'(shadow[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
