`timescale 1ns/1ps
// tb_dsp_host_if: self-checking test of the host interface.
//
// A PC-side process writes random 16-bit words as two bytes and reads
// words sent by a DSP-side process as two bytes, each side at random pace
// and respecting the flags.  Both streams are compared with what was sent.
// Then the guards are checked: a PC write while the receive word is full
// and a DSP write while the transmit word is full must be ignored; the
// status register and the flag register must read back.
module tb_dsp_host_if;
  import dsp_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] pc_addr;
  logic       pc_wr, pc_rd;
  logic [7:0] pc_wdata, pc_rdata;
  logic       rx_pop, tx_push, stat_we, stat_rd;
  word_t      dsp_wdata, dsp_rdata;
  logic       rx_full, tx_full;

  int checks = 0, failures = 0;

  dsp_host_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400_000;
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

  localparam int N = 300;
  word_t to_dsp [N], to_pc [N];
  int n_rx = 0, n_tx = 0;
  logic [7:0] lo, hi;

  // DSP side: takes received words and sends words, at random moments
  initial begin
    rx_pop = 0; tx_push = 0; stat_we = 0; stat_rd = 0; dsp_wdata = 0;
    wait (rst_n);
    while (n_rx < N || n_tx < N) begin
      @(negedge clk);
      rx_pop = 0; tx_push = 0;
      if (rx_full && n_rx < N && $urandom_range(0, 2) == 0) begin
        check("DSP receive", int'(dsp_rdata), int'(to_dsp[n_rx]));
        rx_pop = 1; n_rx++;
      end
      if (!tx_full && n_tx < N && $urandom_range(0, 2) == 0) begin
        dsp_wdata = to_pc[n_tx]; tx_push = 1; n_tx++;
      end
    end
    @(negedge clk); rx_pop = 0; tx_push = 0;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      to_dsp[i] = word_t'($urandom);
      to_pc[i]  = word_t'($urandom);
    end
    pc_addr = 0; pc_wr = 0; pc_rd = 0; pc_wdata = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      // PC sends
      for (int i = 0; i < N; i++) begin
        do begin @(negedge clk); pc_addr = 3; pc_wr = 0; #1; end while (pc_rdata[0]);
        @(negedge clk); pc_addr = 0; pc_wdata = to_dsp[i][7:0];  pc_wr = 1;
        @(negedge clk); pc_addr = 1; pc_wdata = to_dsp[i][15:8]; pc_wr = 1;
        @(negedge clk); pc_wr = 0; pc_addr = 3;
      end
    join_none
    // PC receives (shares the bus: wait until sending is done)
    wait (n_rx == N);
    repeat (3) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      do begin @(negedge clk); pc_addr = 3; pc_rd = 0; #1; end while (!pc_rdata[1]);
      @(negedge clk); pc_addr = 0; #1 lo = pc_rdata;
      @(negedge clk); pc_addr = 1; pc_rd = 1; #1 hi = pc_rdata;
      @(negedge clk); pc_rd = 0; pc_addr = 3;
      check("PC receive", int'({hi, lo}), int'(to_pc[i]));
    end
    wait (n_tx == N);
    repeat (3) @(negedge clk);

    // guards: overwrite attempts are ignored
    @(negedge clk); pc_addr = 0; pc_wdata = 8'h34; pc_wr = 1;
    @(negedge clk); pc_addr = 1; pc_wdata = 8'h12; pc_wr = 1;
    @(negedge clk); pc_addr = 1; pc_wdata = 8'hFF; pc_wr = 1;   // rx full now
    @(negedge clk); pc_addr = 0; pc_wdata = 8'hEE; pc_wr = 1;
    @(negedge clk); pc_wr = 0;
    #1 check("rx guard", int'(dsp_rdata), 'h1234);
    check("rx_full", int'(rx_full), 1);
    dsp_wdata = 16'hABCD; tx_push = 1;
    @(negedge clk); dsp_wdata = 16'h5555; tx_push = 1;           // tx full now
    @(negedge clk); tx_push = 0;
    pc_addr = 0; #1 lo = pc_rdata;
    pc_addr = 1; #1 hi = pc_rdata;
    check("tx guard", int'({hi, lo}), 'hABCD);
    pc_addr = 3; #1 check("flags", int'(pc_rdata), 3);
    // status register
    @(negedge clk); dsp_wdata = 16'h00A5; stat_we = 1;
    @(negedge clk); stat_we = 0; pc_addr = 2;
    #1 check("status", int'(pc_rdata), 'hA5);
    stat_rd = 1; #1 check("status DSP read", int'(dsp_rdata), 'hA5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
