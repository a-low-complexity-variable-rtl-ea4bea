`timescale 1ns/1ps
// tb_dsp_core: end-to-end test of the DSP with its default program and
// default parameters.
//
// The host side sends one 240-sample frame (random values) through the
// 8-bit host port.  The DSP high-pass filters it, windows it with the
// Hamming window in its Y ROM and returns autocorrelation lags 0..10 and
// the first reflection coefficient k1 = -r1/r0 (Q15, from 16 division
// steps).  The testbench computes the same values on its own, from the
// ROM table file and the sample values, with the arithmetic the program
// uses (halved Q15 filter coefficients with the sum doubled and rounded,
// rounded Q15 window products, 40-bit accumulation, arithmetic shift right
// by 8, high word limited to 16 bits, k1 as the truncated quotient of the
// returned r1 and r0), and compares.  It also checks the cycle count
// between two transmitted lags (one instruction per clock, no loop or
// branch overhead) and counts how often each mechanism occurred: host
// receive polling, host transmit polling, hardware loop returns, nested
// loops, division steps, the DSP status register and the STOP instruction.
module tb_dsp_core;
  import dsp_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [1:0]  host_addr;
  logic        host_wr, host_rd;
  logic [7:0]  host_wdata, host_rdata;
  logic        halted, loop_err;
  logic [9:0]  prog_addr;
  logic [39:0] acc_a, acc_b;

  int checks = 0, failures = 0;
  int cycle = 0;

  dsp_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #2_000_000;  // 200,000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counters
  int n_div = 0, n_rx_poll = 0, n_tx_poll = 0, n_loop_back = 0, n_nested = 0, n_instr = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cu.exec) n_instr++;
    if (dut.u_cu.jump && dut.u_cu.ir[13:10] == CC_RXE) n_rx_poll++;
    if (dut.u_cu.jump && dut.u_cu.ir[13:10] == CC_TXF) n_tx_poll++;
    if (dut.u_cu.loop_back) n_loop_back++;
    if (dut.u_cu.exec && dut.u_cu.ctrl.alu_op == OP_DIV) n_div++;
    if (dut.u_cu.do_start && dut.u_cu.active) n_nested++;
  end

  // cycle of each transmit push
  int push_cycle [11];
  int n_push = 0;
  always @(posedge clk) if (rst_n && dut.u_cu.exec && dut.u_cu.ctrl.gmv
                            && dut.u_cu.ctrl.g_dst == G_HOST) begin
    if (n_push < 11) push_cycle[n_push] = cycle;
    n_push++;
  end

  // ------------------------------------------------------------ host tasks
  task automatic host_read(input logic [1:0] a, output logic [7:0] d, input bit strobe);
    @(negedge clk);
    host_addr = a; host_rd = strobe;
    #1 d = host_rdata;
    @(negedge clk);
    host_rd = 1'b0;
  endtask

  task automatic host_write(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk);
    host_addr = a; host_wdata = d; host_wr = 1'b1;
    @(negedge clk);
    host_wr = 1'b0;
  endtask

  task automatic send_word(input logic [15:0] w);
    logic [7:0] f;
    do host_read(2'd3, f, 1'b0); while (f[0]);
    host_write(2'd0, w[7:0]);
    host_write(2'd1, w[15:8]);
  endtask

  task automatic recv_word(output logic [15:0] w);
    logic [7:0] f, lo, hi;
    do host_read(2'd3, f, 1'b0); while (!f[1]);
    host_read(2'd0, lo, 1'b0);
    host_read(2'd1, hi, 1'b1);
    w = {hi, lo};
  endtask

  // ---------------------------------------------------------- reference
  logic [15:0] yrom [256];
  logic [15:0] win [120];
  logic signed [15:0] hp [240];
  logic signed [15:0] smp [240];
  logic signed [15:0] wsm [240];
  logic [15:0] expect_r [11];
  logic [15:0] expect_k1;
  int q;

  function automatic logic signed [15:0] mpyr(logic signed [15:0] a, logic signed [15:0] b);
    logic signed [39:0] p;
    p = 40'(a * b) <<< 1;
    p = p + 40'sh8000;
    return p[31:16];
  endfunction

  function automatic logic signed [15:0] limit(logic signed [39:0] a);
    if (a[39:31] != {9{a[31]}}) return a[39] ? 16'sh8000 : 16'sh7FFF;
    return a[31:16];
  endfunction

  task automatic reference();
    logic signed [39:0] s;
    logic signed [39:0] acc;
    logic signed [15:0] x1, x2, y1, y2;
    // high-pass biquad with halved Q15 coefficients, sum doubled, rounded
    x1 = 0; x2 = 0; y1 = 0; y2 = 0;
    for (int n = 0; n < 240; n++) begin
      acc = (40'($signed(smp[n]) * $signed(yrom[128])) <<< 1)
          + (40'(x1 * $signed(yrom[129])) <<< 1)
          + (40'(x2 * $signed(yrom[130])) <<< 1)
          + (40'(y1 * $signed(yrom[131])) <<< 1)
          + (40'(y2 * $signed(yrom[132])) <<< 1);
      acc = acc <<< 1;
      acc = acc + 40'sh8000;
      acc[15:0] = '0;
      hp[n] = limit(acc);
      x2 = x1; x1 = smp[n]; y2 = y1; y1 = hp[n];
    end
    for (int n = 0; n < 240; n++)
      wsm[n] = mpyr(hp[n], (n < 120) ? win[n] : win[239 - n]);
    for (int k = 0; k <= 10; k++) begin
      s = 0;
      for (int n = k; n < 240; n++) s = s + (40'(wsm[n] * wsm[n-k]) <<< 1);
      s = s >>> 8;
      if (s[39:31] != {9{s[31]}}) expect_r[k] = s[39] ? 16'h8000 : 16'h7FFF;
      else                        expect_r[k] = s[31:16];
    end
    // first reflection coefficient, Q15: -r1/r0 truncated toward zero
    q = (int'($signed(expect_r[1])) < 0 ? -int'($signed(expect_r[1])) : int'($signed(expect_r[1])))
        * 32768 / int'($signed(expect_r[0]));
    expect_k1 = 16'(int'($signed(expect_r[1])) > 0 ? -q : q);
  endtask

  logic [15:0] got;
  logic [7:0]  st;

  initial begin
    for (int i = 0; i < 256; i++) yrom[i] = '0;
    $readmemh("rtl/dsp_yrom_tables.hex", yrom);
    for (int i = 0; i < 120; i++) win[i] = yrom[i];
    for (int n = 0; n < 240; n++) smp[n] = 16'($signed($urandom_range(0, 16'h5FFF)) - 16'sh3000);
    reference();
    host_addr = 0; host_wr = 0; host_rd = 0; host_wdata = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // slow start so the DSP has to poll the receive flag
    repeat (20) @(negedge clk);
    for (int n = 0; n < 240; n++) send_word(smp[n]);
    for (int k = 0; k <= 10; k++) begin
      // hold lag 5 back so that the DSP has to wait to send lag 6
      if (k == 5) repeat (1000) @(negedge clk);
      recv_word(got);
      checks++;
      if (got !== expect_r[k]) begin
        failures++;
        $display("lag %0d: got %h expected %h", k, got, expect_r[k]);
      end
    end
    // then the first reflection coefficient
    recv_word(got);
    checks++;
    if (got !== expect_k1) begin
      failures++;
      $display("k1: got %h expected %h (r0 %h r1 %h)", got, expect_k1, expect_r[0], expect_r[1]);
    end
    // status register written to 1, then STOP
    do host_read(2'd2, st, 1'b0); while (st == 0 && cycle < 100000);
    checks++;
    if (st !== 8'h01) begin failures++; $display("status %h", st); end
    repeat (5) @(negedge clk);
    checks++;
    if (!halted) begin failures++; $display("DSP did not halt"); end
    checks++;
    if (loop_err) begin failures++; $display("loop stack overflow"); end
    // one instruction per clock: lag k+1 goes out 256-k cycles after lag k
    // (except lag 6, which waits for the host to take lag 5)
    for (int k = 0; k < 10; k++)
      if (k != 5) begin
        checks++;
        if (push_cycle[k+1] - push_cycle[k] != 256 - k) begin
          failures++;
          $display("lag %0d interval %0d expected %0d", k + 1,
                   push_cycle[k+1] - push_cycle[k], 256 - k);
        end
      end
    // every mechanism must have occurred
    checks++; if (n_rx_poll == 0)   begin failures++; $display("no receive polling"); end
    checks++; if (n_tx_poll == 0)   begin failures++; $display("no transmit polling"); end
    checks++; if (n_loop_back == 0) begin failures++; $display("no loop return"); end
    checks++; if (n_nested == 0)    begin failures++; $display("no nested loop"); end
    checks++; if (n_div != 16)      begin failures++; $display("%0d division steps", n_div); end
    checks++; if (n_push != 12)     begin failures++; $display("%0d words sent", n_push); end
    $display("r0=%h r1=%h k1=%h", expect_r[0], expect_r[1], expect_k1);
    $display("instructions=%0d rx_polls=%0d tx_polls=%0d loop_returns=%0d nested_do=%0d div_steps=%0d",
             n_instr, n_rx_poll, n_tx_poll, n_loop_back, n_nested, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
