`timescale 1ns/1ps
// tb_vbr_coder: end-to-end test of the coder hardware with every parameter
// at its default.
//
// Two things run at the same time, as they would in the device.  (1) The
// spectral analysis front end: a host sends one 240-sample frame through
// the DSP's 8-bit host port; the DSP high-pass filters it (biquad, its
// coefficients read through a modulo-5 pointer), windows it with the
// Hamming window in its Y ROM and returns autocorrelation lags 0..10 and
// the first reflection coefficient k1 = -r1/r0.  These are compared with
// values computed here with the program's arithmetic (halved Q15 filter
// coefficients, sum doubled and rounded, rounded Q15 window products,
// 40-bit sums, arithmetic shift right by 8, high word limited, truncated
// quotient).
// The time between two transmitted lags is checked against the program's
// instruction count (one instruction per clock, loops and jumps free).
// (2) The storage path: 200 frames of 30 ms with a voice activity pattern
// of speech bursts and silence runs of 1 to 40 frames are recorded through
// the bit stream writer into a storage memory model, the recording ends
// with a flush, and the stored words are then played back through the bit
// stream reader.  Every decoded frame is compared with what was recorded:
// regular frames bit for bit, SID frames in their averaged parameters and
// in the number of 30 ms frames they stand for; the decoded frames must
// add up to the 200 recorded frames.  The bit count of the storage is
// checked against the frame sizes (138 and 47 bits).
//
// The testbench counts each mechanism and fails if one never happened:
// host receive and transmit polling, hardware loop returns, nested loops,
// division steps,
// SID frames closed by speech, by the 16-frame limit and by the flush,
// padding of the last word, and the writer holding off the next frame
// while it is still storing bits.
module tb_vbr_coder;
  import dsp_pkg::*;
  import vbr_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [1:0]  host_addr;
  logic        host_wr, host_rd;
  logic [7:0]  host_wdata, host_rdata;
  logic        dsp_halted, dsp_loop_err;
  logic [9:0]  dsp_prog_addr;
  logic [39:0] dsp_acc_a, dsp_acc_b;
  logic                frame_valid, frame_ready, frame_flush, frame_vad;
  reg_frame_t          frame_e_par;
  logic [LSP_BITS-1:0] frame_av_lsp;
  logic [SCG_BITS-1:0] frame_av_scg;
  logic [4:0]          silent_run;
  logic                store_valid;
  logic [SW-1:0]       store_word;
  logic                load_valid, load_ready;
  logic [SW-1:0]       load_word;
  logic                dec_valid, dec_is_sid;
  reg_frame_t          dec_e_par;
  logic [LSP_BITS-1:0] dec_av_lsp;
  logic [SCG_BITS-1:0] dec_av_scg;
  logic [4:0]          dec_sid_frames;

  int checks = 0, failures = 0;
  int cycle = 0;

  vbr_coder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #3_000_000;  // 300,000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counters
  int n_div = 0, n_rx_poll = 0, n_tx_poll = 0, n_loop_back = 0, n_nested = 0, n_instr = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dsp.u_cu.exec) n_instr++;
    if (dut.u_dsp.u_cu.jump && dut.u_dsp.u_cu.ir[13:10] == CC_RXE) n_rx_poll++;
    if (dut.u_dsp.u_cu.jump && dut.u_dsp.u_cu.ir[13:10] == CC_TXF) n_tx_poll++;
    if (dut.u_dsp.u_cu.loop_back) n_loop_back++;
    if (dut.u_dsp.u_cu.exec && dut.u_dsp.u_cu.ctrl.alu_op == OP_DIV) n_div++;
    if (dut.u_dsp.u_cu.do_start && dut.u_dsp.u_cu.active) n_nested++;
  end

  // cycle of each transmit push
  int push_cycle [11];
  int n_push = 0;
  always @(posedge clk) if (rst_n && dut.u_dsp.u_cu.exec && dut.u_dsp.u_cu.ctrl.gmv
                            && dut.u_dsp.u_cu.ctrl.g_dst == G_HOST) begin
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

  // ================================================= storage path
  localparam int N_FRAMES = 200;

  typedef struct {
    bit                  sid;
    reg_frame_t          e_par;
    logic [LSP_BITS-1:0] lsp;
    logic [SCG_BITS-1:0] scg;
    int                  len;
  } frame_rec_t;

  frame_rec_t exp_frames [$];
  logic [SW-1:0] storage [$];
  int n_reg = 0, n_sid_resume = 0, n_sid_cut = 0, n_sid_flush = 0;
  int n_stall = 0, n_pad_bits = 0, stored_bits = 0;

  always @(posedge clk) if (rst_n && store_valid) storage.push_back(store_word);

  task automatic expect_sid(int len);
    frame_rec_t r;
    r.sid = 1; r.e_par = '0; r.lsp = frame_av_lsp; r.scg = frame_av_scg; r.len = len;
    exp_frames.push_back(r);
    stored_bits += SID_BITS;
  endtask

  task automatic offer_frame();
    // ready only changes at a rising edge: check it between edges
    @(negedge clk);
    while (!frame_ready) begin n_stall++; @(negedge clk); end
    frame_valid = 1'b1;
    @(negedge clk);
    frame_valid = 1'b0;
  endtask

  task automatic record();
    int run = 0, left = 0;
    bit cur_vad = 1'b1;
    frame_rec_t r;
    for (int f = 0; f < N_FRAMES; f++) begin
      // a burst of speech, then silence; the first silence is 20 frames
      if (left == 0) begin
        cur_vad = !cur_vad;
        left = cur_vad ? $urandom_range(1, 5) : (f < 10 ? 20 : $urandom_range(1, 40));
      end
      left--;
      if (f >= N_FRAMES - 3) cur_vad = 1'b0;   // the recording ends in silence
      frame_vad = cur_vad;
      for (int i = 0; i < REG_BITS; i += 32) frame_e_par[i +: 32] = $urandom;
      if (frame_e_par[REG_BITS-1 -: MARK_BITS] == SID_MARK) frame_e_par[REG_BITS-2] = 1'b0;
      frame_av_lsp = {$urandom, $urandom};
      frame_av_scg = 5'($urandom);
      if (cur_vad) begin
        if (run > 0) begin expect_sid(run); n_sid_resume++; end
        r.sid = 0; r.e_par = frame_e_par; r.lsp = '0; r.scg = '0; r.len = 1;
        exp_frames.push_back(r);
        stored_bits += REG_BITS;
        n_reg++;
        run = 0;
      end else begin
        run++;
        if (run == MAX_RUN) begin expect_sid(run); n_sid_cut++; run = 0; end
      end
      // a new frame every few cycles: faster than the writer stores bits
      repeat ($urandom_range(0, 3)) @(negedge clk);
      offer_frame();
      checks++;
      if (silent_run != 5'(run)) begin
        failures++; $display("frame %0d: silent run %0d expected %0d", f, silent_run, run);
      end
    end
    // end of recording: the open silence run becomes a SID frame, then pad
    frame_av_lsp = {$urandom, $urandom};
    frame_av_scg = 5'($urandom);
    if (run > 0) begin expect_sid(run); n_sid_flush++; end
    frame_flush = 1'b1;
    offer_frame();
    frame_flush = 1'b0;
    while (!frame_ready) @(negedge clk);
    repeat (3) @(negedge clk);
    n_pad_bits = storage.size() * SW - stored_bits;
    checks++;
    if (n_pad_bits < 0 || n_pad_bits >= SW) begin
      failures++;
      $display("%0d words stored for %0d bits", storage.size(), stored_bits);
    end
  endtask

  int n_dec = 0, n_dec_frames = 0;
  always @(posedge clk) if (rst_n && dec_valid) begin
    frame_rec_t e;
    checks++;
    if (n_dec >= exp_frames.size()) begin
      failures++; $display("extra decoded frame %0d", n_dec);
    end else begin
      e = exp_frames[n_dec];
      n_dec_frames += dec_is_sid ? int'(dec_sid_frames) : 1;
      if (dec_is_sid !== e.sid ||
          (!e.sid && dec_e_par !== e.e_par) ||
          (e.sid && (dec_av_lsp !== e.lsp || dec_av_scg !== e.scg ||
                     int'(dec_sid_frames) != e.len))) begin
        failures++;
        if (failures < 10)
          $display("decoded frame %0d: sid %0d/%0d len %0d/%0d", n_dec, dec_is_sid, e.sid,
                   dec_sid_frames, e.len);
      end
    end
    n_dec++;
  end

  task automatic play_back();
    foreach (storage[i]) begin
      @(negedge clk);
      while (!load_ready) @(negedge clk);
      load_word  = storage[i];
      load_valid = 1'b1;
      @(negedge clk);
      load_valid = 1'b0;
    end
    repeat (40) @(negedge clk);
    checks++;
    if (n_dec != exp_frames.size()) begin
      failures++; $display("%0d frames decoded, %0d stored", n_dec, exp_frames.size());
    end
    checks++;
    if (n_dec_frames != N_FRAMES) begin
      failures++; $display("decoded frames stand for %0d frames, %0d recorded", n_dec_frames, N_FRAMES);
    end
  endtask

  // ================================================= spectral analysis
  task automatic analyse();
    logic [15:0] got;
    logic [7:0]  st;
    repeat (20) @(negedge clk);   // slow start: the DSP polls the receive flag
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
    do host_read(2'd2, st, 1'b0); while (st == 0 && cycle < 100000);
    checks++;
    if (st !== 8'h01) begin failures++; $display("status %h", st); end
    repeat (5) @(negedge clk);
    checks++;
    if (!dsp_halted) begin failures++; $display("DSP did not halt"); end
    checks++;
    if (dsp_loop_err) begin failures++; $display("loop stack overflow"); end
    for (int k = 0; k < 10; k++)
      if (k != 5) begin
        checks++;
        if (push_cycle[k+1] - push_cycle[k] != 256 - k) begin
          failures++;
          $display("lag %0d interval %0d expected %0d", k + 1,
                   push_cycle[k+1] - push_cycle[k], 256 - k);
        end
      end
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("never happened: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) yrom[i] = '0;
    $readmemh("rtl/dsp_yrom_tables.hex", yrom);
    for (int i = 0; i < 120; i++) win[i] = yrom[i];
    for (int n = 0; n < 240; n++) smp[n] = 16'($signed($urandom_range(0, 16'h5FFF)) - 16'sh3000);
    reference();
    host_addr = 0; host_wr = 0; host_rd = 0; host_wdata = 0;
    frame_valid = 0; frame_flush = 0; frame_vad = 0; frame_e_par = '0;
    frame_av_lsp = '0; frame_av_scg = '0; load_valid = 0; load_word = '0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      analyse();
      begin record(); play_back(); end
    join
    need(n_rx_poll, "receive polling");
    need(n_tx_poll, "transmit polling");
    need(n_loop_back, "loop return");
    need(n_nested, "nested loop");
    need(n_div == 16 ? 1 : 0, "16 division steps");
    need(n_push == 12 ? 1 : 0, "12 words sent");
    need(n_reg, "regular frame");
    need(n_sid_resume, "SID frame closed by speech");
    need(n_sid_cut, "SID frame closed by the 16-frame limit");
    need(n_sid_flush, "SID frame closed by the end of recording");
    need(n_pad_bits, "padding of the last word");
    need(n_stall, "writer holding off a frame");
    $display("instructions=%0d rx_polls=%0d tx_polls=%0d loop_returns=%0d nested_do=%0d div_steps=%0d",
             n_instr, n_rx_poll, n_tx_poll, n_loop_back, n_nested, n_div);
    $display("regular=%0d sid_resume=%0d sid_at_16=%0d sid_flush=%0d words=%0d pad_bits=%0d stalls=%0d decoded=%0d",
             n_reg, n_sid_resume, n_sid_cut, n_sid_flush, storage.size(), n_pad_bits, n_stall, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
