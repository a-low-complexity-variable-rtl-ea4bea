// vbr_bitstream_writer: packs the coder's regular and SID frames into the
// continuous bit stream kept in storage memory.
//
// Once per 30 ms frame the coder presents the VAD flag and, for active
// speech, the 138-bit regular frame.  Frames with VAD=1 are stored as they
// are.  Frames with VAD=0 are only counted: a run of silent frames is
// stored as one 47-bit SID frame carrying the averaged LSP and stochastic
// codebook gain (AV_LSP, AV_SCG, supplied by the SID extraction) and the
// run length.  The SID frame is written when speech resumes, when the run
// reaches 16 frames, or on flush.  Frames are written back to back, most
// significant bit first, into 16-bit storage words; flush also pads the
// last partial word with zeros.  Frame formats, the 16-frame limit and the
// continuous stream follow the document; the word width, the bit order,
// the serial one-bit-per-clock packing and the handshake are this design's
// choices.
//
// Interface: frame_valid/frame_ready accept one frame (vad, e_par) or a
// flush request; av_lsp/av_scg are sampled when a frame ends a silence run.
// word_valid pulses for one cycle with each completed storage word.
// Timing: a frame takes one cycle per stored bit (at most 185 cycles) plus
// one; frame_ready is low meanwhile.  Synchronous active-low reset.
module vbr_bitstream_writer
  import vbr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_valid,
  output logic                frame_ready,
  input  logic                flush,      // with frame_valid: end of recording
  input  logic                vad,
  input  reg_frame_t          e_par,
  input  logic [LSP_BITS-1:0] av_lsp,
  input  logic [SCG_BITS-1:0] av_scg,
  output logic                word_valid,
  output logic [SW-1:0]       word,
  output logic [4:0]          run_len     // silent frames not yet stored
);

  localparam int PW = SID_BITS + REG_BITS;   // longest pending bit string

  logic [PW-1:0]          pend;     // pending bits, left aligned
  logic [$clog2(PW+1)-1:0] pend_n;
  logic [SW-1:0]          acc;
  logic [$clog2(SW+1)-1:0] acc_n;
  logic                   pad;      // pad the partial word after pend empties
  logic [4:0]             run;

  // accepting decisions
  logic emit_sid, emit_reg, closes_run;
  assign frame_ready = (pend_n == '0) && !pad;
  always_comb begin
    closes_run = !flush && !vad && run == 5'(MAX_RUN - 1);
    emit_reg   = !flush && vad;
    emit_sid   = closes_run || ((run != 5'd0) && (flush || vad));
  end

  sid_frame_t sid;
  assign sid = '{mark: SID_MARK, av_lsp: av_lsp, av_scg: av_scg,
                 len_m1: closes_run ? 4'(run) : 4'(run - 5'd1)};

  assign run_len = run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend <= '0; pend_n <= '0; acc <= '0; acc_n <= '0;
      pad <= 1'b0; run <= '0;
      word_valid <= 1'b0; word <= '0;
    end else begin
      word_valid <= 1'b0;
      if (frame_valid && frame_ready) begin
        // the SID frame (if any) goes ahead of the regular frame
        if (emit_sid && emit_reg) begin
          pend   <= {sid, e_par};
          pend_n <= ($bits(pend_n))'(SID_BITS + REG_BITS);
        end else if (emit_sid) begin
          pend   <= {sid, {REG_BITS{1'b0}}};
          pend_n <= ($bits(pend_n))'(SID_BITS);
        end else if (emit_reg) begin
          pend   <= {e_par, {SID_BITS{1'b0}}};
          pend_n <= ($bits(pend_n))'(REG_BITS);
        end
        // a silent frame that completes a 16-frame run is part of that SID
        if (vad || flush || closes_run) run <= 5'd0;
        else                            run <= run + 5'd1;
        pad <= flush;
      end else if (pend_n != '0) begin
        // move one bit into the word being assembled
        acc    <= {acc[SW-2:0], pend[PW-1]};
        pend   <= pend << 1;
        pend_n <= pend_n - 1'b1;
        if (acc_n == ($bits(acc_n))'(SW - 1)) begin
          word_valid <= 1'b1;
          word       <= {acc[SW-2:0], pend[PW-1]};
          acc_n      <= '0;
        end else begin
          acc_n <= acc_n + 1'b1;
        end
      end else if (pad) begin
        if (acc_n != '0) begin
          word_valid <= 1'b1;
          word       <= acc << (SW - int'(acc_n));
          acc_n      <= '0;
        end
        pad <= 1'b0;
      end
    end
  end

  // a regular frame must not begin with the SID marker
  a_no_false_marker: assert property (@(posedge clk) disable iff (!rst_n)
    frame_valid && frame_ready && !flush && vad |-> e_par[REG_BITS-1 -: MARK_BITS] != SID_MARK);

endmodule
