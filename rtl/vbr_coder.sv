// vbr_coder: hardware of the variable bit rate speech coder - the
// spectral-analysis DSP and the bit stream path to and from storage memory.
//
// The coder turns 30 ms speech frames into a stream of stored bits.  The
// DSP (dsp_core) runs the spectral analysis front end of the CELP coder on
// samples it receives over its 8-bit host port.  Each frame is classified
// as active speech or background noise by a voice activity decision that is
// made outside this module; active frames become 138-bit regular frames,
// runs of up to 16 noise frames become one 47-bit SID frame.  The bit
// stream writer (vbr_bitstream_writer) packs both kinds of frame back to
// back into 16-bit storage words, and the bit stream reader
// (vbr_bitstream_reader) splits stored words back into frames for the
// decoder.  The storage memory itself is outside: the writer's words leave
// on store_*, the reader is fed on load_*, so a recording can be played
// back at any later time.  The three parts share only the clock and reset;
// the frame parameters (E_PAR, AV_LSP, AV_SCG, VAD) come from coder
// functions that are not part of this hardware and enter on ports.
//
// The split into a DSP and a bit stream path follows the document (a
// DSP56001-like processor for the analysis, regular and SID frames written
// to memory as one continuous bit stream); the port grouping, the
// handshakes and the 16-bit storage word are this design's choices.
//
// Interface and timing: see dsp_core (host port, one instruction per
// clock), vbr_bitstream_writer (frame_valid/frame_ready, one cycle per
// stored bit) and vbr_bitstream_reader (load_valid/load_ready, one cycle per
// bit).  Synchronous active-low reset.
module vbr_coder
  import dsp_pkg::*;
  import vbr_pkg::*;
#(
  parameter string PROG_FILE  = "rtl/dsp_prog_autocorr.hex",
  parameter string XROM_FILE  = "",
  parameter string YROM_FILE  = "rtl/dsp_yrom_tables.hex",
  parameter int    RAM_WORDS  = 256,
  parameter int    ROM_WORDS  = 256,
  parameter int    LOOP_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // DSP host port
  input  logic [1:0]          host_addr,
  input  logic                host_wr,
  input  logic                host_rd,
  input  logic [7:0]          host_wdata,
  output logic [7:0]          host_rdata,
  output logic                dsp_halted,
  output logic                dsp_loop_err,
  output logic [9:0]          dsp_prog_addr,
  output logic [AW-1:0]       dsp_acc_a,
  output logic [AW-1:0]       dsp_acc_b,
  // coded frames in (from the voice activity decision and the coder)
  input  logic                frame_valid,
  output logic                frame_ready,
  input  logic                frame_flush,
  input  logic                frame_vad,
  input  reg_frame_t          frame_e_par,
  input  logic [LSP_BITS-1:0] frame_av_lsp,
  input  logic [SCG_BITS-1:0] frame_av_scg,
  output logic [4:0]          silent_run,
  // words to storage memory
  output logic                store_valid,
  output logic [SW-1:0]       store_word,
  // words from storage memory
  input  logic                load_valid,
  output logic                load_ready,
  input  logic [SW-1:0]       load_word,
  // decoded frames out (to speech or comfort noise reconstruction)
  output logic                dec_valid,
  output logic                dec_is_sid,
  output reg_frame_t          dec_e_par,
  output logic [LSP_BITS-1:0] dec_av_lsp,
  output logic [SCG_BITS-1:0] dec_av_scg,
  output logic [4:0]          dec_sid_frames
);

  dsp_core #(
    .PROG_FILE(PROG_FILE), .XROM_FILE(XROM_FILE), .YROM_FILE(YROM_FILE),
    .RAM_WORDS(RAM_WORDS), .ROM_WORDS(ROM_WORDS), .LOOP_DEPTH(LOOP_DEPTH)
  ) u_dsp (
    .clk, .rst_n,
    .host_addr, .host_wr, .host_rd, .host_wdata, .host_rdata,
    .halted(dsp_halted), .loop_err(dsp_loop_err), .prog_addr(dsp_prog_addr),
    .acc_a(dsp_acc_a), .acc_b(dsp_acc_b)
  );

  vbr_bitstream_writer u_writer (
    .clk, .rst_n,
    .frame_valid, .frame_ready, .flush(frame_flush), .vad(frame_vad),
    .e_par(frame_e_par), .av_lsp(frame_av_lsp), .av_scg(frame_av_scg),
    .word_valid(store_valid), .word(store_word), .run_len(silent_run)
  );

  vbr_bitstream_reader u_reader (
    .clk, .rst_n,
    .word_valid(load_valid), .word_ready(load_ready), .word(load_word),
    .frame_valid(dec_valid), .is_sid(dec_is_sid), .e_par(dec_e_par),
    .av_lsp(dec_av_lsp), .av_scg(dec_av_scg), .sid_frames(dec_sid_frames)
  );

endmodule
