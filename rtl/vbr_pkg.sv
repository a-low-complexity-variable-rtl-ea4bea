// vbr_pkg: frame formats of the variable bit rate coder's stored bit stream.
//
// Active speech is stored as a regular FS1016 frame of 138 bits (the
// encoded parameters, E_PAR).  A run of 1 to 16 frames of background noise
// is stored as one 47-bit silence description (SID) frame:
//   SID_MARK (4 bits, 1110) | AV_LSP (34) | AV_SCG (5) | SID_LEN (4)
// The field widths, the marker value and the field order are the
// document's.  The marker is a code the LSP field of a regular frame never
// starts with, so a reader can tell the two frame types apart.  SID_LEN
// holds the run length minus one (this design's choice: 4 bits for 1..16).
package vbr_pkg;

  localparam int REG_BITS   = 138;
  localparam int SID_BITS   = 47;
  localparam int LSP_BITS   = 34;
  localparam int SCG_BITS   = 5;
  localparam int LEN_BITS   = 4;
  localparam int MARK_BITS  = 4;
  localparam int MAX_RUN    = 16;
  localparam int SW         = 16;   // storage word width
  localparam logic [MARK_BITS-1:0] SID_MARK = 4'b1110;

  typedef logic [REG_BITS-1:0] reg_frame_t;

  typedef struct packed {
    logic [MARK_BITS-1:0] mark;
    logic [LSP_BITS-1:0]  av_lsp;
    logic [SCG_BITS-1:0]  av_scg;
    logic [LEN_BITS-1:0]  len_m1;
  } sid_frame_t;

endpackage
