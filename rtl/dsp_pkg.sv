// dsp_pkg: shared widths, instruction encoding and control types of the
// 16-bit micro-programmed DSP.
//
// The DSP follows the DSP56001 organisation: a data ALU with a 16x16
// multiplier and two 40-bit accumulators, an address generation unit with
// R/N/M registers, separate X and Y data memories, a host interface and a
// controller with hardware DO loops.  The word sizes (16-bit data, 40-bit
// accumulators, 10-bit addresses, 24-bit instructions, 1024-word program)
// follow the document.  The binary instruction encoding below is this
// design's own: the document states only that instructions are 24 bits wide
// and that the encoding was chosen to keep the decoder small.
//
// Instruction formats (bit 23 on the left):
//   Parallel  : op[23:20] (0..13) | src[19:17] | d[16] | xmove[15:8] | ymove[7:0]
//   Control   : 4'hE | sub[19:16] | payload[15:0]
//   Immediate : 4'hF | g[19] ...
//     g=0 : dreg[18:16] | imm16[15:0]           data register  <- #imm16
//     g=1 : grp[18:17]  | idx[16:14] | imm10[9:0]  R/N/M register <- #imm10
//   Parallel move field (8 bits): kind[7:6] (0 none, 1 load, 2 store)
//     | reg[5:4] (X space: X0 X1 A B, Y space: Y0 Y1 A B) | rr[3:2] | mode[1:0]
package dsp_pkg;

  localparam int DW  = 16;   // data word
  localparam int AW  = 40;   // accumulator (8-bit extension + 32 bits)
  localparam int ADW = 10;   // address / AGU register width
  localparam int IW  = 24;   // instruction width
  localparam int PAW = 10;   // program address width (1024 instructions)

  typedef logic [DW-1:0]  word_t;
  typedef logic [AW-1:0]  acc_t;
  typedef logic [ADW-1:0] addr_t;
  typedef logic [IW-1:0]  instr_t;
  typedef logic [PAW-1:0] paddr_t;

  // Data ALU operations (parallel format op field)
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,  OP_MPY  = 4'd1,  OP_MPYR = 4'd2,  OP_MAC  = 4'd3,
    OP_MACR = 4'd4,  OP_RND  = 4'd5,  OP_DIV  = 4'd6,  OP_NORM = 4'd7,
    OP_ADD  = 4'd8,  OP_SUB  = 4'd9,  OP_NEG  = 4'd10, OP_ABS  = 4'd11,
    OP_CLR  = 4'd12, OP_TFR  = 4'd13, OP_CTL  = 4'd14, OP_IMM  = 4'd15
  } op_e;

  // Extra ALU operations, issued through the control format (sub = SUB_SHIFT)
  typedef enum logic [3:0] {
    SH_NONE = 4'd0, SH_ASL = 4'd1, SH_ASR = 4'd2, SH_CMP = 4'd3
  } shop_e;

  // Control format sub-codes
  typedef enum logic [3:0] {
    SUB_NOP   = 4'd0,  // bit 15 set: STOP
    SUB_JCC   = 4'd1,  // cc[13:10], target[9:0]
    SUB_DOI   = 4'd2,  // count[15:10], last address[9:0]
    SUB_DOR   = 4'd3,  // register[14:10], last address[9:0]
    SUB_MOVR  = 4'd4,  // src reg[9:5], dst reg[4:0]
    SUB_MOVM  = 4'd5,  // space[15], store[14], reg[13:9], rr[8:7], mode[6:4]
    SUB_SHIFT = 4'd6   // shop[3:0], d[4], source[7:5]
  } sub_e;

  // Condition codes for Jcc
  typedef enum logic [3:0] {
    CC_AL = 4'd0, CC_EQ = 4'd1, CC_NE = 4'd2, CC_PL = 4'd3,
    CC_MI = 4'd4, CC_GE = 4'd5, CC_LT = 4'd6, CC_GT = 4'd7,
    CC_LE = 4'd8, CC_CC = 4'd9, CC_CS = 4'd10, CC_LC = 4'd11,
    CC_LS = 4'd12, CC_RXE = 4'd13, CC_TXF = 4'd14, CC_NV = 4'd15
  } cc_e;

  // Address update modes
  typedef enum logic [2:0] {
    AM_NONE = 3'd0,  // (Rx)
    AM_INC  = 3'd1,  // (Rx)+
    AM_DEC  = 3'd2,  // (Rx)-
    AM_PN   = 3'd3,  // (Rx)+Nx
    AM_MN   = 3'd4   // (Rx)-Nx
  } amode_e;

  // General register codes (5 bits), used by register moves, single memory
  // moves and DO with a register count.
  localparam logic [4:0] G_X0 = 5'd0, G_X1 = 5'd1, G_Y0 = 5'd2, G_Y1 = 5'd3;
  localparam logic [4:0] G_A  = 5'd4, G_B  = 5'd5, G_HOST = 5'd6, G_HSTAT = 5'd7;
  // 8..15 R0..R7, 16..23 N0..N7, 24..31 M0..M7

  // Condition code register
  typedef struct packed {
    logic l;   // sticky limit (saturation on a move)
    logic e;   // extension in use
    logic u;   // unnormalised
    logic n;   // negative
    logic z;   // zero
    logic v;   // overflow
    logic c;   // carry / quotient bit
  } ccr_t;

  // One parallel (or single) memory move, decoded
  typedef struct packed {
    logic       en;     // a move takes place
    logic       store;  // 1: register -> memory, 0: memory -> register
    logic [4:0] greg;   // general register code of the register end
    logic [1:0] rr;     // address register within the space's bank
    amode_e     mode;
  } move_t;

  // Driver of the global bus
  typedef enum logic [1:0] {
    GS_REG = 2'd0,  // register g_src
    GS_IMM = 2'd1,  // instruction immediate
    GS_XDB = 2'd2,  // X data bus (memory load into a non-ALU register)
    GS_YDB = 2'd3   // Y data bus
  } gsel_e;

  // Decoded control from the controller unit to the execution units
  typedef struct packed {
    op_e        alu_op;     // OP_NOP when no ALU work
    shop_e      sh_op;      // shift / compare (control format)
    logic [2:0] alu_src;
    logic       alu_d;      // 0: A, 1: B
    move_t      xmv;        // move on the X data bus
    move_t      ymv;        // move on the Y data bus
    logic       gmv;        // g_dst is written from the global bus
    gsel_e      g_sel;      // what drives the global bus
    logic       g_rd;       // register g_src is read onto the global bus
    logic [4:0] g_src;
    logic [4:0] g_dst;
    word_t      imm;
  } ctrl_t;

  // Registers of the data ALU are reached directly from the X and Y busses;
  // all others (host, AGU) through the global bus and the bus switch.
  function automatic logic is_alu_reg(logic [4:0] g);
    return g < 5'd6;
  endfunction

  function automatic logic is_agu_reg(logic [4:0] g);
    return g[4] | g[3];
  endfunction

endpackage
