// me_pkg: types and constants shared by the motion estimation processor.
//
// The processor evaluates a 16x16 macroblock (MB) against a search window of
// 272x144 pixels (search range H -128..+127, V -64..+63) held in 16 search
// window (SW) banks of 4K x 8 bits. Pixels are 8-bit luminance values. For
// the hierarchical search, layer 2 and layer 3 are the images subsampled by 2
// and by 4 in each direction; block, search range and window shrink by the
// same factor (field lyr = layer - 1). The numbers 16, 32 PEs, 16 SW banks,
// 4K x 8, 272x144, the search range and the three layers follow the
// document; the bank address map (column groups modulo SW_COLGRP, rows split
// by parity) and all encodings are this design's choice.
package me_pkg;

  localparam int unsigned PIX_W     = 8;     // pixel width
  localparam int unsigned MB_N      = 16;    // macroblock is MB_N x MB_N
  localparam int unsigned NBANK     = 8;     // SW banks per half
  localparam int unsigned NPE_HALF  = 16;    // PEs per half
  localparam int unsigned SW_AW     = 12;    // 4K words per SW bank
  localparam int unsigned SW_COLGRP = 36;    // 8-column groups kept per bank (272 + 16 columns)
  localparam int unsigned SW_ROWS   = 72;    // window rows per half (144 / 2)
  localparam int unsigned WIN_W     = 272;   // search window width
  localparam int unsigned WIN_H     = 144;   // search window height
  localparam int signed   RANGE_X   = 128;   // horizontal search range -128..+127
  localparam int signed   RANGE_Y   = 64;    // vertical search range   -64..+63
  localparam int unsigned TB_AW     = 7;     // template buffer word address
  localparam int unsigned PROD_W    = 18;    // PE product width
  localparam int unsigned ACC_W     = 32;    // accumulator width
  localparam int unsigned BC_W      = 13;    // buffer column (frame column + 128)

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [SW_AW-1:0] sw_addr_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Evaluation kinds run by the SIMD datapath.
  typedef enum logic [1:0] {
    M_MSE = 2'd0,   // sum of (T-S)^2                         (Eq. 1)
    M_DX  = 2'd1,   // sum of (T-S)(S[x+1]-S[x-1])            (Eq. 2)
    M_DY  = 2'd2    // sum of (T-S)(S[y+1]-S[y-1])            (Eq. 3)
  } pe_mode_e;

  // Motion vector, two's complement.
  typedef struct packed {
    logic signed [9:0] y;
    logic signed [9:0] x;
  } mv_t;

  // Sequencer commands (written to the CMD register).
  typedef enum logic [2:0] {
    CMD_NONE  = 3'd0,
    CMD_INIT  = 3'd1,   // initial vector evaluation (4 candidates)
    CMD_VEC   = 3'd2,   // search vector evaluation
    CMD_DIFF  = 3'd3,   // differential coefficients calculation
    CMD_LINE  = 3'd4    // 1-dimensional search
  } seq_cmd_e;

  // Per-cycle control from an address generator to its datapath half.
  typedef struct packed {
    logic     active;   // a read cycle of an evaluation
    pe_mode_e mode;
    logic     pvalid;   // PEs produce a product from this read
    logic     first;    // first read cycle of the evaluation
    logic     last;     // last read cycle of the evaluation
    logic     dy_cur;   // M_DY: centre row is this read (1) or the previous one (0)
    logic [2:0] rot;    // start column mod 8 (crosspath select)
    logic [1:0] lyr;    // image layer - 1: block is (16 >> lyr) pixels wide
  } ag_ctrl_t;

  // Local bus register map of the sequencer (word addresses).
  localparam logic [5:0] R_CMD    = 6'h00;
  localparam logic [5:0] R_STATUS = 6'h01;
  localparam logic [5:0] R_MBX    = 6'h02;
  localparam logic [5:0] R_SLOT   = 6'h03;
  localparam logic [5:0] R_IV0    = 6'h04;  // .. 6'h07
  localparam logic [5:0] R_SVEC   = 6'h08;
  localparam logic [5:0] R_DIR    = 6'h09;
  localparam logic [5:0] R_STEP   = 6'h0A;
  localparam logic [5:0] R_NCYC   = 6'h0B;
  localparam logic [5:0] R_LAYER  = 6'h0C;
  localparam logic [5:0] R_TBSIZE = 6'h0D;
  localparam logic [5:0] R_SWSIZE = 6'h0E;
  localparam logic [5:0] R_BVEC   = 6'h10;
  localparam logic [5:0] R_BMSE   = 6'h11;
  localparam logic [5:0] R_DEX    = 6'h12;
  localparam logic [5:0] R_DEY    = 6'h13;
  localparam logic [5:0] R_NEVAL  = 6'h14;
  localparam logic [5:0] R_LDCMD  = 6'h18;
  localparam logic [5:0] R_LDFX   = 6'h19;
  localparam logic [5:0] R_LDFY   = 6'h1A;
  localparam logic [5:0] R_LDBC   = 6'h1B;
  localparam logic [5:0] R_LDSLOT = 6'h1C;

  // Buffer column -> SW bank word address for a window row.
  function automatic sw_addr_t sw_addr(input logic [BC_W-1:0] bc, input logic [7:0] wrow);
    int unsigned grp;
    grp = 32'(bc[BC_W-1:3]) % SW_COLGRP;
    return sw_addr_t'(grp * SW_ROWS + 32'(wrow[7:1]));
  endfunction

  function automatic logic [31:0] mv_pack(input mv_t v);
    return {{6{v.y[9]}}, v.y, {6{v.x[9]}}, v.x};
  endfunction

  function automatic mv_t mv_unpack(input logic [31:0] w);
    mv_t v;
    v.x = w[9:0];
    v.y = w[25:16];
    return v;
  endfunction

endpackage
