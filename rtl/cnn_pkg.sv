// cnn_pkg: constants and types shared by the convolution and FC processors.
//
// A "lane" is VEC_SIZE channels of one pixel (one byte per channel); a "plate" is
// W_VEC lanes that are consecutive along the width. Data plates are 8-bit; after the
// F(6,3) Winograd input transform they are XW bits wide. Weights are stored in DDR
// already transformed into the Winograd domain (XW bits each), as the host prepares
// them once. The numbers VEC_SIZE=8, W_VEC=8 (F(6,3): 6 outputs + 3 taps - 1) and
// LANE_NUM=32 follow the described main configuration; the bit widths and the field
// layout of the layer configurations are this design's own choices.
package cnn_pkg;

  localparam int VEC_SIZE = 8;     // channels per lane
  localparam int W_VEC    = 8;     // lanes per plate (Winograd input tile)
  localparam int KW       = 3;     // filter width handled by F(6,3)
  localparam int INV_VEC  = W_VEC - KW + 1;  // outputs per PE block (6)
  localparam int LANE_NUM = 32;    // PEs = output channels per set
  localparam int PE_ROWS  = 4;     // semi-1D grid shape, PE_ROWS*PE_COLS = LANE_NUM
  localparam int PE_COLS  = 8;

  localparam int DW   = 8;         // feature/weight precision (8-bit)
  localparam int XW   = 16;        // Winograd-domain data and weight width
  localparam int ACCW = 48;        // PE accumulator width
  localparam int OUTW = 64;        // inverse-transform result width

  // Integer Winograd F(6,3) matrices. BT_S = 4*B^T, AT_S = 32*A^T, G_S = 90*G, so a
  // full transform pipeline yields WINO_SCALE * (direct convolution) exactly.
  localparam int WINO_SCALE = 4 * 32 * 90;  // 11520

  localparam int BT_S [8][8] = '{
    '{ 4,  0, -21,   0,  21,   0, -4, 0},
    '{ 0,  4,   4, -17, -17,   4,  4, 0},
    '{ 0, -4,   4,  17, -17,  -4,  4, 0},
    '{ 0,  2,   1, -10,  -5,   8,  4, 0},
    '{ 0, -2,   1,  10,  -5,  -8,  4, 0},
    '{ 0,  8,  16, -10, -20,   2,  4, 0},
    '{ 0, -8,  16,  10, -20,  -2,  4, 0},
    '{ 0, -4,   0,  21,   0, -21,  0, 4}};

  localparam int AT_S [6][8] = '{
    '{32, 32,  32,   32,    32, 32,  32,  0},
    '{ 0, 32, -32,   64,   -64, 16, -16,  0},
    '{ 0, 32,  32,  128,   128,  8,   8,  0},
    '{ 0, 32, -32,  256,  -256,  4,  -4,  0},
    '{ 0, 32,  32,  512,   512,  2,   2,  0},
    '{ 0, 32, -32, 1024, -1024,  1,  -1, 32}};

  // Weight transform (done by the host, listed for reference and for testbenches).
  localparam int G_S [8][3] = '{
    '{90,   0,  0},
    '{-20, -20, -20},
    '{-20,  20, -20},
    '{ 1,   2,  4},
    '{ 1,  -2,  4},
    '{64,  32, 16},
    '{64, -32, 16},
    '{ 0,   0, 90}};

  // Condition word attached to every data plate (computed once, used by all PEs).
  localparam int COND_W       = 32;
  localparam int COND_FIRST   = 0;  // first plate of an output block: clear accumulators
  localparam int COND_LAST    = 1;  // last plate of an output block: emit the block
  localparam int COND_SET_END = 2;  // last plate of the current weight set: free the buffer

  // Convolution layer configuration. Addresses count lanes (feature memory) or
  // weight plates (weight memory). Feature layout in DDR, lane address:
  //   base + ((cg*F + f)*H + y)*W + x      (channel group, frame, row, column)
  typedef struct packed {
    logic [31:0] in_base;
    logic [15:0] in_w, in_h, in_f;      // input pitches (padded dimensions)
    logic [15:0] in_cg;                 // input channel groups (C / VEC_SIZE)
    logic [3:0]  kh, kf;                // filter height and frames (width is KW)
    logic [31:0] w_base;                // first weight plate
    logic [15:0] out_ch;                // output channels M
    logic [15:0] m_sets;                // ceil(M / LANE_NUM)
    logic [15:0] tile_owg, tile_oh, tile_of;  // output tile: width groups of INV_VEC, rows, frames
    logic [15:0] n_tw, n_th, n_tf;      // tiles along width, height, frames
    logic [31:0] out_base;              // lane address of output (0,0,0)
    logic [15:0] out_w, out_h, out_f;   // output pitches
    logic [15:0] out_wv;                // valid output width (columns beyond are not written)
    logic [5:0]  shift;                 // right shift applied before saturation to 8 bits
    logic        relu;
    logic        sum;                   // sum layer: add to the value already in memory
  } conv_cfg_t;

  // Fully connected layer configuration (dedicated FC processor). Plate addresses.
  typedef struct packed {
    logic [31:0] in_base;
    logic [15:0] in_plates;             // input channels / (VEC_SIZE*W_VEC)
    logic [31:0] w_base;
    logic [15:0] out_ch;
    logic [31:0] out_base;              // byte address of output channel 0
    logic [5:0]  shift;
    logic        relu;
  } fc_cfg_t;

  // Saturate a signed value, already shifted, to signed 8 bits.
  function automatic logic [7:0] sat8(input logic signed [OUTW-1:0] v);
    if (v > 127)       return 8'sd127;
    else if (v < -128) return 8'h80;
    else               return v[7:0];
  endfunction

endpackage
