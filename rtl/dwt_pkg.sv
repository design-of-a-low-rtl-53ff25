// dwt_pkg: types and constants shared by the 2-D biorthogonal DWT blocks.
//
// Samples between the filters are 16-bit two's-complement integers, the
// filter coefficients 16-bit fixed point with FRAC fraction bits (FRAC is a
// parameter of the filters, 8 by default). The default coefficients are the
// 5/3 biorthogonal (LeGall) pair written as two symmetric 5-tap filters, as
// the five-tap structure needs: index 0 is the outermost tap pair, index L/2
// the centre tap. The 16-bit data and coefficient width follows the 16x16
// multipliers of the architecture; the filter pair and the Q8 scaling are this
// design's choice.
package dwt_pkg;

  localparam int DATA_W = 16;   // sample width between filters
  localparam int COEF_W = 16;   // coefficient width
  localparam int IDX_W  = 12;   // row / column index width (N up to 2048)
  localparam int LVL_W  = 3;    // resolution level number, 1-based

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic [IDX_W-1:0]         idx_t;
  typedef logic [LVL_W-1:0]         lvl_t;

  // Sub-band tag: first letter is the row filter, second the column filter
  // (H lowpass, G highpass).
  typedef enum logic [1:0] {
    SB_HH = 2'd0,
    SB_HG = 2'd1,
    SB_GH = 2'd2,
    SB_GG = 2'd3
  } subband_e;

  // In all three structs img is the parity of the image the sample belongs
  // to, which tells two back-to-back images apart while both are in flight.

  // One output of a row (horizontal) filter. hp = 1 for a highpass (G)
  // coefficient, 0 for a lowpass (H) one; col is the decimated column.
  typedef struct packed {
    logic  valid;
    logic  img;
    lvl_t  lvl;
    logic  hp;
    idx_t  row;
    idx_t  col;
    data_t data;
  } rowout_t;

  // One vertical-filter operation: the sample of row `row`, column `col` of
  // one band at level `lvl`. pad = 1 marks a boundary row past the last one,
  // which only moves the column window on.
  typedef struct packed {
    logic  valid;
    logic  img;
    lvl_t  lvl;
    logic  pad;
    idx_t  row;
    idx_t  col;
    data_t data;
  } vop_t;

  // One wavelet coefficient leaving a vertical filter.
  typedef struct packed {
    logic     valid;
    logic     img;
    subband_e band;
    lvl_t     lvl;
    idx_t     row;
    idx_t     col;
    data_t    data;
  } coef_out_t;

  // 5/3 filter pair in Q8, outer tap first.
  //   lowpass  h = (-1, 2, 6, 2, -1) / 8
  //   highpass g = ( 0,-4, 8,-4,  0) / 8
  localparam coef_t H53 [3] = '{-16'sd32, 16'sd64, 16'sd192};
  localparam coef_t G53 [3] = '{16'sd0, -16'sd128, 16'sd256};

endpackage
