// sym_filter_pe: arithmetic of one symmetric L-tap biorthogonal filter.
//
// The L window samples are folded with L/2 pre-adders (tap i plus tap L-1-i,
// which share a coefficient because the filters are symmetric), multiplied by
// L/2+1 coefficients and summed, so an L-tap filter costs L/2+1 multipliers
// and L-1 adders. One coefficient set is chosen per sample: hp = 0 takes the
// lowpass set h_coef, hp = 1 the highpass set g_coef (both come from the
// coefficient registers, coef_bank); alternating hp on successive outputs
// gives the H/G interleaved, decimated output of the architecture. This
// structure follows the five-tap filter of the design; the select input
// stands in for the rotating two-entry g/h coefficient register so that the
// choice stays right when samples arrive with gaps.
//
// tap[0] is the newest sample, tap[L-1] the oldest, tap[L/2] the centre.
// Taps the caller wants excluded (outside the image) must be given as zero.
// The result is rounded to nearest, (acc + 2^(FRAC-1)) >>> FRAC, and
// saturated to DATA_W bits. Purely combinational. Odd L only.
module sym_filter_pe
  import dwt_pkg::*;
#(
  parameter int    L      = 5,
  parameter int    IN_W   = DATA_W,
  parameter int    FRAC   = 8
) (
  input  logic signed [IN_W-1:0] tap [L],
  input  coef_t                  h_coef [L/2+1],
  input  coef_t                  g_coef [L/2+1],
  input  logic                   hp,
  output data_t                  y
);

  localparam int HALF  = L / 2;
  localparam int PRE_W = IN_W + 1;
  localparam int ACC_W = PRE_W + COEF_W + $clog2(HALF + 1) + 1;

  initial begin
    assert (L % 2 == 1) else $error("sym_filter_pe: L must be odd");
  end

  logic signed [PRE_W-1:0] folded [HALF+1];
  logic signed [ACC_W-1:0] prod   [HALF+1];
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] rounded;

  always_comb begin
    for (int i = 0; i < HALF; i++)
      folded[i] = PRE_W'(tap[i]) + PRE_W'(tap[L-1-i]);
    folded[HALF] = PRE_W'(tap[HALF]);
    for (int i = 0; i <= HALF; i++)
      prod[i] = ACC_W'(folded[i]) * ACC_W'(hp ? g_coef[i] : h_coef[i]);
    acc = '0;
    for (int i = 0; i <= HALF; i++)
      acc = acc + prod[i];
    rounded = (acc + (ACC_W'(1) <<< (FRAC - 1))) >>> FRAC;
    if (rounded > ACC_W'(2**(DATA_W-1) - 1))
      y = data_t'(2**(DATA_W-1) - 1);
    else if (rounded < -ACC_W'(2**(DATA_W-1)))
      y = data_t'(-(2**(DATA_W-1)));
    else
      y = data_t'(rounded);
  end

endmodule
