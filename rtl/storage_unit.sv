// storage_unit: the shift register banks between the row and column filters.
//
// For every resolution level l (1..LEVELS) and both row-filter bands the unit
// keeps the L-1 most recent rows of that band: bank t holds row r-1-t of
// every column. The H band (lowpass rows, "HR") serves the vertical filter
// VF1 through port h, the G band (highpass rows, "GR") serves VF2 through
// port g. A band of level l is N/2^l samples wide, so the unit holds
// 2(L-1)(N/2 + N/4 + ... + N/2^LEVELS) words, just under 2N(L-1). The current
// row is not stored before use: it reaches the column filter directly, which
// is why L-1 rather than L rows are kept.
//
// Each port reads combinationally the L-1 stored samples of the column named
// by the operation and, at the clock edge of a valid operation, shifts that
// column by one row: the new sample enters bank 0 (zero for a boundary pad
// row) and every bank takes the value of the one before. That is a delay line
// of one band row per bank, written as one word per column per bank. The
// contents are not reset; the column filter masks rows that are not part of
// the current image. Bank layout per level is this design's own choice.
module storage_unit
  import dwt_pkg::*;
#(
  parameter int N      = 512,
  parameter int L      = 5,
  parameter int LEVELS = 3
) (
  input  logic  clk,
  input  vop_t  op_h,
  output data_t taps_h [L-1],
  input  vop_t  op_g,
  output data_t taps_g [L-1]
);

  vop_t  op [2];
  data_t rd [2][LEVELS][L-1];

  assign op[0] = op_h;
  assign op[1] = op_g;

  for (genvar b = 0; b < 2; b++) begin : g_band
    for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
      localparam int C  = N >> (l + 1);
      localparam int AW = (C > 1) ? $clog2(C) : 1;

      data_t          bank [L-1][C];
      logic           sel;
      logic [AW-1:0]  a;

      assign sel = op[b].valid && (op[b].lvl == lvl_t'(l + 1));
      assign a   = op[b].col[AW-1:0];

      always_comb
        for (int t = 0; t < L-1; t++)
          rd[b][l][t] = bank[t][a];

      always_ff @(posedge clk) begin
        if (sel) begin
          bank[0][a] <= op[b].pad ? '0 : op[b].data;
          for (int t = 1; t < L-1; t++)
            bank[t][a] <= bank[t-1][a];
        end
      end
    end
  end

  always_comb begin
    for (int t = 0; t < L-1; t++) begin
      taps_h[t] = '0;
      taps_g[t] = '0;
    end
    for (int l = 0; l < LEVELS; l++) begin
      if (op_h.lvl == lvl_t'(l + 1))
        for (int t = 0; t < L-1; t++) taps_h[t] = rd[0][l][t];
      if (op_g.lvl == lvl_t'(l + 1))
        for (int t = 0; t < L-1; t++) taps_g[t] = rd[1][l][t];
    end
  end

  initial begin
    assert ((N >> LEVELS) >= 1) else $error("storage_unit: N too small for LEVELS");
  end

endmodule
