// column_filter: vertical parallel filter (VF1 with BAND = 0, VF2 with BAND = 1).
//
// An operation brings the sample of row r, column c of one band at one level;
// the storage unit supplies rows r-1 .. r-L+1 of the same column. Together
// they form the L-tap column window centred on row r - L/2. The centre row's
// parity picks the coefficients, so the filter alternates lowpass (even
// centre rows) and highpass (odd centre rows) from row to row: the column
// transform decimated by two. Rows outside the centre's own image enter as
// zero, i.e. zero extension at the top and bottom edges.
//
// The window slides across image boundaries. When the operation's image
// directly follows the previous one (chain = 1), its first L/2 rows complete
// the previous image: the window centre then lies on row R + r - L/2 of the
// previous image (R = N/2^(lvl-1), the band height), only the stored rows of
// that image count, and the output carries the previous image's parity. When
// no image follows, boundary pad rows R .. R+L/2-1 (pad = 1) produce the last
// outputs instead. Without chain, rows above row 0 are zero.
//
// VF1 (lowpass-row band) emits HH and HG, VF2 (highpass-row band) GH and GG.
// The result is registered: out is valid one cycle after an operation whose
// centre row is a real row, with out.row = centre row / 2 and out.col = c.
module column_filter
  import dwt_pkg::*;
#(
  parameter int    N      = 512,
  parameter int    L      = 5,
  parameter int    BAND   = 0,
  parameter int    FRAC   = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  coef_t     h_coef [L/2+1],
  input  coef_t     g_coef [L/2+1],
  input  vop_t      op,
  input  logic      chain,
  input  data_t     stored [L-1],
  output coef_out_t out
);

  localparam int HALF = L / 2;

  int    r, rc, rows, crow;
  logic  prev;        // centre lies in the previous image
  data_t tap [L];
  data_t y;
  logic  centre_ok;

  always_comb begin
    r    = int'(op.row);
    rows = N >> (int'(op.lvl) - 1);
    rc   = r - HALF;
    prev = (rc < 0);
    crow = prev ? rows + rc : rc;
    centre_ok = op.valid && (prev ? chain : (rc < rows));
    tap[0] = (!prev && !op.pad && r < rows) ? op.data : '0;
    for (int i = 1; i < L; i++) begin
      if (prev)
        tap[i] = (r - i < 0) ? stored[i-1] : '0;
      else
        tap[i] = (r - i >= 0 && r - i < rows) ? stored[i-1] : '0;
    end
  end

  sym_filter_pe #(
    .L(L), .IN_W(DATA_W), .FRAC(FRAC)
  ) u_pe (
    .tap    (tap),
    .h_coef (h_coef),
    .g_coef (g_coef),
    .hp     (crow[0]),
    .y      (y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
    end else begin
      out.valid <= centre_ok;
      if (centre_ok) begin
        if (BAND == 0) out.band <= crow[0] ? SB_HG : SB_HH;
        else           out.band <= crow[0] ? SB_GG : SB_GH;
        out.img  <= prev ? !op.img : op.img;
        out.lvl  <= op.lvl;
        out.row  <= idx_t'(crow >> 1);
        out.col  <= op.col;
        out.data <= y;
      end
    end
  end

endmodule
