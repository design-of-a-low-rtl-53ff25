// row_filter: horizontal parallel filter (HF1 with CTX = 1, HF2 with CTX > 1).
//
// Each push shifts one sample into an L-deep delay chain and produces, one
// cycle later, the filter output centred on the sample L/2 pushes back. The
// centre column's parity picks the coefficients: even columns give a lowpass
// (H) coefficient, odd columns a highpass (G) one, so the output stream is
// the row transform already decimated by two, H and G interleaved.
//
// Every chain stage carries the image parity, row and column of its sample
// and a valid bit. Taps from another row (or image) than the centre, or
// invalid ones, enter the arithmetic as zero: the image is zero-extended at
// its left and right edges. The last L/2 outputs of a row therefore come out
// when the first samples of the next row - or of the next image - are
// pushed; when nothing follows, the owner pushes L/2 flush samples (push with
// sample_valid = 0) to drain the chain.
//
// With CTX > 1 the filter keeps one delay chain per context and shares the
// arithmetic: HF2 serves resolution levels LVL0, LVL0+1, ... whose samples
// arrive interleaved. At most one push per cycle.
//
// Interface: push/ctx/sample_valid/row/col/data in; out is registered and
// valid one cycle after a push whose centre sample is valid; out.lvl is
// LVL0 + ctx, out.col the column within the decimated band (col/2).
module row_filter
  import dwt_pkg::*;
#(
  parameter int    L      = 5,
  parameter int    CTX    = 1,
  parameter int    LVL0   = 1,
  parameter int    IN_W   = DATA_W,
  parameter int    FRAC   = 8,
  localparam int   CTX_W  = (CTX > 1) ? $clog2(CTX) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  coef_t                  h_coef [L/2+1],
  input  coef_t                  g_coef [L/2+1],
  input  logic                   push,
  input  logic [CTX_W-1:0]       ctx,
  input  logic                   sample_valid,
  input  logic                   img,
  input  idx_t                   row,
  input  idx_t                   col,
  input  logic signed [IN_W-1:0] data,
  output rowout_t                out
);

  localparam int HALF = L / 2;

  typedef struct packed {
    logic                   valid;
    logic                   img;
    idx_t                   row;
    idx_t                   col;
    logic signed [IN_W-1:0] data;
  } stage_t;

  stage_t chain [CTX][L-1];       // the window's older L-1 stages
  stage_t win   [L];                 // chain of ctx after this push
  logic signed [IN_W-1:0] tap [L];
  data_t  y;

  always_comb begin
    win[0] = '{valid: sample_valid, img: img, row: row, col: col, data: data};
    for (int i = 1; i < L; i++)
      win[i] = chain[ctx][i-1];
    for (int i = 0; i < L; i++)
      tap[i] = (win[i].valid && win[i].img == win[HALF].img && win[i].row == win[HALF].row)
               ? win[i].data : '0;
  end

  sym_filter_pe #(
    .L(L), .IN_W(IN_W), .FRAC(FRAC)
  ) u_pe (
    .tap    (tap),
    .h_coef (h_coef),
    .g_coef (g_coef),
    .hp  (win[HALF].col[0]),
    .y   (y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < CTX; c++)
        for (int i = 0; i < L-1; i++)
          chain[c][i] <= '0;
      out <= '0;
    end else begin
      out.valid <= 1'b0;
      if (push) begin
        for (int i = 0; i < L-1; i++)
          chain[ctx][i] <= win[i];
        out.valid <= win[HALF].valid;
        out.img   <= win[HALF].img;
        out.lvl   <= lvl_t'(LVL0 + int'(ctx));
        out.hp    <= win[HALF].col[0];
        out.row   <= win[HALF].row;
        out.col   <= win[HALF].col >> 1;
        out.data  <= y;
      end
    end
  end

  initial begin
    assert (CTX >= 1) else $error("row_filter: CTX must be at least 1");
  end

endmodule
