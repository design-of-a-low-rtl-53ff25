// dwt2d_top: low-cost architecture for the multi-level 2-D biorthogonal DWT.
//
// An N x N image of 8-bit pixels enters in raster order, one pixel per cycle,
// and is decomposed over LEVELS resolution levels into the sub-bands HG, GH,
// GG of every level and HH of the last one (first letter: row filter, second:
// column filter; H lowpass, G highpass). Four filters do all the work:
//   HF1 - row filter of the image (level 1); 9-bit signed inputs.
//   HF2 - row filter of HH1, HH2, ... (levels 2..LEVELS), one delay chain
//         per level, arithmetic shared.
//   VF1 - column filter of every lowpass-row band; emits HH and HG. HH of a
//         level below LEVELS goes back to HF2 as the next level's input.
//   VF2 - column filter of every highpass-row band; emits GH and GG.
// The storage unit keeps the L-1 previous rows of every band and level for
// the column filters; no frame or inter-level buffer exists. Each row filter
// interleaves lowpass and highpass outputs (decimation by two), so HF1 feeds
// VF1 and VF2 on alternate cycles and the higher levels fill the gaps
// (vf_scheduler). This block structure, the sharing of HF2/VF1/VF2 across
// levels and the symmetric filter arithmetic follow the architecture; the
// zero extension at the image edges, the boundary pad rows at the end of each
// level, the FIFO between HF2 and the column filters and the handshake are
// this design's own.
//
// Interface: in_valid/in_ready/in_pixel take the image. A pixel in the cycle
// after an image's last pixel chains the next image: the first L/2 rows of
// the new image complete the previous one in the column filters, and every
// sample, operation and coefficient carries a one-bit image parity (img).
// When no pixel follows, the run ends: flush pushes and boundary pad rows
// finish the last image, and in_ready stays low until done.
// coef_we/coef_sel_g/coef_idx/coef_wdata rewrite one filter coefficient
// (between runs; reset loads H_COEF/G_COEF). Coefficients leave on
// out_h (VF1: HH, HG) and out_g (VF2: GH, GG), each a valid-qualified struct
// with image parity, band, level, row and column; intermediate HH of levels
// below LEVELS also appear on out_h. done pulses for one cycle after the last
// coefficient of a run; the next image may start in that cycle. error flags
// a FIFO overflow.
// Timing: chained images start every N*N cycles; the last image of a run
// needs N*N + 1099 cycles from its first pixel to done at N = 512.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int    N          = 512,
  parameter int    L          = 5,
  parameter int    LEVELS     = 3,
  parameter int    FRAC       = 8,
  parameter int    FIFO_DEPTH = 8,
  parameter coef_t H_COEF [L/2+1] = H53,   // reset value of the h registers
  parameter coef_t G_COEF [L/2+1] = G53,   // reset value of the g registers
  localparam int   IDX_CW = $clog2(L/2+1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_pixel,
  input  logic              coef_we,
  input  logic              coef_sel_g,
  input  logic [IDX_CW-1:0] coef_idx,
  input  coef_t             coef_wdata,
  output coef_out_t  out_h,
  output coef_out_t  out_g,
  output logic       done,
  output logic       error
);

  localparam int HALF   = L / 2;
  localparam int CTX2   = LEVELS - 1;
  localparam int CTX2_W = (CTX2 > 1) ? $clog2(CTX2) : 1;

  typedef enum logic [1:0] {S_IN, S_FLUSH, S_DRAIN} state_e;
  state_e state;

  // ------------------------------------------------------------ input side
  idx_t in_row, in_col;
  int   flush_n;
  logic hf1_push, hf1_sv;

  assign in_ready = (state == S_IN);
  assign hf1_sv   = (state == S_IN);
  assign hf1_push = (state == S_IN) ? in_valid : (state == S_FLUSH);

  logic all_done_h, all_done_g, ovf_h, ovf_g;

  // Image bookkeeping. img_par is the parity of the image being input;
  // chain_of[p] says that image p directly followed its predecessor, whose
  // last rows it completes; tail_pad marks that the image of parity
  // final_img ends a run and must be finished with flush samples and pad rows.
  logic img_par, ended, tail_pad, final_img;
  logic chain_of [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IN;
      in_row      <= '0;
      in_col      <= '0;
      flush_n     <= 0;
      done        <= 1'b0;
      img_par     <= 1'b0;
      ended       <= 1'b0;
      tail_pad    <= 1'b0;
      final_img   <= 1'b0;
      chain_of[0] <= 1'b0;
      chain_of[1] <= 1'b0;
    end else begin
      done  <= 1'b0;
      ended <= 1'b0;
      case (state)
        S_IN: begin
          if (ended) begin
            // the cycle after an image's last pixel decides: a pixel now
            // starts a chained image, none ends the run
            chain_of[img_par] <= in_valid;
            if (!in_valid) begin
              tail_pad  <= 1'b1;
              final_img <= !img_par;
              state     <= S_FLUSH;
              flush_n   <= 0;
            end
          end
          if (in_valid) begin
            if (in_col == idx_t'(N - 1)) begin
              in_col <= '0;
              if (in_row == idx_t'(N - 1)) begin
                in_row  <= '0;
                img_par <= !img_par;
                ended   <= 1'b1;
              end else begin
                in_row <= in_row + 1'b1;
              end
            end else begin
              in_col <= in_col + 1'b1;
            end
          end
        end
        S_FLUSH: begin
          flush_n <= flush_n + 1;
          if (flush_n == HALF - 1) state <= S_DRAIN;
        end
        S_DRAIN: if (all_done_h && all_done_g) begin
          done     <= 1'b1;
          tail_pad <= 1'b0;
          state    <= S_IN;
        end
        default: state <= S_IN;
      endcase
    end
  end

  // --------------------------------------------------- coefficient bank
  coef_t h_coef [L/2+1];
  coef_t g_coef [L/2+1];

  coef_bank #(.L(L), .H_INIT(H_COEF), .G_INIT(G_COEF)) u_coef (
    .clk, .rst_n,
    .we    (coef_we),
    .sel_g (coef_sel_g),
    .idx   (coef_idx),
    .wdata (coef_wdata),
    .h_coef,
    .g_coef
  );

  // ------------------------------------------------------------------ HF1
  rowout_t hf1_out;

  row_filter #(
    .L(L), .CTX(1), .LVL0(1), .IN_W(9), .FRAC(FRAC)
  ) u_hf1 (
    .clk, .rst_n, .h_coef, .g_coef,
    .push         (hf1_push),
    .ctx          (1'b0),
    .sample_valid (hf1_sv),
    .img          (img_par),
    .row          (in_row),
    .col          (in_col),
    .data         ({1'b0, in_pixel}),
    .out          (hf1_out)
  );

  // ------------------------------------------------------------------ HF2
  rowout_t           hf2_out;
  logic              hf2_push, hf2_sv;
  logic [CTX2_W-1:0] hf2_ctx;
  idx_t              hf2_row, hf2_col;
  data_t             hf2_data;
  int                hf2_flush [CTX2];

  // HH of level l (< LEVELS) from VF1 is the input of level l+1 = context l-1.
  always_comb begin
    hf2_push = 1'b0;
    hf2_sv   = 1'b0;
    hf2_ctx  = '0;
    hf2_row  = out_h.row;
    hf2_col  = out_h.col;
    hf2_data = out_h.data;
    if (out_h.valid && out_h.band == SB_HH && int'(out_h.lvl) < LEVELS) begin
      hf2_push = 1'b1;
      hf2_sv   = 1'b1;
      hf2_ctx  = CTX2_W'(int'(out_h.lvl) - 1);
    end else begin
      for (int c = CTX2 - 1; c >= 0; c--)
        if (hf2_flush[c] != 0) begin
          hf2_push = 1'b1;
          hf2_ctx  = CTX2_W'(c);
        end
    end
  end

  // After the last HH sample of a level, push L/2 flush samples into its context.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < CTX2; c++) hf2_flush[c] <= 0;
    end else if (hf2_push) begin
      if (hf2_sv) begin
        if (tail_pad && out_h.img == final_img && hf2_row == idx_t'((N >> (int'(hf2_ctx) + 1)) - 1) &&
            hf2_col == idx_t'((N >> (int'(hf2_ctx) + 1)) - 1))
          hf2_flush[hf2_ctx] <= HALF;
      end else begin
        hf2_flush[hf2_ctx] <= hf2_flush[hf2_ctx] - 1;
      end
    end
  end

  row_filter #(
    .L(L), .CTX(CTX2), .LVL0(2), .IN_W(DATA_W), .FRAC(FRAC)
  ) u_hf2 (
    .clk, .rst_n, .h_coef, .g_coef,
    .push         (hf2_push),
    .ctx          (hf2_ctx),
    .sample_valid (hf2_sv),
    .img          (out_h.img),
    .row          (hf2_row),
    .col          (hf2_col),
    .data         (hf2_data),
    .out          (hf2_out)
  );

  // ------------------------------------------------- schedule and routing
  vop_t dir_h, dir_g, fin_h, fin_g, op_h, op_g;
  logic ff_h, ff_g, pad_h, pad_g;

  function automatic vop_t to_vop(rowout_t r);
    vop_t v;
    v.valid = r.valid;
    v.img   = r.img;
    v.lvl   = r.lvl;
    v.pad   = 1'b0;
    v.row   = r.row;
    v.col   = r.col;
    v.data  = r.data;
    return v;
  endfunction

  always_comb begin
    dir_h = to_vop(hf1_out);
    dir_g = to_vop(hf1_out);
    fin_h = to_vop(hf2_out);
    fin_g = to_vop(hf2_out);
    dir_h.valid = hf1_out.valid && !hf1_out.hp;
    dir_g.valid = hf1_out.valid &&  hf1_out.hp;
    fin_h.valid = hf2_out.valid && !hf2_out.hp;
    fin_g.valid = hf2_out.valid &&  hf2_out.hp;
  end

  vf_scheduler #(.N(N), .L(L), .LEVELS(LEVELS), .DEPTH(FIFO_DEPTH)) u_sched_h (
    .clk, .rst_n, .clear(done), .pad_en(tail_pad), .final_img, .direct(dir_h), .fifo_in(fin_h), .op(op_h),
    .from_fifo(ff_h), .from_pad(pad_h), .all_done(all_done_h), .overflow(ovf_h)
  );

  vf_scheduler #(.N(N), .L(L), .LEVELS(LEVELS), .DEPTH(FIFO_DEPTH)) u_sched_g (
    .clk, .rst_n, .clear(done), .pad_en(tail_pad), .final_img, .direct(dir_g), .fifo_in(fin_g), .op(op_g),
    .from_fifo(ff_g), .from_pad(pad_g), .all_done(all_done_g), .overflow(ovf_g)
  );

  assign error = ovf_h | ovf_g;

  // ------------------------------------------------------ storage unit
  data_t taps_h [L-1];
  data_t taps_g [L-1];

  storage_unit #(.N(N), .L(L), .LEVELS(LEVELS)) u_store (
    .clk,
    .op_h   (op_h),
    .taps_h (taps_h),
    .op_g   (op_g),
    .taps_g (taps_g)
  );

  // ---------------------------------------------------------- VF1, VF2
  column_filter #(
    .N(N), .L(L), .BAND(0), .FRAC(FRAC)
  ) u_vf1 (
    .clk, .rst_n, .h_coef, .g_coef, .op(op_h), .chain(chain_of[op_h.img]), .stored(taps_h), .out(out_h)
  );

  column_filter #(
    .N(N), .L(L), .BAND(1), .FRAC(FRAC)
  ) u_vf2 (
    .clk, .rst_n, .h_coef, .g_coef, .op(op_g), .chain(chain_of[op_g.img]), .stored(taps_g), .out(out_g)
  );

  initial begin
    assert (LEVELS >= 2 && N % (1 << LEVELS) == 0 && (N >> (LEVELS - 1)) >= L - 1)
      else $error("dwt2d_top: need LEVELS >= 2, N a multiple of 2^LEVELS, last band at least L-1 rows");
  end

endmodule
