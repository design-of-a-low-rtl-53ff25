// vf_scheduler: computation schedule of one vertical filter (VF1 or VF2).
//
// Work for a vertical filter comes from three places, taken in this fixed
// priority, one operation per cycle:
//   1. direct  - level-1 samples straight from HF1. HF1 alternates H and G
//                outputs, so each vertical filter gets one every other cycle
//                at most and is never refused; the input stream never stalls.
//   2. FIFO    - level 2..LEVELS samples from HF2, which fill the cycles that
//                level 1 leaves idle. A small FIFO (DEPTH entries) holds a
//                sample that arrives while the filter is busy.
//   3. padding - only for the last image of a run (pad_en = 1, image parity
//                final_img): once the last real sample of a level (row R-1,
//                column C-1) has been issued, L/2 boundary rows of C
//                operations each are issued for that level, lowest pending
//                level first. They produce the last output rows of the level.
//                An image followed directly by another needs no pad rows: the
//                next image's first rows complete it.
// This is a greedy form of the interleaved schedule of the architecture: an
// operation runs as soon as its inputs exist and the filter is idle, so the
// levels share the filter without any inter-level buffer beyond the FIFO.
// The priority order, the FIFO and the pad rows are this design's choices.
//
// op is combinational. all_done rises once the pad rows of every level have
// been issued; clear (one cycle, at the end of a run) re-arms the pad logic.
// overflow is sticky and should never be seen; an assertion checks it.
// from_fifo / from_pad flag which source op came from this cycle.
module vf_scheduler
  import dwt_pkg::*;
#(
  parameter int N      = 512,
  parameter int L      = 5,
  parameter int LEVELS = 3,
  parameter int DEPTH  = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic pad_en,
  input  logic final_img,
  input  vop_t direct,
  input  vop_t fifo_in,
  output vop_t op,
  output logic from_fifo,
  output logic from_pad,
  output logic all_done,
  output logic overflow
);

  localparam int HALF = L / 2;
  localparam int PW   = $clog2(DEPTH);

  // ---------------------------------------------------------------- FIFO
  vop_t          fifo [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [PW:0]   count;
  logic          pop, push;

  // ----------------------------------------------------------- pad rows
  logic [LEVELS-1:0] pend, done_l;
  logic              pad_active;
  lvl_t              plvl;
  idx_t              prow, pcol;
  idx_t              pad_cols;

  function automatic idx_t band_rows(lvl_t l);
    return idx_t'(N >> (int'(l) - 1));
  endfunction
  function automatic idx_t band_cols(lvl_t l);
    return idx_t'(N >> int'(l));
  endfunction

  assign push     = fifo_in.valid;
  assign pad_cols = band_cols(plvl);

  always_comb begin
    op        = '0;
    pop       = 1'b0;
    from_fifo = 1'b0;
    from_pad  = 1'b0;
    if (direct.valid) begin
      op = direct;
    end else if (count != 0) begin
      op        = fifo[rd_ptr];
      pop       = 1'b1;
      from_fifo = 1'b1;
    end else if (pad_active) begin
      op.valid = 1'b1;
      op.img   = final_img;
      op.lvl   = plvl;
      op.pad   = 1'b1;
      op.row   = band_rows(plvl) + prow;
      op.col   = pcol;
      op.data  = '0;
      from_pad = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count      <= '0;
      overflow   <= 1'b0;
      pend       <= '0;
      done_l     <= '0;
      pad_active <= 1'b0;
      plvl       <= lvl_t'(1);
      prow       <= '0;
      pcol       <= '0;
    end else begin
      // FIFO
      if (push) begin
        if (count == (PW+1)'(DEPTH) && !pop) begin
          overflow <= 1'b1;
        end else begin
          fifo[wr_ptr] <= fifo_in;
          wr_ptr       <= (wr_ptr == PW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
        end
      end
      if (pop)
        rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      if (push && !pop && count != (PW+1)'(DEPTH)) count <= count + 1'b1;
      else if (pop && !push)                       count <= count - 1'b1;

      // the last real operation of a level of the final image arms its pad rows
      if (op.valid && !op.pad && pad_en && op.img == final_img &&
          op.row == band_rows(op.lvl) - 1'b1 && op.col == band_cols(op.lvl) - 1'b1)
        pend[int'(op.lvl) - 1] <= 1'b1;

      if (clear) begin
        pend       <= '0;
        done_l     <= '0;
        pad_active <= 1'b0;
      end else if (!pad_active) begin
        for (int l = LEVELS - 1; l >= 0; l--)
          if (pend[l] && !done_l[l]) begin
            pad_active <= 1'b1;
            plvl       <= lvl_t'(l + 1);
            prow       <= '0;
            pcol       <= '0;
          end
      end else if (from_pad) begin
        if (pcol == pad_cols - 1'b1) begin
          pcol <= '0;
          if (prow == idx_t'(HALF - 1)) begin
            pad_active               <= 1'b0;
            done_l[int'(plvl) - 1]   <= 1'b1;
          end else begin
            prow <= prow + 1'b1;
          end
        end else begin
          pcol <= pcol + 1'b1;
        end
      end
    end
  end

  assign all_done = &done_l;

  // A FIFO entry is never dropped.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && count == (PW+1)'(DEPTH)))
    else $error("vf_scheduler: FIFO overflow");

endmodule
