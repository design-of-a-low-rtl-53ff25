// tb_column_filter: VF1 (BAND 0) and VF2 (BAND 1) at N = 16, L = 5 with
// random operations: level 1..3, rows 0 .. R+1 (the last two are boundary
// pad rows), random column, image parity, chain flag, sample and stored rows.
// One cycle later each filter must show an output exactly when the centre
// row r-2 is a real row: inside the band, or (chain = 1, r < 2) row R+r-2 of
// the previous image. Sub-band (HH/HG or GH/GG by centre-row parity), image,
// level, row, column and the zero-extended filter value are checked.
`timescale 1ns/1ps
module tb_column_filter;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 16, L = 5, HALF = L / 2;

  logic      clk = 0, rst_n = 0;
  vop_t      op = '0;
  logic      chain = 0;
  data_t     stored [L-1];
  coef_out_t out0, out1;
  int        checks = 0, failures = 0;

  column_filter #(.N(N), .L(L), .BAND(0)) dut0 (.clk, .rst_n, .h_coef(H53), .g_coef(G53), .op, .chain, .stored, .out(out0));
  column_filter #(.N(N), .L(L), .BAND(1)) dut1 (.clk, .rst_n, .h_coef(H53), .g_coef(G53), .op, .chain, .stored, .out(out1));

  always #5 clk = ~clk;

  task automatic check(coef_out_t o, int b, bit ev, int e, int rc, vop_t q, bit eimg);
    subband_e eb;
    checks++;
    if (b == 0) eb = rc[0] ? SB_HG : SB_HH;
    else        eb = rc[0] ? SB_GG : SB_GH;
    if (o.valid != ev) begin
      failures++;
      $display("FAIL: band %0d lvl %0d row %0d valid=%0d expected %0d", b, q.lvl, q.row, o.valid, ev);
    end else if (ev && (int'(o.data) != e || o.band != eb || o.lvl != q.lvl || o.img != eimg ||
                        int'(o.row) != rc / 2 || o.col != q.col)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: band %0d lvl %0d row %0d got %0d/%0d (%0d,%0d) expected %0d/%0d (%0d,%0d)",
                 b, q.lvl, q.row, o.data, o.band, o.row, o.col, e, eb, rc / 2, q.col);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int l, rows, r, rc, crow, e0, e1;
      int seq[];
      bit ev, prev;
      vop_t q;
      @(negedge clk);
      l    = $urandom_range(1, 3);
      rows = N >> (l - 1);
      r    = $urandom_range(0, rows + HALF - 1);
      q.valid = ($urandom_range(0, 5) != 0);
      q.img   = $urandom_range(0, 1);
      chain   = $urandom_range(0, 1);
      q.lvl   = lvl_t'(l);
      q.pad   = (r >= rows);
      q.row   = idx_t'(r);
      q.col   = idx_t'($urandom_range(0, (N >> l) - 1));
      q.data  = data_t'($urandom_range(0, 4000) - 2000);
      op = q;
      for (int i = 0; i < L-1; i++) stored[i] = data_t'($urandom_range(0, 4000) - 2000);
      // column window: rows r-L+1 .. r, index = row - (r-L+1)
      seq = new[L];
      for (int i = 0; i < L; i++) begin
        automatic int rr = r - (L - 1) + i;
        automatic int v  = (i == L - 1) ? int'(q.data) : int'(stored[L - 2 - i]);
        if (r - HALF < 0) seq[i] = (rr < 0) ? v : 0;     // centre in the previous image
        else              seq[i] = (rr >= 0 && rr < rows) ? v : 0;
      end
      rc   = r - HALF;
      prev = (rc < 0);
      crow = prev ? rows + rc : rc;
      ev   = q.valid && (prev ? chain : rc < rows);
      e0   = fir(seq, L, HALF, crow[0], H53, G53, 8);
      e1 = e0;
      @(posedge clk);
      @(negedge clk);
      check(out0, 0, ev, e0, crow, q, prev ? !q.img : q.img);
      check(out1, 1, ev, e1, crow, q, prev ? !q.img : q.img);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
