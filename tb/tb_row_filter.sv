// tb_row_filter: the multi-context row filter as HF2 (two contexts, levels 2
// and 3). Context 0 gets a 16 x 16 block, context 1 an 8 x 8 block, pushed in
// random interleaving and followed by L/2 flush pushes each. After every push
// the registered output one cycle later must match the zero-extended 1-D
// transform of the centre sample's row: lowpass at even, highpass at odd
// columns, with the right level, row and decimated column, and no output
// where the centre is not a real sample.
`timescale 1ns/1ps
module tb_row_filter;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int L = 5, HALF = L / 2;

  logic    clk = 0, rst_n = 0;
  logic    push = 0, ctx = 0, sv = 0;
  idx_t    row = 0, col = 0;
  data_t   data = 0;
  rowout_t out;
  int      checks = 0, failures = 0;

  row_filter #(.L(L), .CTX(2), .LVL0(2), .IN_W(DATA_W)) dut (
    .clk, .rst_n, .h_coef(H53), .g_coef(G53), .push, .ctx, .sample_valid(sv), .img(1'b1), .row, .col, .data, .out);

  always #5 clk = ~clk;

  int size [2] = '{16, 8};
  int img  [2][];
  int pos  [2];          // pushes made per context (flush included)

  function automatic int expect_at(int c, int p, output bit v, output int r, output int j);
    int seq[];
    int s = size[c];
    v = 0; r = 0; j = 0;
    if (p < 0 || p >= s * s) return 0;
    v = 1;
    r = p / s;
    j = p % s;
    seq = new[s];
    for (int k = 0; k < s; k++) seq[k] = img[c][r*s + k];
    return fir(seq, s, j, j[0], H53, G53, 8);
  endfunction

  initial begin
    for (int c = 0; c < 2; c++) begin
      img[c] = new[size[c] * size[c]];
      foreach (img[c][i]) img[c][i] = $urandom_range(0, 2000) - 1000;
      pos[c] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (pos[0] < 256 + HALF || pos[1] < 64 + HALF) begin
      int c, p, e, r, j;
      bit v, go;
      @(negedge clk);
      go = ($urandom_range(0, 3) != 0);
      c  = $urandom_range(0, 1);
      if (pos[c] >= size[c]*size[c] + HALF) c = 1 - c;
      p = pos[c];
      push = go;
      ctx  = c[0];
      sv   = (p < size[c]*size[c]);
      row  = idx_t'(p / size[c]);
      col  = idx_t'(p % size[c]);
      data = sv ? data_t'(img[c][p]) : data_t'($urandom);
      @(posedge clk);
      if (go) pos[c]++;
      @(negedge clk);
      push = 0;
      if (go) begin
        e = expect_at(c, p - HALF, v, r, j);
        checks++;
        if (out.valid !== v) begin
          failures++;
          $display("FAIL: ctx %0d push %0d valid=%0d expected %0d", c, p, out.valid, v);
        end else if (v && (out.data != data_t'(e) || out.hp != j[0] || int'(out.row) != r ||
                           int'(out.col) != j / 2 || int'(out.lvl) != 2 + c || out.img != 1'b1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: ctx %0d row %0d col %0d got lvl=%0d hp=%0d (%0d,%0d) %0d expected %0d",
                     c, r, j, out.lvl, out.hp, out.row, out.col, out.data, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
