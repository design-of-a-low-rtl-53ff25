// tb_dwt2d_top: end-to-end test of the 3-level 2-D DWT at N = 32.
//
// Three runs of images. Within a run the images are streamed back to back
// (the first pixel of an image follows the last pixel of the one before in
// the next cycle), so each image is completed by the first rows of the next;
// the last image of a run is completed with flush samples and pad rows.
//   run 1: one random image, random input gaps;
//   run 2: checkerboard, random, random, no gaps (period must be N*N);
//   run 3: after a new coefficient pair has been written through the
//          coefficient port, two random images with gaps inside the images.
// Every coefficient on out_h / out_g is matched by image, band, level, row and
// column against the array model of dwt_ref_pkg, and every expected
// coefficient must appear exactly once. With an uninterrupted input the last
// image of a run must end within N*N + 3N cycles of its first pixel. The
// testbench also counts how often each mechanism of the schedule happened
// and fails if any never did.
`timescale 1ns/1ps
module tb_dwt2d_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N      = 32;
  localparam int LEVELS = 3;
  localparam int FRAC   = 8;

  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, in_ready;
  logic [7:0] in_pixel = 0;
  logic       coef_we = 0, coef_sel_g = 0;
  logic [1:0] coef_idx = 0;
  coef_t      coef_wdata = 0;
  coef_out_t  out_h, out_g;
  logic       done, error;
  coef_t      cur_h [3];
  coef_t      cur_g [3];

  dwt2d_top #(.N(N), .LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_v [longint];
  int seen  [longint];
  int n_exp = 0;
  int par_to_idx [2] = '{0, 0};
  int cyc = 0;

  // mechanism counters
  int n_fifo = 0, n_hold = 0, n_pad = 0, n_wrap = 0, n_hf1_flush = 0,
      n_hf2_flush = 0, n_switch = 0, n_gaps = 0, n_chain = 0, n_prev = 0, n_reload = 0;
  int last_ctx = -1;

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (dut.ff_h || dut.ff_g) n_fifo++;
    if (dut.dir_h.valid && dut.fin_h.valid) n_hold++;
    if (dut.dir_g.valid && dut.fin_g.valid) n_hold++;
    if (dut.pad_h || dut.pad_g) n_pad++;
    if (dut.hf1_out.valid && dut.hf1_push && dut.hf1_sv && dut.in_row != dut.hf1_out.row) n_wrap++;
    if (dut.state == 2'd1) n_hf1_flush++;
    if (dut.hf2_push && !dut.hf2_sv) n_hf2_flush++;
    if (dut.hf2_push) begin
      if (last_ctx >= 0 && last_ctx != int'(dut.hf2_ctx)) n_switch++;
      last_ctx = int'(dut.hf2_ctx);
    end
    if (dut.ended && in_valid) n_chain++;
    if ((dut.u_vf1.centre_ok && dut.u_vf1.prev) || (dut.u_vf2.centre_ok && dut.u_vf2.prev)) n_prev++;
    if (in_ready && !in_valid && dut.in_row != 0) n_gaps++;
    if (error) begin
      failures++;
      $display("FAIL: FIFO overflow flagged");
    end
  end

  function automatic longint ikey(int idx, int band, int lvl, int row, int col);
    return (longint'(idx) << 40) + key(band, lvl, row, col);
  endfunction

  task automatic check_out(coef_out_t o);
    longint k;
    int     idx;
    if (!o.valid) return;
    idx = par_to_idx[int'(o.img)];
    k = ikey(idx, int'(o.band), int'(o.lvl), int'(o.row), int'(o.col));
    checks++;
    if (!exp_v.exists(k)) begin
      failures++;
      $display("FAIL: unexpected coefficient image %0d band=%0d lvl=%0d row=%0d col=%0d",
               idx, o.band, o.lvl, o.row, o.col);
    end else begin
      if (seen.exists(k)) begin
        failures++;
        $display("FAIL: duplicate coefficient image %0d band=%0d lvl=%0d (%0d,%0d)",
                 idx, o.band, o.lvl, o.row, o.col);
      end
      seen[k] = 1;
      if (int'(o.data) != exp_v[k]) begin
        failures++;
        if (failures < 20)
          $display("FAIL: image %0d band=%0d lvl=%0d (%0d,%0d) got %0d expected %0d",
                   idx, o.band, o.lvl, o.row, o.col, o.data, exp_v[k]);
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    check_out(out_h);
    check_out(out_g);
  end

  int img_count = 0;

  // Stream `count` images back to back; kinds[i] 0 = random, 1 = checkerboard.
  task automatic run_images(int count, int kinds [], bit gaps);
    int t_first [];
    int t_done;
    t_first = new[count];
    exp_v.delete();
    seen.delete();
    n_exp = 0;
    for (int m = 0; m < count; m++) begin
      int img [];
      int e [longint];
      int idx, p;
      img = new[N * N];
      foreach (img[i])
        img[i] = (kinds[m] == 0) ? $urandom_range(0, 255) : (((((i / N) + (i % N)) % 2) != 0) ? 255 : 0);
      dwt2d(img, N, LEVELS, cur_h, cur_g, FRAC, e);
      foreach (e[k]) exp_v[(longint'(img_count) << 40) + k] = e[k];
      n_exp += e.num();
      p = 0;
      while (p < N * N) begin
        @(negedge clk);
        in_valid = (gaps && p != 0) ? ($urandom_range(0, 3) != 0) : 1'b1;
        in_pixel = 8'(img[p]);
        @(posedge clk);
        if (in_valid && in_ready) begin
          if (p == 0) begin
            t_first[m] = cyc;
            par_to_idx[img_count % 2] = img_count;
          end
          p++;
        end
      end
      img_count++;
    end
    @(negedge clk);
    in_valid = 0;
    while (!done) @(posedge clk);
    t_done = cyc;
    @(negedge clk);
    checks++;
    if (seen.num() != n_exp) begin
      failures++;
      $display("FAIL: %0d of %0d coefficients produced", seen.num(), n_exp);
    end
    $display("run of %0d image(s), gaps=%0d: last image %0d cycles first pixel to done (N*N=%0d), %0d coefficients",
             count, gaps, t_done - t_first[count-1], N * N, seen.num());
    if (!gaps) begin
      for (int m = 1; m < count; m++) begin
        checks++;
        if (t_first[m] - t_first[m-1] != N * N) begin
          failures++;
          $display("FAIL: period %0d, expected N*N", t_first[m] - t_first[m-1]);
        end
      end
      checks++;
      if (t_done - t_first[count-1] > N * N + 3 * N) begin
        failures++;
        $display("FAIL: cycle count %0d above N*N+3N", t_done - t_first[count-1]);
      end
    end
  endtask

  // Write a new coefficient set through the coefficient port.
  task automatic load_coefs(coef_t h [3], coef_t g [3]);
    for (int i = 0; i < 3; i++)
      for (int sg = 0; sg < 2; sg++) begin
        @(negedge clk);
        coef_we    = 1;
        coef_sel_g = sg[0];
        coef_idx   = 2'(i);
        coef_wdata = sg ? g[i] : h[i];
      end
    @(negedge clk);
    coef_we = 0;
    cur_h = h;
    cur_g = g;
    n_reload++;
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-34s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism %s never happened", name);
    end
  endtask

  initial begin
    coef_t h2 [3], g2 [3];
    cur_h = H53;
    cur_g = G53;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_images(1, '{0}, 1);
    run_images(3, '{1, 0, 0}, 0);
    // another symmetric pair: h = (-3, 5, 12, 5, -3)/16, g = (1, -6, 10, -6, 1)/16 in Q8
    h2 = '{-16'sd48, 16'sd80, 16'sd192};
    g2 = '{16'sd16, -16'sd96, 16'sd160};
    load_coefs(h2, g2);
    run_images(2, '{0, 0}, 1);
    mech("higher level from FIFO", n_fifo);
    mech("FIFO holds while level 1 runs", n_hold);
    mech("boundary pad rows", n_pad);
    mech("row end wrapped to next row", n_wrap);
    mech("HF1 flush", n_hf1_flush);
    mech("HF2 flush", n_hf2_flush);
    if (LEVELS > 2) mech("HF2 level switch", n_switch);   // needs two HF2 levels
    mech("images chained", n_chain);
    mech("image completed by next image", n_prev);
    mech("input gaps", n_gaps);
    mech("coefficient reload", n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N * N + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
