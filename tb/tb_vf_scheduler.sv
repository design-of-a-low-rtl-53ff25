// tb_vf_scheduler: one vertical-filter schedule at N = 16, LEVELS = 3, FIFO
// depth 4. Level-1 operations arrive on `direct` every other cycle while
// level-2 and level-3 operations are pushed into the FIFO at random times.
// Each cycle the issued operation must be: the direct one if present, else
// the FIFO head (order kept), else a pad operation. Pad operations of a level
// must only follow that level's last real operation and must walk rows
// R, R+1 and columns 0..C-1 in order, 2C of them per level; all_done must
// rise only after every level's pads and fall again on clear. The FIFO must
// never overflow.
`timescale 1ns/1ps
module tb_vf_scheduler;
  import dwt_pkg::*;

  localparam int N = 16, L = 5, LEVELS = 3, DEPTH = 4;

  logic clk = 0, rst_n = 0, clear = 0, pad_en = 1, final_img = 1;
  vop_t direct = '0, fifo_in = '0, op;
  logic from_fifo, from_pad, all_done, overflow;
  int   checks = 0, failures = 0;

  vf_scheduler #(.N(N), .L(L), .LEVELS(LEVELS), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  vop_t model_q [$];
  vop_t l1_q [$], hi_q [$];
  bit   last_seen [LEVELS+1];
  int   pad_n [LEVELS+1];
  int   pads_total = 0;

  function automatic vop_t mk(int l, int r, int c);
    vop_t v;
    v.valid = 1; v.img = 1; v.lvl = lvl_t'(l); v.pad = 0;
    v.row = idx_t'(r); v.col = idx_t'(c); v.data = data_t'($urandom);
    return v;
  endfunction

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL: %s", s);
  endtask

  // checker, sampled before the clock edge
  always @(negedge clk) if (rst_n) begin
    #2;
    checks++;
    if (direct.valid) begin
      if (op != direct || from_fifo || from_pad) fail("direct operation not issued first");
    end else if (model_q.size() != 0) begin
      if (op != model_q[0] || !from_fifo) fail("FIFO head not issued in order");
    end else if (op.valid) begin
      int l, c, idx;
      l = int'(op.lvl);
      if (!from_pad || !op.pad || op.img != final_img) fail("unexpected operation source");
      else if (!last_seen[l]) fail($sformatf("pad row of level %0d before its last real operation", l));
      else begin
        c   = N >> l;
        idx = pad_n[l];
        if (int'(op.row) != (N >> (l - 1)) + idx / c || int'(op.col) != idx % c)
          fail($sformatf("pad op lvl %0d got (%0d,%0d) as number %0d", l, op.row, op.col, idx));
        pad_n[l]++;
        pads_total++;
      end
    end
    if (op.valid && !op.pad && int'(op.row) == (N >> (int'(op.lvl) - 1)) - 1 &&
        int'(op.col) == (N >> int'(op.lvl)) - 1)
      last_seen[int'(op.lvl)] = 1;
    if (all_done) begin
      for (int l = 1; l <= LEVELS; l++)
        if (pad_n[l] != 2 * (N >> l)) begin
          fail("all_done before all pad rows");
          break;
        end
    end
    if (overflow) fail("FIFO overflow");
  end

  // model FIFO bookkeeping at the clock edge
  always @(posedge clk) if (rst_n) begin
    if (!direct.valid && model_q.size() != 0) void'(model_q.pop_front());
    if (fifo_in.valid) model_q.push_back(fifo_in);
  end

  initial begin
    for (int l = 0; l <= LEVELS; l++) begin last_seen[l] = 0; pad_n[l] = 0; end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N / 2; c++) l1_q.push_back(mk(1, r, c));
    for (int l = 2; l <= LEVELS; l++)
      for (int r = 0; r < (N >> (l - 1)); r++)
        for (int c = 0; c < (N >> l); c++) hi_q.push_back(mk(l, r, c));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000 && !all_done; cyc++) begin
      @(negedge clk);
      direct  = '0;
      fifo_in = '0;
      if (cyc % 2 == 0 && l1_q.size() != 0) direct = l1_q.pop_front();
      if (hi_q.size() != 0 && model_q.size() < DEPTH - 1 && $urandom_range(0, 2) == 0 &&
          (l1_q.size() < 100 || hi_q[0].lvl == 2))
        fifo_in = hi_q.pop_front();
    end
    @(negedge clk);
    direct = '0; fifo_in = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (!all_done || pads_total != 2 * (N/2 + N/4 + N/8))
      fail($sformatf("all_done=%0d with %0d pad operations", all_done, pads_total));
    clear = 1;
    @(negedge clk);
    clear = 0;
    @(negedge clk);
    checks++;
    if (all_done) fail("all_done not cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
