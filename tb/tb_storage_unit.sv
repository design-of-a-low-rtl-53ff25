// tb_storage_unit: random shift operations on both ports (random level,
// column, pad flag) at N = 16, L = 5, LEVELS = 3. A model keeps the history of
// every (port, level, column); the taps read for an operation must equal the
// last L-1 values written to that column, newest first (zero for pad rows),
// once L-1 values have been written there.
`timescale 1ns/1ps
module tb_storage_unit;
  import dwt_pkg::*;

  localparam int N = 16, L = 5, LEVELS = 3;

  logic  clk = 0;
  vop_t  op_h = '0, op_g = '0;
  data_t taps_h [L-1];
  data_t taps_g [L-1];
  int    checks = 0, failures = 0;

  storage_unit #(.N(N), .L(L), .LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  int hist [longint][$];

  function automatic vop_t rand_op();
    vop_t o;
    int l;
    l       = $urandom_range(1, LEVELS);
    o.valid = ($urandom_range(0, 4) != 0);
    o.lvl   = lvl_t'(l);
    o.pad   = ($urandom_range(0, 7) == 0);
    o.row   = '0;
    o.col   = idx_t'($urandom_range(0, (N >> l) - 1));
    o.data  = data_t'($urandom);
    return o;
  endfunction

  task automatic check_port(int b, vop_t o, data_t t [L-1]);
    longint k;
    if (!o.valid) return;
    k = (longint'(b) * 16 + o.lvl) * 4096 + o.col;
    if (hist.exists(k) && hist[k].size() >= L-1) begin
      for (int i = 0; i < L-1; i++) begin
        checks++;
        if (int'(t[i]) != hist[k][hist[k].size()-1-i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: port %0d lvl %0d col %0d tap %0d got %0d expected %0d",
                     b, o.lvl, o.col, i, t[i], hist[k][hist[k].size()-1-i]);
        end
      end
    end
    hist[k].push_back(o.pad ? 0 : int'(o.data));
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      op_h = rand_op();
      op_g = rand_op();
      #1;
      check_port(0, op_h, taps_h);
      check_port(1, op_g, taps_g);
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
