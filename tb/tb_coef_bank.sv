// tb_coef_bank: reset values (the 5/3 pair), then random single-coefficient
// writes to g and h registers, including an out-of-range index that must be
// ignored; after every write both register sets are compared with a model.
`timescale 1ns/1ps
module tb_coef_bank;
  import dwt_pkg::*;

  localparam int L = 5;

  logic       clk = 0, rst_n = 0, we = 0, sel_g = 0;
  logic [1:0] idx = 0;
  coef_t      wdata = 0;
  coef_t      h_coef [L/2+1];
  coef_t      g_coef [L/2+1];
  coef_t      mh [L/2+1];
  coef_t      mg [L/2+1];
  int         checks = 0, failures = 0;

  coef_bank #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare();
    for (int i = 0; i <= L/2; i++) begin
      checks += 2;
      if (h_coef[i] != mh[i]) begin failures++; $display("FAIL: h%0d = %0d expected %0d", i, h_coef[i], mh[i]); end
      if (g_coef[i] != mg[i]) begin failures++; $display("FAIL: g%0d = %0d expected %0d", i, g_coef[i], mg[i]); end
    end
  endtask

  initial begin
    mh = '{-16'sd32, 16'sd64, 16'sd192};
    mg = '{16'sd0, -16'sd128, 16'sd256};
    repeat (2) @(posedge clk);
    #1;
    compare();
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int i;
      @(negedge clk);
      i     = $urandom_range(0, 3);
      we    = ($urandom_range(0, 3) != 0);
      sel_g = $urandom_range(0, 1);
      idx   = 2'(i);
      wdata = coef_t'($urandom);
      @(posedge clk);
      if (we && i <= L/2) begin
        if (sel_g) mg[i] = wdata; else mh[i] = wdata;
      end
      @(negedge clk);
      we = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
