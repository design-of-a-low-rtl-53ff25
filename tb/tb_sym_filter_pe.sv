// tb_sym_filter_pe: random and extreme windows through the symmetric filter
// arithmetic, lowpass and highpass, with the 5/3 coefficients and with random
// coefficient sets, compared with a direct convolution sum
// (dwt_ref_pkg::fir) including rounding and 16-bit saturation.
`timescale 1ns/1ps
module tb_sym_filter_pe;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int L = 5;

  data_t tap [L];
  logic  hp;
  data_t y;
  coef_t hc [L/2+1];
  coef_t gc [L/2+1];
  int    checks = 0, failures = 0;

  sym_filter_pe #(.L(L), .IN_W(DATA_W), .FRAC(8)) dut (.tap(tap), .h_coef(hc), .g_coef(gc), .hp(hp), .y(y));

  task automatic check_one();
    int seq[];
    int e;
    seq = new[L];
    foreach (seq[i]) seq[i] = int'(tap[i]);
    e = fir(seq, L, L/2, hp, hc, gc, 8);
    #1;
    checks++;
    if (int'(y) != e) begin
      failures++;
      if (failures < 10)
        $display("FAIL: taps %0d %0d %0d %0d %0d hp=%0d got %0d expected %0d",
                 tap[0], tap[1], tap[2], tap[3], tap[4], hp, y, e);
    end
  endtask

  initial begin
    hc = H53;
    gc = G53;
    for (int n = 0; n < 6000; n++) begin
      if (n >= 4000)
        for (int i = 0; i <= L/2; i++) begin
          hc[i] = coef_t'($urandom_range(0, 1024) - 512);
          gc[i] = coef_t'($urandom_range(0, 1024) - 512);
        end
      for (int i = 0; i < L; i++)
        tap[i] = (n < 2000) ? data_t'($urandom_range(0, 255)) : data_t'($urandom);
      hp = n[0];
      check_one();
    end
    hc = H53;
    gc = G53;
    // extremes: saturation both ways
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < L; i++) tap[i] = (i == L/2) ? ((s < 2) ? 16'sh7fff : -16'sh8000) : ((s < 2) ? -16'sh8000 : 16'sh7fff);
      hp = s[0];
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
