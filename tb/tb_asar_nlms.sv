// tb_asar_nlms: checks the 16-tap NLMS filter sample by sample against a
// bit-true model kept in the testbench (64-bit integer arithmetic):
//   e  = d - round(u.w / 2^16)          (saturated to 24 bits)
//   g  = trunc(|e| * 2^(16+8-1) / (||u||^2 + 1)) with the sign of e
//   w += floor(u(l) * g / 2^8)          (saturated to 24 bits)
//   s  = d - round(u.w_new / 2^16)      (saturated to 16 bits)
// The stimulus has quiet stretches (u = 0, so s must equal d and the weights
// must hold) and artifact bursts in which d is 0.6 x u(3) plus noise. The
// test also checks that the weight of tap 3 converges near 0.6, that the
// output lags the input by two clocks, and that clr clears the weights.
module tb_asar_nlms;
  import asar_pkg::*;

  localparam int W = 16, M = 16, WW = 24, WF = 16, GB = 8;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, smp_en = 1'b0;
  logic signed [W-1:0] u [M];
  logic signed [W-1:0] d = '0, s;
  logic signed [WW-1:0] w [M];
  int checks = 0, failures = 0;

  asar_nlms #(.W(W), .M(M), .WW(WW), .WF(WF), .GB(GB), .MU_SHIFT(1), .EPS(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint rw [M];
  longint wmax, wmin;

  function automatic longint rdiv(longint a, int sh);   // round(a / 2^sh)
    return (a + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

  function automatic longint sat(longint a, int bits);
    longint hi, lo;
    hi = (64'sd1 <<< (bits - 1)) - 1;
    lo = -(64'sd1 <<< (bits - 1));
    return a > hi ? hi : (a < lo ? lo : a);
  endfunction

  longint exp_s, prev_exp_s;
  bit have_prev;
  int tmpl [$];

  initial begin
    for (int l = 0; l < M; l++) begin u[l] = '0; rw[l] = 0; end
    for (int l = 0; l < 40; l++) tmpl.push_front(0);
    have_prev = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    smp_en = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      longint acc, e, nrm, g, num;
      int a, dv;
      // artifact source: bursts of 10 samples every 60
      a = ((i % 60) < 10) ? ((i % 60) < 5 ? 3000 + 100 * (i % 60) : -2500) : 0;
      if (a != 0) a += int'($urandom_range(0, 20)) - 10;
      tmpl.push_front(a);
      void'(tmpl.pop_back());
      for (int l = 0; l < M; l++) u[l] = W'(tmpl[l]);
      dv = (tmpl[3] * 6) / 10 + int'($urandom_range(0, 30)) - 15;
      d = W'(dv);
      // model
      acc = 0;
      for (int l = 0; l < M; l++) acc += longint'(tmpl[l]) * rw[l];
      e = sat(longint'(dv) - rdiv(acc, WF), W + 8);
      nrm = 1;
      for (int l = 0; l < M; l++) nrm += longint'(tmpl[l]) * tmpl[l];
      num = (e < 0 ? -e : e) <<< (WF + GB - 1);
      g = num / nrm;
      if (e < 0) g = -g;
      for (int l = 0; l < M; l++) rw[l] = sat(rw[l] + ((longint'(tmpl[l]) * g) >>> GB), WW);
      acc = 0;
      for (int l = 0; l < M; l++) acc += longint'(tmpl[l]) * rw[l];
      exp_s = sat(longint'(dv) - rdiv(acc, WF), W);
      if (i == 2000) clr = 1'b1;
      @(posedge clk); #1;
      if (clr) begin
        clr = 1'b0;
        for (int l = 0; l < M; l++) rw[l] = 0;
        checks++;
        for (int l = 0; l < M; l++)
          if (w[l] != '0) begin failures++; $display("FAIL clr left w[%0d]=%0d", l, w[l]); break; end
        have_prev = 0;
        continue;
      end
      if (have_prev) begin
        checks++;
        if (longint'(s) != prev_exp_s) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d s=%0d expected %0d", i - 1, s, prev_exp_s);
        end
      end
      for (int l = 0; l < M; l++) begin
        checks++;
        if (longint'(w[l]) != rw[l]) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d w[%0d]=%0d expected %0d", i, l, w[l], rw[l]);
        end
      end
      prev_exp_s = exp_s;
      have_prev = 1;
      if (i == 1990) begin
        real w3;
        w3 = real'(w[3]) / 65536.0;
        $display("w[3] = %f", w3);
        checks++;
        if (w3 < 0.5 || w3 > 0.7) begin failures++; $display("FAIL w[3] did not converge"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
