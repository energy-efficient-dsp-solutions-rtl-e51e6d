// tb_asar_template_detect: checks the blind template detector against
// u(l) = x(i-l) if |x(i-l) - avg| >= alpha*std else 0, for all 16 entries,
// with random samples (mostly small, some large "artifact" values), random
// mean, standard deviation and threshold scale, and with detection disabled.
// Also checks that entry 0 follows the input in the same cycle.
module tb_asar_template_detect;
  import asar_pkg::*;

  localparam int W = 16;
  localparam int M = NTAPS;
  localparam int STD_W = W + STD_FRAC + 1;

  logic clk = 1'b0, rst_n = 1'b0, smp_en = 1'b0, det_enable = 1'b0;
  logic [1:0] thresh_scale = '0;
  logic signed [W-1:0] x = '0, avg = '0;
  logic [STD_W-1:0] std_fx = '0;
  logic signed [W-1:0] u [M];
  int checks = 0, failures = 0;
  int hist [$];

  asar_template_detect #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nz;

  initial begin
    nz = 0;
    for (int l = 0; l < M; l++) hist.push_front(0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int v;
      if (i % 500 == 0) begin
        avg          = W'(int'($urandom_range(0, 400)) - 200);
        std_fx       = STD_W'($urandom_range(16, 16 * 300));
        thresh_scale = 2'($urandom_range(0, 3));
        det_enable   = (i % 1500) != 0;
      end
      if ($urandom_range(0, 9) == 0) v = int'($urandom_range(0, 60000)) - 30000;
      else v = int'(avg) + int'($urandom_range(0, 2000)) - 1000;
      if (v > 32767) v = 32767;
      if (v < -32768) v = -32768;
      x = W'(v);
      hist.push_front(v);
      void'(hist.pop_back());
      smp_en = 1'b1;
      #1;
      for (int l = 0; l < M; l++) begin
        int expv, d;
        real th;
        d = hist[l] - int'(avg);
        if (d < 0) d = -d;
        th = real'(int'(thresh_scale) + 2) * real'(std_fx) / 16.0;
        expv = (det_enable && real'(d) >= th) ? hist[l] : 0;
        checks++;
        if (int'(u[l]) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d l=%0d u=%0d expected %0d", i, l, u[l], expv);
        end
        if (expv != 0) nz++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (nz < 1000) begin failures++; $display("FAIL too few detections %0d", nz); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
