// tb_asar_core: self-checking test of one ASAR engine (training length cut
// to 2^6 samples to keep the run short).
//
// Stimulus: two channels carry independent small "neural" noise. From sample
// 400 on, a biphasic stimulation artifact of +/-6000 LSB and 12 samples
// appears on the template channel every 150 samples; the channel being
// cleaned sees the same artifact delayed by 2 samples and scaled by 0.7
// (the unknown tissue/electrode mapping the filter must learn).
// Checks:
//   * phase I lasts N+1 samples (train_mode_id), then det_enable rises;
//   * with no artifact the output is the input delayed by exactly 4 clocks;
//   * during artifacts, after the first two pulses, the residual artifact
//     energy in the output is at least 25 dB below the artifact energy;
//   * the artifact flag is raised during pulses;
//   * calc_rst restarts training for another N+1 samples.
module tb_asar_core;
  import asar_pkg::*;

  localparam int W = 16;
  localparam int LOG2N = 6;
  localparam int N = 1 << LOG2N;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic calc_rst = 1'b0;
  logic [1:0] thresh_scale = 2'd1;
  logic signed [W-1:0] ch_clean = '0, ch_template = '0;
  logic train_mode_id, det_enable, artifact_det;
  logic signed [W-1:0] output_clean;

  int checks = 0, failures = 0;

  asar_core #(.W(W), .LOG2N(LOG2N)) dut (
    .clk, .global_rst_n(rst_n), .calc_rst, .smp_en(1'b1), .thresh_scale,
    .ch_clean, .ch_template, .train_mode_id, .det_enable, .artifact_det,
    .output_clean);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int artifact(int t);
    int p;
    if (t < 400) return 0;
    p = (t - 400) % 150;
    if (p < 6)  return 6000 - p * 300;
    if (p < 12) return -4000 + (p - 6) * 300;
    return 0;
  endfunction

  // no artifact on either channel that can reach the output of sample k
  function automatic bit quiet(int k);
    for (int l = 0; l <= 17; l++)
      if (artifact(k - l) != 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int noise();
    return int'($urandom_range(0, 40)) - 20;
  endfunction

  int neural_c [$];          // true neural signal of ch_clean, by sample
  logic signed [W-1:0] in_hist [$];
  real e_art, e_res;
  int det_cnt, pass_ok, pass_cnt, train_len;

  task automatic run_samples(int n0, int n1);
    for (int t = n0; t < n1; t++) begin
      int nc, nt, a_c;
      nc = noise();
      nt = noise();
      a_c = (artifact(t - 2) * 7) / 10;
      ch_clean    = W'(nc + a_c);
      ch_template = W'(nt + artifact(t));
      neural_c.push_back(nc);
      in_hist.push_back(ch_clean);
      @(posedge clk);
      #1;
      // output now holds the sample presented 4 clocks ago, i.e. t-3
      if (t - 3 >= 0 && t - 3 >= n0) begin
        int k;
        k = t - 3;
        if (quiet(k)) begin
          pass_cnt++;
          if (output_clean == in_hist[k]) pass_ok++;
        end
        if (k >= 3000 && (artifact(k - 2) != 0)) begin
          e_art += real'((artifact(k - 2) * 7) / 10) ** 2;
          e_res += real'(int'(output_clean) - neural_c[k]) ** 2;
        end
        if (artifact_det) det_cnt++;
      end
    end
  endtask

  initial begin
    e_art = 0.0; e_res = 0.0; det_cnt = 0; pass_ok = 0; pass_cnt = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // phase I length, in clocks from the first sample after reset
    train_len = 0;
    fork
      begin
        @(posedge clk);
        while (train_mode_id) begin train_len++; @(posedge clk); end
      end
      run_samples(0, 4000);
    join
    checks++;
    // counted from the first sample: input register (1) + N accumulate + 1 store
    if (train_len != N + 2) begin
      failures++; $display("FAIL phase I length %0d expected %0d", train_len, N + 1);
    end
    checks++;
    if (!det_enable) begin failures++; $display("FAIL det_enable low in phase II"); end
    checks++;
    if (pass_cnt < 500 || pass_ok != pass_cnt) begin
      failures++; $display("FAIL pass-through %0d of %0d", pass_ok, pass_cnt);
    end
    checks++;
    if (det_cnt < 50) begin failures++; $display("FAIL artifact flag count %0d", det_cnt); end
    checks++;
    $display("artifact energy %f residual %f attenuation %f dB", e_art, e_res,
             10.0 * $log10(e_art / (e_res + 1.0)));
    if (e_res * 316.0 > e_art) begin failures++; $display("FAIL attenuation too low"); end
    // re-train
    calc_rst = 1'b1;
    @(posedge clk); #1 calc_rst = 1'b0;
    checks++;
    if (!train_mode_id || det_enable) begin failures++; $display("FAIL calc_rst did not restart phase I"); end
    repeat (N) @(posedge clk);
    #1;
    checks++;
    if (!train_mode_id) begin failures++; $display("FAIL retrain ended early"); end
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (train_mode_id) begin failures++; $display("FAIL retrain did not end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
