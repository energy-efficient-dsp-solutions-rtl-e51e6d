// tb_asar_workloads: runs the stimulation patterns the ASAR engine is meant
// for through two engines at their default training length (2^13 samples):
// an LFP engine (16 bits, 6 kS/s) and a Spike engine (12 bits, 24 and
// 30 kS/s).
//
// Each scenario resets the engine, trains it on neural-like input (a 7 Hz
// tone plus noise on the cleaned channel, noise on the template channel) and
// then applies one of:
//   * a continuous train of biphasic pulses (rates and widths below);
//   * theta-burst stimulation: bursts of 4 pulses (250 us) at 100 Hz, 5
//     bursts per s.
// The stimulation current passes through one tissue response (a 0.8 ms
// decay with a mild quadratic distortion). The template electrode sees it
// at once with gain 1.2; the cleaned electrode sees it 0.17 ms later,
// smeared over two samples and with a smaller gain, on top of a neural tone
// 60 dB below the pulse amplitude. Per scenario it checks that the residual
// artifact over the second half of stimulation is at least 20 dB below the
// artifact, and that the output equals the input between pulses once the
// template has drained (where a fast train leaves such a gap at all).
// Pulse trains run at 130 Hz x 250 us and at the edges of the usual range,
// 300 Hz x 200 us and 50 Hz x 300 us. Attenuation is printed per scenario.
module tb_asar_workloads;
  localparam int LOG2N = 13;
  localparam int N = 1 << LOG2N;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b0;
  logic signed [15:0] l_clean = '0, l_tmpl = '0, l_out;
  logic signed [11:0] s_clean = '0, s_tmpl = '0, s_out;
  logic l_train, l_det, l_art, s_train, s_det, s_art;
  logic sel_spk = 1'b0;

  asar_core #(.W(16)) u_lfp (
    .clk, .global_rst_n(rst_n), .calc_rst(1'b0), .smp_en(!sel_spk), .thresh_scale(2'd1),
    .ch_clean(l_clean), .ch_template(l_tmpl), .train_mode_id(l_train),
    .det_enable(l_det), .artifact_det(l_art), .output_clean(l_out));

  asar_core #(.W(12)) u_spk (
    .clk, .global_rst_n(rst_n), .calc_rst(1'b0), .smp_en(sel_spk), .thresh_scale(2'd1),
    .ch_clean(s_clean), .ch_template(s_tmpl), .train_mode_id(s_train),
    .det_enable(s_det), .artifact_det(s_art), .output_clean(s_out));

  int checks = 0, failures = 0;

  initial begin
    repeat (12 * (N + 30000)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulation current (+1 / -1 / 0) at time ts seconds
  function automatic int stim(real ts, bit theta, real rate, real pw);
    real per, tp, tb;
    if (ts < 0.0) return 0;
    if (!theta) begin
      per = 1.0 / rate;
      tp = ts - per * $floor(ts / per);
    end else begin
      tb = ts - 0.2 * $floor(ts / 0.2);          // 5 bursts per second
      if (tb >= 0.04) return 0;                  // 4 pulses at 100 Hz
      tp = tb - 0.01 * $floor(tb / 0.01);
    end
    if (tp < pw / 2) return 1;
    if (tp < pw) return -1;
    return 0;
  endfunction

  task automatic scenario(bit spk, bit theta, real fs, int amp, int nstim,
                          real rate = 130.0, real pw = 250e-6);
    real a_s, a_n, k_s, vt_a, e_art, e_res, ph;
    int art_q [$], tart_q [$], neu_q [$], in_q [$];
    int pass_n, pass_ok, n_total, d_c, n_det, n_train;
    real dly [$];
    string name;
    name = theta ? "theta-burst" :
           $sformatf("%0d Hz %0d us pulse train", int'(rate), int'(pw * 1.0e6));
    name = $sformatf("%0s %0d kS/s %0s", spk ? "Spike" : "LFP", int'(fs / 1000.0), name);
    sel_spk = spk;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    a_s = 0; e_art = 0; e_res = 0; pass_n = 0; pass_ok = 0; n_det = 0; n_train = 0;
    k_s = $exp(-1.0 / (fs * 0.8e-3));
    d_c = int'(fs * 0.17e-3 + 0.5) + 1;
    dly = {};
    for (int l = 0; l <= d_c; l++) dly.push_back(0.0);
    n_total = N + 10 + nstim;
    for (int t = 0; t < n_total + 4; t++) begin
      real ts, st;
      int vt, vc, neu, art_c;
      ts = real'(t - N - 10) / fs;
      st = real'(stim(ts, theta, rate, pw)) * amp;
      // shared electrode / tissue response, including its non-linearity
      a_s = a_s * k_s + st * (1.0 - k_s) * 3.0;
      a_n = a_s + 0.4 * a_s * a_s / amp;
      // each electrode sees it with its own gain, delay and smearing
      dly.push_back(a_n);
      void'(dly.pop_front());
      vt_a = 1.2 * a_n;
      art_c = int'(0.6 * dly[0] + 0.2 * dly[1]);
      ph = 2.0 * 3.14159265 * 7.0 * real'(t) / fs;
      neu = int'(real'(amp) / 1000.0 * $sin(ph)) + int'($urandom_range(0, 10)) - 5;
      vt = int'(vt_a) + int'($urandom_range(0, 10)) - 5;
      vc = neu + art_c;
      tart_q.push_back(int'(vt_a));
      art_q.push_back(art_c); neu_q.push_back(neu); in_q.push_back(vc);
      if (spk) begin s_clean = 12'(vc); s_tmpl = 12'(vt); end
      else     begin l_clean = 16'(vc); l_tmpl = 16'(vt); end
      @(posedge clk); #1;
      if (t >= 3) begin
        int k, o;
        bit q;
        k = t - 3;
        o = spk ? int'(s_out) : int'(l_out);
        if (spk ? s_train : l_train) n_train++;
        if (spk ? s_art : l_art) n_det++;
        if ((spk ? s_det : l_det) == (spk ? s_train : l_train)) begin
          failures++; $display("FAIL %s det_enable not the inverse of train_mode_id", name);
        end
        q = 1'b1;
        for (int l = 0; l < 25 && l <= k; l++)
          if (art_q[k - l] > 2 || art_q[k - l] < -2 ||
              tart_q[k - l] > 2 || tart_q[k - l] < -2) q = 1'b0;
        if (k > N + 10 && q) begin pass_n++; if (o == in_q[k]) pass_ok++; end
        if (k > N + 10 + nstim / 2) begin
          e_art += real'(art_q[k]) ** 2;
          e_res += real'(o - neu_q[k]) ** 2;
        end
      end
    end
    // phase I covers the N training samples, then the engine must detect
    checks++;
    if (n_train < N - 4 || n_train > N + 4 || n_det == 0) begin
      failures++; $display("FAIL %s training %0d samples, %0d detections", name, n_train, n_det);
    end
    checks++;
    $display("%s: attenuation %0.1f dB, %0d quiet samples", name,
             10.0 * $log10(e_art / (e_res + 1.0)), pass_n);
    if (e_art == 0.0 || e_res * 100.0 > e_art) begin
      failures++; $display("FAIL %s attenuation below 20 dB", name);
    end
    // theta-burst always leaves 160 ms gaps; a fast train may leave none long
    // enough for the template to drain, and then there is nothing to check
    if (theta || pass_n > 0) checks++;
    if ((theta && pass_n < 100) || pass_ok != pass_n) begin
      failures++; $display("FAIL %s pass-through %0d of %0d", name, pass_ok, pass_n);
    end
  endtask

  initial begin
    scenario(1'b0, 1'b0, 6000.0, 8000, 6000);
    scenario(1'b0, 1'b1, 6000.0, 8000, 6000);
    scenario(1'b1, 1'b0, 24000.0, 1200, 24000);
    scenario(1'b1, 1'b1, 24000.0, 1200, 24000);
    scenario(1'b1, 1'b0, 30000.0, 1200, 30000);
    scenario(1'b1, 1'b1, 30000.0, 1200, 30000);
    // the edges of the pulse range: 300 Hz x 200 us and 50 Hz x 300 us
    scenario(1'b0, 1'b0, 6000.0, 8000, 6000, 300.0, 200e-6);
    scenario(1'b0, 1'b0, 6000.0, 8000, 6000, 50.0, 300e-6);
    scenario(1'b1, 1'b0, 30000.0, 1200, 30000, 300.0, 200e-6);
    scenario(1'b1, 1'b0, 30000.0, 1200, 30000, 50.0, 300e-6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
