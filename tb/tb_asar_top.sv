// tb_asar_top: end-to-end test of asar_top with every parameter at its
// default (16-bit LFP and 12-bit Spike test designs, 32-channel / 4-engine
// sensing array, training length 2^13 samples).
//
// The two test designs run concurrently on their own clocks through
// tb_asar_serial_agent. The sensing array runs 11,000 samples: after
// training, channels 0-5 carry artifacts; engines 0-2 clean channels 1, 3
// and 5 from channels 0, 2 and 4, and engine 3 is also assigned to channel 1
// (from an artifact-free template) to exercise the engine priority. A bypass
// window and an external-data window follow. Mechanisms counted (each must
// occur): training, pass-through without artifact, template detection,
// re-training by calc_rst (both test designs), engine priority, ASAR bypass,
// external data.
module tb_asar_top;
  localparam int NCH = 32, NENG = 4, SEL_W = 5, LW = 16;
  localparam int N = 1 << 13;
  localparam int NS = N + 2800;

  logic lfp_clk = 1'b0, spk_clk = 1'b0, sns_clk = 1'b0;
  always #5 lfp_clk = ~lfp_clk;
  always #7 spk_clk = ~spk_clk;
  always #3 sns_clk = ~sns_clk;

  logic lfp_rst_n, lfp_calc_rst, lfp_frame, lfp_sdi_c, lfp_sdi_t;
  logic [1:0] lfp_ts;
  logic lfp_train, lfp_sdo, lfp_oframe;
  logic spk_rst_n, spk_calc_rst, spk_frame, spk_sdi_c, spk_sdi_t;
  logic [1:0] spk_ts;
  logic spk_train, spk_sdo, spk_oframe;

  logic sns_rst_n = 1'b0, sns_calc_rst = 1'b0, sns_smp_en = 1'b0;
  logic [1:0] sns_ts = 2'd1;
  logic sns_use_ext = 1'b0, sns_bypass = 1'b0;
  logic [NENG-1:0] sns_eng_en = 4'b1111;
  logic [SEL_W-1:0] sns_clean_sel [NENG];
  logic [SEL_W-1:0] sns_tmpl_sel  [NENG];
  logic signed [LW-1:0] sns_ch_in [NCH], sns_ext_in [NCH], sns_ch_out [NCH];
  logic sns_out_valid;
  logic [NENG-1:0] sns_train, sns_det;

  asar_top dut (
    .lfp_clk, .lfp_global_rst_n(lfp_rst_n), .lfp_calc_rst, .lfp_thresh_scale(lfp_ts),
    .lfp_frame_in(lfp_frame), .lfp_ch_clean_sdi(lfp_sdi_c), .lfp_ch_template_sdi(lfp_sdi_t),
    .lfp_train_mode_id(lfp_train), .lfp_output_clean_sdo(lfp_sdo), .lfp_output_frame(lfp_oframe),
    .spk_clk, .spk_global_rst_n(spk_rst_n), .spk_calc_rst, .spk_thresh_scale(spk_ts),
    .spk_frame_in(spk_frame), .spk_ch_clean_sdi(spk_sdi_c), .spk_ch_template_sdi(spk_sdi_t),
    .spk_train_mode_id(spk_train), .spk_output_clean_sdo(spk_sdo), .spk_output_frame(spk_oframe),
    .sns_clk, .sns_rst_n, .sns_calc_rst, .sns_smp_en, .sns_thresh_scale(sns_ts),
    .sns_use_ext_data(sns_use_ext), .sns_bypass_asar(sns_bypass), .sns_eng_en,
    .sns_clean_sel, .sns_tmpl_sel, .sns_ch_in, .sns_ext_in, .sns_ch_out,
    .sns_out_valid, .sns_train_mode_id(sns_train), .sns_artifact_det(sns_det));

  int l_checks, l_fail, l_train, l_quiet, l_art, l_retrain;
  int s_checks, s_fail, s_train, s_quiet, s_art, s_retrain;
  logic l_done, s_done;

  tb_asar_serial_agent #(.W(16), .LOG2N(13), .NS(N + 2400), .AMP(12000)) u_lfp_agent (
    .clk(lfp_clk), .rst_n(lfp_rst_n), .calc_rst(lfp_calc_rst), .thresh_scale(lfp_ts),
    .frame_in(lfp_frame), .sdi_c(lfp_sdi_c), .sdi_t(lfp_sdi_t),
    .train_mode_id(lfp_train), .sdo(lfp_sdo), .oframe(lfp_oframe),
    .checks(l_checks), .failures(l_fail), .n_train(l_train), .n_quiet(l_quiet),
    .n_art(l_art), .n_retrain(l_retrain), .done(l_done));

  tb_asar_serial_agent #(.W(12), .LOG2N(13), .NS(N + 2400), .AMP(1500)) u_spk_agent (
    .clk(spk_clk), .rst_n(spk_rst_n), .calc_rst(spk_calc_rst), .thresh_scale(spk_ts),
    .frame_in(spk_frame), .sdi_c(spk_sdi_c), .sdi_t(spk_sdi_t),
    .train_mode_id(spk_train), .sdo(spk_sdo), .oframe(spk_oframe),
    .checks(s_checks), .failures(s_fail), .n_train(s_train), .n_quiet(s_quiet),
    .n_art(s_art), .n_retrain(s_retrain), .done(s_done));

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge lfp_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sensing array ----------------
  localparam int T0 = N + 200;

  function automatic int artifact(int t);
    int p;
    if (t < T0) return 0;
    p = (t - T0) % 110;
    if (p < 5) return 9000 - 700 * p;
    if (p < 10) return -5000;
    return 0;
  endfunction

  function automatic int art_ch(int c, int t);
    case (c)
      0: return artifact(t);
      1: return (artifact(t - 1) * 8) / 10;
      2: return (artifact(t - 2) * 6) / 10;
      3: return (artifact(t - 5) * 9) / 10;
      4: return artifact(t - 1);
      5: return (artifact(t - 3) * 11) / 10;
      default: return 0;
    endcase
  endfunction

  int sig [NS][NCH], neu [NS][NCH];
  int n_byp, n_ext, n_det, n_prio, sns_trained;
  logic sns_done = 1'b0;

  initial begin
    real e_art [6], e_res [6];
    int mism;
    sns_clean_sel = '{5'd1, 5'd3, 5'd5, 5'd1};
    sns_tmpl_sel  = '{5'd0, 5'd2, 5'd4, 5'd7};
    foreach (e_art[c]) begin e_art[c] = 0; e_res[c] = 0; end
    mism = 0; n_byp = 0; n_ext = 0; n_det = 0; n_prio = 0; sns_trained = 0;
    foreach (sns_ch_in[c]) begin sns_ch_in[c] = '0; sns_ext_in[c] = '0; end
    repeat (3) @(posedge sns_clk);
    #1 sns_rst_n = 1'b1;
    for (int t = 0; t < NS + 4; t++) begin
      if (t < NS) begin
        sns_bypass  = (t >= NS - 600 && t < NS - 300);
        sns_use_ext = (t >= NS - 300);
        for (int c = 0; c < NCH; c++) begin
          neu[t][c] = int'($urandom_range(0, 30)) - 15;
          sig[t][c] = neu[t][c] + art_ch(c, t);
          sns_ch_in[c]  = sns_use_ext ? LW'($urandom) : LW'(sig[t][c]);
          sns_ext_in[c] = sns_use_ext ? LW'(sig[t][c]) : LW'($urandom);
        end
        sns_smp_en = 1'b1;
      end else sns_smp_en = 1'b0;
      @(posedge sns_clk); #1;
      if (t == N + 10 && sns_train == '0) sns_trained = 1;
      if (sns_det != '0) n_det++;
      if (t >= 3 && t - 3 < NS) begin
        int k;
        k = t - 3;
        for (int c = 0; c < NCH; c++) begin
          if (k >= NS - 600 && k < NS - 300) begin
            if (int'(sns_ch_out[c]) != sig[k][c]) mism++;
            if (c == 0) n_byp++;
          end else if (!(c == 1 || c == 3 || c == 5)) begin
            if (int'(sns_ch_out[c]) != sig[k][c]) mism++;
            if (k >= NS - 300 && c == 0) n_ext++;
          end else if (k > N + 1500 && k < NS - 600 && art_ch(c, k) != 0) begin
            e_art[c] += real'(art_ch(c, k)) ** 2;
            e_res[c] += real'(int'(sns_ch_out[c]) - neu[k][c]) ** 2;
          end
        end
      end
    end
    checks++;
    if (mism != 0) begin failures++; $display("FAIL sensing array: %0d uncleaned samples differ", mism); end
    checks++;
    if (!sns_trained) begin failures++; $display("FAIL sensing array engines still training"); end
    for (int c = 1; c <= 5; c += 2) begin
      checks++;
      $display("sensing channel %0d attenuation %f dB", c, 10.0 * $log10(e_art[c] / (e_res[c] + 1.0)));
      if (e_art[c] == 0.0 || e_res[c] * 100.0 > e_art[c]) begin
        failures++; $display("FAIL sensing channel %0d not cleaned", c);
      end else if (c == 1) n_prio++;
    end
    sns_done = 1'b1;
  end

  initial begin
    wait (l_done && s_done && sns_done);
    checks += l_checks + s_checks;
    failures += l_fail + s_fail;
    $display("mechanisms: lfp train=%0d quiet=%0d pulses=%0d retrain=%0d",
             l_train, l_quiet, l_art, l_retrain);
    $display("mechanisms: spk train=%0d quiet=%0d pulses=%0d retrain=%0d",
             s_train, s_quiet, s_art, s_retrain);
    $display("mechanisms: sense training=%0d detections=%0d priority=%0d bypass=%0d ext=%0d",
             sns_trained, n_det, n_prio, n_byp, n_ext);
    checks++;
    if (l_train == 0 || s_train == 0 || sns_trained == 0) begin failures++; $display("FAIL training never seen"); end
    checks++;
    if (l_quiet == 0 || s_quiet == 0) begin failures++; $display("FAIL pass-through never seen"); end
    checks++;
    if (l_art == 0 || s_art == 0 || n_det == 0) begin failures++; $display("FAIL no template detection"); end
    checks++;
    if (l_retrain == 0 || s_retrain == 0) begin failures++; $display("FAIL no re-training"); end
    checks++;
    if (n_prio == 0) begin failures++; $display("FAIL engine priority not exercised"); end
    checks++;
    if (n_byp == 0) begin failures++; $display("FAIL bypass never used"); end
    checks++;
    if (n_ext == 0) begin failures++; $display("FAIL external data never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
