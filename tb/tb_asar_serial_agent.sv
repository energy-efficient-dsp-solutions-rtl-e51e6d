// tb_asar_serial_agent: drives and checks one standalone ASAR design through
// its serial pins (used by the top-level testbench for the LFP and the Spike
// design). It resets the design, sends NS samples one word per W clocks,
// decodes the serial output and checks:
//   * train_mode_id is high for N+1 samples after reset (phase I);
//   * outside artifacts each output word equals its input word;
//   * over the last third of the run the residual artifact is at least
//     20 dB below the artifact (template channel = artifact, cleaned channel
//     = 0.75 x artifact two samples later, plus independent noise);
//   * calc_rst after the run brings train_mode_id back high (re-training).
// It reports its counts and how often each mechanism occurred.
module tb_asar_serial_agent #(
  parameter int W     = 16,
  parameter int LOG2N = 13,
  parameter int NS    = 12000,
  parameter int AMP   = 8000
) (
  input  logic       clk,
  output logic       rst_n,
  output logic       calc_rst,
  output logic [1:0] thresh_scale,
  output logic       frame_in,
  output logic       sdi_c,
  output logic       sdi_t,
  input  logic       train_mode_id,
  input  logic       sdo,
  input  logic       oframe,
  output int         checks,
  output int         failures,
  output int         n_train,
  output int         n_quiet,
  output int         n_art,
  output int         n_retrain,
  output logic       done
);
  localparam int N = 1 << LOG2N;
  localparam int T0 = N + 300;

  function automatic int artifact(int t);
    int p;
    if (t < T0) return 0;
    p = (t - T0) % 90;
    if (p < 5) return AMP - (AMP / 10) * p;
    if (p < 9) return -(AMP * 6) / 10;
    return 0;
  endfunction

  function automatic bit quiet(int k);
    for (int l = 0; l <= 17; l++) if (artifact(k - l) != 0) return 1'b0;
    return 1'b1;
  endfunction

  int in_c [NS], neu [NS];
  int out_w [$];

  initial begin
    forever begin
      @(posedge clk); #1;
      if (oframe) begin
        logic [W-1:0] v;
        v[W-1] = sdo;
        for (int b = W - 2; b >= 0; b--) begin @(posedge clk); #1; v[b] = sdo; end
        out_w.push_back(int'($signed(v)));
      end
    end
  end

  initial begin
    real e_art, e_res;
    int train_words, pass_ok, pass_n;
    checks = 0; failures = 0; n_train = 0; n_quiet = 0; n_art = 0; n_retrain = 0;
    done = 1'b0;
    rst_n = 1'b0; calc_rst = 1'b0; thresh_scale = 2'd1;
    frame_in = 1'b0; sdi_c = 1'b0; sdi_t = 1'b0;
    train_words = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < NS; t++) begin
      logic [W-1:0] vc, vt;
      neu[t]  = int'($urandom_range(0, 20)) - 10;
      in_c[t] = neu[t] + (artifact(t - 2) * 3) / 4;
      vc = W'(in_c[t]);
      vt = W'(int'($urandom_range(0, 20)) - 10 + artifact(t));
      for (int b = W - 1; b >= 0; b--) begin
        frame_in = (b == W - 1);
        sdi_c = vc[b];
        sdi_t = vt[b];
        @(posedge clk); #1;
        if (b == W - 1 && train_mode_id) train_words++;
      end
    end
    frame_in = 1'b0;
    repeat (3 * W) @(posedge clk);
    #1;
    // phase I: the word being shifted in when training ends still sees it
    n_train = (train_words >= N) ? 1 : 0;
    checks++;
    if (train_words != N + 1 && train_words != N + 2) begin
      failures++; $display("FAIL W=%0d training lasted %0d words", W, train_words);
    end
    checks++;
    if (out_w.size() != NS) begin
      failures++; $display("FAIL W=%0d %0d output words for %0d", W, out_w.size(), NS);
    end
    e_art = 0; e_res = 0; pass_ok = 0; pass_n = 0;
    for (int k = 0; k < out_w.size() && k < NS; k++) begin
      if (quiet(k)) begin pass_n++; if (out_w[k] == in_c[k]) pass_ok++; end
      if (artifact(k) != 0 && artifact(k - 1) == 0) n_art++;
      if (k > NS - (NS - T0) / 3 && artifact(k - 2) != 0) begin
        e_art += real'((artifact(k - 2) * 3) / 4) ** 2;
        e_res += real'(out_w[k] - neu[k]) ** 2;
      end
    end
    n_quiet = pass_n;
    checks++;
    if (pass_n < N || pass_ok != pass_n) begin
      failures++; $display("FAIL W=%0d pass-through %0d of %0d", W, pass_ok, pass_n);
    end
    checks++;
    $display("W=%0d attenuation %f dB", W, 10.0 * $log10(e_art / (e_res + 1.0)));
    if (e_art == 0.0 || e_res * 100.0 > e_art) begin
      failures++; $display("FAIL W=%0d attenuation below 20 dB", W);
    end
    // re-train
    calc_rst = 1'b1; @(posedge clk); #1; calc_rst = 1'b0;
    repeat (W) @(posedge clk);
    #1;
    checks++;
    if (!train_mode_id) begin failures++; $display("FAIL W=%0d calc_rst ignored", W); end
    else n_retrain++;
    done = 1'b1;
  end
endmodule
