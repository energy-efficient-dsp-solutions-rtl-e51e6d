// tb_asar_standalone: the Spike ASAR test design (12-bit samples, training
// cut to 2^6 samples) driven through its serial pins, one word per 12 clocks.
// The receiver decodes output_clean_sdo using output_frame. Checks:
//   * one output word per input word, the first output bit 6 clocks after
//     the last input bit of the same sample (s2p 1 + core 4 + p2s 1);
//   * outside artifacts the output word equals the input word;
//   * train_mode_id is high for the first N+1 samples only;
//   * during artifacts (template = artifact, cleaned channel = 0.8 x the
//     artifact one sample later) the residual in the last half of the run is
//     at least 20 dB below the artifact.
module tb_asar_standalone;
  localparam int W = 12;
  localparam int LOG2N = 6;
  localparam int N = 1 << LOG2N;
  localparam int NS = 2400;

  logic clk = 1'b0, rst_n = 1'b0, calc_rst = 1'b0;
  logic [1:0] thresh_scale = 2'd1;
  logic frame_in = 1'b0, sdi_c = 1'b0, sdi_t = 1'b0;
  logic train_mode_id, sdo, oframe;
  int checks = 0, failures = 0;

  asar_standalone #(.W(W), .LOG2N(LOG2N)) dut (
    .clk, .global_rst_n(rst_n), .calc_rst, .thresh_scale, .frame_in,
    .ch_clean_sdi(sdi_c), .ch_template_sdi(sdi_t), .train_mode_id,
    .output_clean_sdo(sdo), .output_frame(oframe));

  always #5 clk = ~clk;

  initial begin
    repeat (NS * W + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int artifact(int t);
    int p;
    if (t < 300) return 0;
    p = (t - 300) % 100;
    if (p < 4) return 1500;
    if (p < 8) return -1200;
    return 0;
  endfunction

  function automatic bit quiet(int k);
    for (int l = 0; l <= 17; l++) if (artifact(k - l) != 0) return 1'b0;
    return 1'b1;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  int in_c [NS], neu [NS], last_bit_cyc [NS], train_slots;
  int out_w [$], out_cyc [$];

  // receiver
  initial begin
    forever begin
      @(posedge clk); #1;
      if (oframe) begin
        logic [W-1:0] v;
        int c0;
        c0 = cyc;
        v[W-1] = sdo;
        for (int b = W - 2; b >= 0; b--) begin @(posedge clk); #1; v[b] = sdo; end
        out_w.push_back(int'($signed(v)));
        out_cyc.push_back(c0);
      end
    end
  end

  real e_art, e_res;
  int pass_ok, pass_n, lat_ok;

  initial begin
    train_slots = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < NS; t++) begin
      logic [W-1:0] vc, vt;
      neu[t] = int'($urandom_range(0, 16)) - 8;
      in_c[t] = neu[t] + (artifact(t - 1) * 8) / 10;
      vc = W'(in_c[t]);
      vt = W'(int'($urandom_range(0, 16)) - 8 + artifact(t));
      for (int b = W - 1; b >= 0; b--) begin
        frame_in = (b == W - 1);
        sdi_c = vc[b];
        sdi_t = vt[b];
        if (b == 0) last_bit_cyc[t] = cyc;
        @(posedge clk); #1;
        if (b == 0 && train_mode_id) train_slots++;
      end
    end
    frame_in = 1'b0;
    repeat (3 * W) @(posedge clk);
    #1;
    checks++;
    if (out_w.size() != NS) begin
      failures++; $display("FAIL %0d output words for %0d inputs", out_w.size(), NS);
    end
    checks++;
    // sampled once per word after its last bit: N+1 words see phase I, plus
    // the word whose last bit is still in the input register
    if (train_slots != N + 1 && train_slots != N + 2) begin
      failures++; $display("FAIL training lasted %0d words", train_slots);
    end
    e_art = 0; e_res = 0; pass_ok = 0; pass_n = 0; lat_ok = 0;
    for (int k = 0; k < out_w.size() && k < NS; k++) begin
      if (out_cyc[k] - last_bit_cyc[k] == 6) lat_ok++;
      if (quiet(k)) begin pass_n++; if (out_w[k] == in_c[k]) pass_ok++; end
      if (k > NS / 2 && artifact(k - 1) != 0) begin
        e_art += real'((artifact(k - 1) * 8) / 10) ** 2;
        e_res += real'(out_w[k] - neu[k]) ** 2;
      end
    end
    checks++;
    if (lat_ok != NS) begin failures++; $display("FAIL latency right for %0d of %0d", lat_ok, NS); end
    checks++;
    if (pass_n < 1000 || pass_ok != pass_n) begin
      failures++; $display("FAIL pass-through %0d of %0d", pass_ok, pass_n);
    end
    checks++;
    $display("attenuation %f dB", 10.0 * $log10(e_art / (e_res + 1.0)));
    if (e_res * 100.0 > e_art) begin failures++; $display("FAIL attenuation below 20 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
