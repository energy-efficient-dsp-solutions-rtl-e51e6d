// tb_asar_sense_array: 32 channels, 4 engines, training cut to 2^6 samples.
// Channels carry independent noise; channels 0-5 also carry a stimulation
// artifact with a per-channel gain and delay. Engine 0 cleans channel 1 from
// channel 0, engine 1 channel 3 from channel 2, engine 2 channel 5 from
// channel 4; engine 3 is disabled. Checks, per output sample (4 clocks after
// its input):
//   * channels no enabled engine cleans equal the input exactly;
//   * on cleaned channels the residual artifact in the second half of the
//     normal run is at least 20 dB below the artifact;
//   * with bypass_asar every channel equals its input;
//   * with use_ext_data the channels come from ext_in (ch_in carries junk);
//   * out_valid follows the sample strobe by 4 clocks.
module tb_asar_sense_array;
  localparam int W = 16, NCH = 32, NENG = 4, LOG2N = 6, SEL_W = 5;
  localparam int NS = 2600;

  logic clk = 1'b0, rst_n = 1'b0, calc_rst = 1'b0, smp_en = 1'b0;
  logic [1:0] thresh_scale = 2'd1;
  logic use_ext_data = 1'b0, bypass_asar = 1'b0;
  logic [NENG-1:0] eng_en = 4'b0111;
  logic [SEL_W-1:0] clean_sel [NENG];
  logic [SEL_W-1:0] tmpl_sel  [NENG];
  logic signed [W-1:0] ch_in [NCH], ext_in [NCH], ch_out [NCH];
  logic out_valid;
  logic [NENG-1:0] train_mode_id, artifact_det;
  int checks = 0, failures = 0;

  asar_sense_array #(.W(W), .NCH(NCH), .NENG(NENG), .LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NS + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int artifact(int t);
    int p;
    if (t < 200) return 0;
    p = (t - 200) % 120;
    if (p < 5) return 5000 - 400 * p;
    if (p < 10) return -3000;
    return 0;
  endfunction

  // artifact seen on channel c at sample t
  function automatic int art_ch(int c, int t);
    case (c)
      0: return artifact(t);
      1: return (artifact(t - 1) * 9) / 10;
      2: return (artifact(t - 3) * 5) / 10;
      3: return (artifact(t - 4) * 7) / 10;
      4: return artifact(t - 2);
      5: return (artifact(t - 2) * 12) / 10;
      default: return 0;
    endcase
  endfunction

  int sig [NS][NCH], neu [NS][NCH];
  bit cleaned [NCH];
  real e_art [NCH], e_res [NCH];
  int mism_pass, n_pass, n_byp, mism_byp, n_ext, mism_ext, vmis;

  initial begin
    clean_sel = '{5'd1, 5'd3, 5'd5, 5'd1};
    tmpl_sel  = '{5'd0, 5'd2, 5'd4, 5'd0};
    foreach (cleaned[c]) cleaned[c] = (c == 1 || c == 3 || c == 5);
    foreach (e_art[c]) begin e_art[c] = 0; e_res[c] = 0; end
    mism_pass = 0; n_pass = 0; n_byp = 0; mism_byp = 0; n_ext = 0; mism_ext = 0; vmis = 0;
    foreach (ch_in[c]) begin ch_in[c] = '0; ext_in[c] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < NS + 4; t++) begin
      if (t < NS) begin
        bypass_asar  = (t >= 2000 && t < 2200);
        use_ext_data = (t >= 2200);
        for (int c = 0; c < NCH; c++) begin
          neu[t][c] = int'($urandom_range(0, 30)) - 15;
          sig[t][c] = neu[t][c] + art_ch(c, t);
          if (use_ext_data) begin
            ext_in[c] = W'(sig[t][c]);
            ch_in[c]  = W'($urandom);
          end else begin
            ch_in[c]  = W'(sig[t][c]);
            ext_in[c] = W'($urandom);
          end
        end
        smp_en = 1'b1;
      end else smp_en = 1'b0;
      @(posedge clk); #1;
      // output now shows sample t-3 (registered at edges t-3 .. t)
      if (t >= 3 && t - 3 < NS) begin
        int k;
        k = t - 3;
        if (!out_valid) vmis++;
        for (int c = 0; c < NCH; c++) begin
          if (k >= 2000 && k < 2200) begin
            n_byp++;
            if (int'(ch_out[c]) != sig[k][c]) mism_byp++;
          end else if (!cleaned[c]) begin
            n_pass++;
            if (int'(ch_out[c]) != sig[k][c]) mism_pass++;
            if (k >= 2200) begin n_ext++; if (int'(ch_out[c]) != sig[k][c]) mism_ext++; end
          end else if (k > 1000 && k < 2000 && art_ch(c, k) != 0) begin
            e_art[c] += real'(art_ch(c, k)) ** 2;
            e_res[c] += real'(int'(ch_out[c]) - neu[k][c]) ** 2;
          end
        end
      end
    end
    checks++;
    if (vmis != 0) begin failures++; $display("FAIL out_valid missing %0d times", vmis); end
    checks++;
    if (mism_pass != 0 || n_pass < 10000) begin
      failures++; $display("FAIL pass-through channels: %0d of %0d differ", mism_pass, n_pass);
    end
    checks++;
    if (mism_byp != 0 || n_byp == 0) begin
      failures++; $display("FAIL bypass: %0d of %0d differ", mism_byp, n_byp);
    end
    checks++;
    if (mism_ext != 0 || n_ext == 0) begin
      failures++; $display("FAIL external data: %0d of %0d differ", mism_ext, n_ext);
    end
    for (int c = 1; c <= 5; c += 2) begin
      checks++;
      $display("channel %0d attenuation %f dB", c, 10.0 * $log10(e_art[c] / (e_res[c] + 1.0)));
      if (e_art[c] == 0.0 || e_res[c] * 100.0 > e_art[c]) begin
        failures++; $display("FAIL channel %0d not cleaned", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
