// asar_core: one Adaptive Stimulation Artifact Rejection (ASAR) engine.
//
// It removes stimulation artifacts from a recording channel ch_clean (d_k)
// using an adjacent recording channel ch_template (d_k') as the artifact
// reference, with no knowledge of the stimulation pulse. After reset (or a
// calc_rst re-train request) the engine runs phase I for N+1 samples: it
// learns the mean and standard deviation of ch_template while no stimulation
// is applied, and passes ch_clean through unchanged. In phase II the template
// detector keeps only those ch_template samples that leave the band
// mean +/- alpha*std, which yields a 16-entry template u_i that is non-zero
// only while an artifact is present; a 16-tap NLMS filter maps that template
// onto ch_clean and subtracts the estimated artifact (posteriori error).
// With no artifact, the template is zero and the output equals the input.
//
// Pipeline (four registers, so output_clean lags ch_clean by 4 clock cycles
// when smp_en is held high, as in the published design):
//   1. input registers          (ch_clean, ch_template)
//   2. statistics / template delay line / NLMS weight update
//   3. posteriori error         (inside asar_nlms)
//   4. output register
// smp_en marks a new input sample; the later stages follow it one clock at a
// time, so a strobed engine (one sample every few clocks) keeps the 4-clock
// latency. The port list follows the published I/O table; smp_en,
// det_enable and artifact_det are additions of this implementation.
module asar_core
  import asar_pkg::*;
#(
  parameter int unsigned W        = 16,
  parameter int unsigned LOG2N    = STATS_LOG2N,
  parameter int unsigned M        = NTAPS,
  parameter int unsigned WW       = 24,
  parameter int unsigned WF       = 16,
  parameter int unsigned MU_SHIFT = 1,
  parameter int unsigned EPS      = 65536
) (
  input  logic                clk,
  input  logic                global_rst_n,
  input  logic                calc_rst,
  input  logic                smp_en,
  input  logic [1:0]          thresh_scale,
  input  logic signed [W-1:0] ch_clean,
  input  logic signed [W-1:0] ch_template,
  output logic                train_mode_id,
  output logic                det_enable,
  output logic                artifact_det,
  output logic signed [W-1:0] output_clean
);

  localparam int unsigned STD_W = W + STD_FRAC + 1;

  logic signed [W-1:0]  d_r1, t_r1;
  logic                 v1, v3;
  logic signed [W-1:0]  avg;
  logic [STD_W-1:0]     std_fx;
  logic signed [W-1:0]  u [M];
  logic signed [WW-1:0] w [M];
  logic signed [W-1:0]  s;
  logic                 v2;

  always_ff @(posedge clk or negedge global_rst_n) begin
    if (!global_rst_n) begin
      d_r1 <= '0;
      t_r1 <= '0;
      v1   <= 1'b0;
      v2   <= 1'b0;
      v3   <= 1'b0;
    end else begin
      v1 <= smp_en;
      v2 <= v1;
      v3 <= v2;
      if (smp_en) begin
        d_r1 <= ch_clean;
        t_r1 <= ch_template;
      end
    end
  end

  asar_stats #(.W(W), .LOG2N(LOG2N)) u_stats (
    .clk           (clk),
    .rst_n         (global_rst_n),
    .calc_rst      (calc_rst),
    .smp_en        (v1),
    .x             (t_r1),
    .train_mode_id (train_mode_id),
    .det_enable    (det_enable),
    .avg           (avg),
    .std_fx        (std_fx)
  );

  asar_template_detect #(.W(W), .M(M)) u_detect (
    .clk          (clk),
    .rst_n        (global_rst_n),
    .smp_en       (v1),
    .det_enable   (det_enable),
    .thresh_scale (thresh_scale),
    .x            (t_r1),
    .avg          (avg),
    .std_fx       (std_fx),
    .u            (u)
  );

  asar_nlms #(.W(W), .M(M), .WW(WW), .WF(WF), .MU_SHIFT(MU_SHIFT), .EPS(EPS)) u_nlms (
    .clk    (clk),
    .rst_n  (global_rst_n),
    .clr    (calc_rst),
    .smp_en (v1),
    .u      (u),
    .d      (d_r1),
    .s      (s),
    .w      (w)
  );

  // artifact flag of the sample now in stage 2, aligned with output_clean
  logic tmpl_any, det_r2, det_r3;
  always_comb begin
    tmpl_any = 1'b0;
    for (int l = 0; l < int'(M); l++) tmpl_any |= (u[l] != '0);
  end

  always_ff @(posedge clk or negedge global_rst_n) begin
    if (!global_rst_n) begin
      det_r2       <= 1'b0;
      det_r3       <= 1'b0;
      output_clean <= '0;
      artifact_det <= 1'b0;
    end else begin
      if (v1) det_r2 <= tmpl_any;
      if (v2) det_r3 <= det_r2;
      if (v3) begin
        output_clean <= s;
        artifact_det <= det_r3;
      end
    end
  end

endmodule
