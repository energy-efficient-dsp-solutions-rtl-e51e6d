// asar_top: the Adaptive Stimulation Artifact Rejection designs side by side.
//
//   * lfp_*   - the LFP ASAR test design: 16-bit samples at 6 kS/s, serial
//               pad interface, clock 16 x 6 kHz = 96 kHz.
//   * spk_*   - the Spike ASAR test design: 12-bit samples at 24 kS/s,
//               serial pad interface, clock 12 x 24 kHz = 288 kHz.
//   * sns_*   - the ASAR section of the 64-channel sensing chip: four 16-bit
//               LFP engines assignable to any of 32 channels, clocked at the
//               6 kHz sample rate, with external-data and bypass test paths.
//
// The three parts share nothing but the top; each has its own clock and
// reset. The front-end, non-linearity correction, decimation, SPI and
// system-control blocks of the sensing chip are outside this RTL: the array's
// channel inputs (sns_ch_in) stand for the non-linearity-correction outputs
// and its channel outputs (sns_ch_out) feed the decimation filters.
module asar_top
  import asar_pkg::*;
#(
  parameter int unsigned LFP_W   = 16,
  parameter int unsigned SPK_W   = 12,
  parameter int unsigned NCH     = 32,
  parameter int unsigned NENG    = 4,
  parameter int unsigned LOG2N   = STATS_LOG2N,
  parameter int unsigned SEL_W   = $clog2(NCH)
) (
  // LFP ASAR test design
  input  logic                    lfp_clk,
  input  logic                    lfp_global_rst_n,
  input  logic                    lfp_calc_rst,
  input  logic [1:0]              lfp_thresh_scale,
  input  logic                    lfp_frame_in,
  input  logic                    lfp_ch_clean_sdi,
  input  logic                    lfp_ch_template_sdi,
  output logic                    lfp_train_mode_id,
  output logic                    lfp_output_clean_sdo,
  output logic                    lfp_output_frame,
  // Spike ASAR test design
  input  logic                    spk_clk,
  input  logic                    spk_global_rst_n,
  input  logic                    spk_calc_rst,
  input  logic [1:0]              spk_thresh_scale,
  input  logic                    spk_frame_in,
  input  logic                    spk_ch_clean_sdi,
  input  logic                    spk_ch_template_sdi,
  output logic                    spk_train_mode_id,
  output logic                    spk_output_clean_sdo,
  output logic                    spk_output_frame,
  // sensing-chip ASAR array
  input  logic                    sns_clk,
  input  logic                    sns_rst_n,
  input  logic                    sns_calc_rst,
  input  logic                    sns_smp_en,
  input  logic [1:0]              sns_thresh_scale,
  input  logic                    sns_use_ext_data,
  input  logic                    sns_bypass_asar,
  input  logic [NENG-1:0]         sns_eng_en,
  input  logic [SEL_W-1:0]        sns_clean_sel [NENG],
  input  logic [SEL_W-1:0]        sns_tmpl_sel  [NENG],
  input  logic signed [LFP_W-1:0] sns_ch_in     [NCH],
  input  logic signed [LFP_W-1:0] sns_ext_in    [NCH],
  output logic signed [LFP_W-1:0] sns_ch_out    [NCH],
  output logic                    sns_out_valid,
  output logic [NENG-1:0]         sns_train_mode_id,
  output logic [NENG-1:0]         sns_artifact_det
);

  asar_standalone #(.W(LFP_W), .LOG2N(LOG2N)) u_lfp (
    .clk              (lfp_clk),
    .global_rst_n     (lfp_global_rst_n),
    .calc_rst         (lfp_calc_rst),
    .thresh_scale     (lfp_thresh_scale),
    .frame_in         (lfp_frame_in),
    .ch_clean_sdi     (lfp_ch_clean_sdi),
    .ch_template_sdi  (lfp_ch_template_sdi),
    .train_mode_id    (lfp_train_mode_id),
    .output_clean_sdo (lfp_output_clean_sdo),
    .output_frame     (lfp_output_frame));

  asar_standalone #(.W(SPK_W), .LOG2N(LOG2N)) u_spk (
    .clk              (spk_clk),
    .global_rst_n     (spk_global_rst_n),
    .calc_rst         (spk_calc_rst),
    .thresh_scale     (spk_thresh_scale),
    .frame_in         (spk_frame_in),
    .ch_clean_sdi     (spk_ch_clean_sdi),
    .ch_template_sdi  (spk_ch_template_sdi),
    .train_mode_id    (spk_train_mode_id),
    .output_clean_sdo (spk_output_clean_sdo),
    .output_frame     (spk_output_frame));

  asar_sense_array #(.W(LFP_W), .NCH(NCH), .NENG(NENG), .LOG2N(LOG2N)) u_sns (
    .clk           (sns_clk),
    .rst_n         (sns_rst_n),
    .calc_rst      (sns_calc_rst),
    .smp_en        (sns_smp_en),
    .thresh_scale  (sns_thresh_scale),
    .use_ext_data  (sns_use_ext_data),
    .bypass_asar   (sns_bypass_asar),
    .eng_en        (sns_eng_en),
    .clean_sel     (sns_clean_sel),
    .tmpl_sel      (sns_tmpl_sel),
    .ch_in         (sns_ch_in),
    .ext_in        (sns_ext_in),
    .ch_out        (sns_ch_out),
    .out_valid     (sns_out_valid),
    .train_mode_id (sns_train_mode_id),
    .artifact_det  (sns_artifact_det));

endmodule
