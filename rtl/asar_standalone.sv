// asar_standalone: one fabricated ASAR design with its pad interface. The
// LFP design uses W = 16 bits at 6 kS/s (clock 96 kHz) and the Spike design
// W = 12 bits at 24 kS/s (clock 288 kHz).
//
// Because the test chip had few pads, both recording inputs (ch_clean and
// ch_template) arrive serially and the cleaned output leaves serially, so the
// engine clock runs at W times the sample rate. Two serial-to-parallel
// converters share one frame marker; when both words are complete the ASAR
// core takes the sample (smp_en). The core's output register updates four
// clocks later, and the parallel-to-serial converter then sends the cleaned
// word. Serial latency from the last input bit to the first output bit is
// therefore 1 (s2p) + 4 (core) + 1 (p2s) clocks.
// The serial framing is this implementation's choice (see asar_s2p); the
// control pins (calc_rst, thresh_scale, global_rst_n, train_mode_id) follow
// the published pin list.
module asar_standalone
  import asar_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned LOG2N = STATS_LOG2N
) (
  input  logic       clk,
  input  logic       global_rst_n,
  input  logic       calc_rst,
  input  logic [1:0] thresh_scale,
  input  logic       frame_in,
  input  logic       ch_clean_sdi,
  input  logic       ch_template_sdi,
  output logic       train_mode_id,
  output logic       output_clean_sdo,
  output logic       output_frame
);

  logic [W-1:0] clean_w, tmpl_w;
  logic         clean_v, tmpl_v;
  logic         det_enable, artifact_det;
  logic signed [W-1:0] out_w;
  logic [3:0]   vpipe;

  asar_s2p #(.W(W)) u_s2p_clean (
    .clk, .rst_n(global_rst_n), .frame(frame_in), .sdi(ch_clean_sdi),
    .word(clean_w), .valid(clean_v));

  asar_s2p #(.W(W)) u_s2p_tmpl (
    .clk, .rst_n(global_rst_n), .frame(frame_in), .sdi(ch_template_sdi),
    .word(tmpl_w), .valid(tmpl_v));

  asar_core #(.W(W), .LOG2N(LOG2N)) u_core (
    .clk, .global_rst_n, .calc_rst, .smp_en(clean_v & tmpl_v), .thresh_scale,
    .ch_clean(clean_w), .ch_template(tmpl_w),
    .train_mode_id, .det_enable, .artifact_det, .output_clean(out_w));

  // the core output register updates on the 4th edge after smp_en
  always_ff @(posedge clk or negedge global_rst_n) begin
    if (!global_rst_n) vpipe <= '0;
    else               vpipe <= {vpipe[2:0], clean_v & tmpl_v};
  end

  asar_p2s #(.W(W)) u_p2s (
    .clk, .rst_n(global_rst_n), .load(vpipe[3]), .word(out_w),
    .sdo(output_clean_sdo), .sframe(output_frame));

endmodule
