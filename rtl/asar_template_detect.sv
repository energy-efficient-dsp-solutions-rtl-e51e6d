// asar_template_detect: blind template detection of the ASAR engine.
//
// The template u_i is a 16-entry vector taken from the adjacent recording
// channel d_k'. A delay line holds d_k'(i-1) ... d_k'(i-15); together with
// the current sample d_k'(i) these are compared with the statistics learned
// in phase I, and every entry that lies within alpha*std of the mean is
// blanked:
//   u_i(l) = d_k'(i-l)  if |d_k'(i-l) - avg| >= alpha*std,  else 0.
// So the template is zero while no stimulation artifact is present and
// follows the artifact on the adjacent channel when one is. The comparison is
// combinational, so detection adds no clock cycle: u_i is valid in the same
// cycle as d_k'(i). While det_enable is low (phase I) every entry is zero.
// The delay line and the comparators follow the published design; alpha is
// set by thresh_scale (alpha = thresh_scale + 2, a choice made here).
//
// Interface: x = d_k' (signed W), sampled into the delay line when smp_en is
// high; avg (signed W) and std_fx (unsigned, STD_FRAC fraction bits) from the
// statistics unit; u = the template, entry 0 being the current sample.
module asar_template_detect
  import asar_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned M     = NTAPS,
  parameter int unsigned STD_W = W + STD_FRAC + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                smp_en,
  input  logic                det_enable,
  input  logic [1:0]          thresh_scale,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] avg,
  input  logic [STD_W-1:0]    std_fx,
  output logic signed [W-1:0] u [M]
);

  localparam int unsigned D_W = W + 1 + STD_FRAC;   // |x - avg| in std units
  localparam int unsigned TH_W = STD_W + 3;         // alpha * std

  logic signed [W-1:0] hist [M];   // hist[0] = current, hist[l] = x(i-l)
  logic signed [W-1:0] dly  [1:M-1];
  logic [TH_W-1:0]     thresh;

  assign thresh = TH_W'(alpha_of(thresh_scale)) * TH_W'(std_fx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 1; l < int'(M); l++) dly[l] <= '0;
    end else if (smp_en) begin
      dly[1] <= x;
      for (int l = 2; l < int'(M); l++) dly[l] <= dly[l-1];
    end
  end

  always_comb begin
    hist[0] = x;
    for (int l = 1; l < int'(M); l++) hist[l] = dly[l];
  end

  always_comb begin
    for (int l = 0; l < int'(M); l++) begin
      logic signed [W:0] diff;
      logic [W:0]        mag;
      logic [D_W-1:0]    mag_fx;
      diff   = (W+1)'(hist[l]) - (W+1)'(avg);
      mag    = diff[W] ? (W+1)'(-diff) : (W+1)'(diff);
      mag_fx = D_W'(mag) << STD_FRAC;
      u[l]   = (det_enable && (TH_W'(mag_fx) >= thresh)) ? hist[l] : '0;
    end
  end

endmodule
