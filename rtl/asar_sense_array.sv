// asar_sense_array: the artifact-rejection section of the 64-channel sensing
// chip. The chip digitises 32 recording channels (single-ended, or pairs of
// the 64 electrodes) and corrects each for front-end non-linearity; behind
// that stage sit NENG = 4 LFP ASAR engines that can be assigned to any of the
// NCH = 32 channels.
//
// Each engine e has its own configuration: eng_en[e], the channel it cleans
// (clean_sel[e]) and the adjacent channel it takes its template from
// (tmpl_sel[e]). All channels move through a 4-clock delay so that they stay
// aligned with the engines' 4-clock latency; on the way out, every channel
// that an enabled engine cleans is replaced by that engine's output (the
// lowest-numbered engine wins if two clean the same channel). For testing,
// use_ext_data takes the channels from an external port instead of the
// non-linearity-correction stage, and bypass_asar skips the engines, so the
// output is the delayed input. The engines run at the 6 kHz sample clock.
//
// The number of engines and channels, the any-channel assignment and the two
// bypass paths follow the published sensing chip; the per-engine select
// registers, the replacement of cleaned channels in the output bus and the
// shared thresh_scale / calc_rst are choices made here.
//
// Interface: ch_in / ext_in are sampled when smp_en is high (tie high when
// the clock is the sample clock); ch_out and out_valid follow 4 clocks later.
// The configuration inputs are meant to be static while samples flow; a
// change takes effect on the output at once and on the engines' inputs with
// the next sample.
module asar_sense_array
  import asar_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned NCH   = 32,
  parameter int unsigned NENG  = 4,
  parameter int unsigned LOG2N = STATS_LOG2N,
  parameter int unsigned SEL_W = $clog2(NCH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  calc_rst,
  input  logic                  smp_en,
  input  logic [1:0]            thresh_scale,
  input  logic                  use_ext_data,
  input  logic                  bypass_asar,
  input  logic [NENG-1:0]       eng_en,
  input  logic [SEL_W-1:0]      clean_sel [NENG],
  input  logic [SEL_W-1:0]      tmpl_sel  [NENG],
  input  logic signed [W-1:0]   ch_in     [NCH],
  input  logic signed [W-1:0]   ext_in    [NCH],
  output logic signed [W-1:0]   ch_out    [NCH],
  output logic                  out_valid,
  output logic [NENG-1:0]       train_mode_id,
  output logic [NENG-1:0]       artifact_det
);

  localparam int unsigned LAT = 4;

  logic signed [W-1:0] src [NCH];
  logic signed [W-1:0] dly [LAT][NCH];
  logic [LAT-1:0]      vld;
  logic signed [W-1:0] eng_out [NENG];
  logic [NENG-1:0]     det_en;

  always_comb begin
    for (int c = 0; c < int'(NCH); c++)
      src[c] = use_ext_data ? ext_in[c] : ch_in[c];
  end

  for (genvar e = 0; e < NENG; e++) begin : g_eng
    asar_core #(.W(W), .LOG2N(LOG2N)) u_core (
      .clk,
      .global_rst_n  (rst_n),
      .calc_rst,
      .smp_en,
      .thresh_scale,
      .ch_clean      (src[clean_sel[e]]),
      .ch_template   (src[tmpl_sel[e]]),
      .train_mode_id (train_mode_id[e]),
      .det_enable    (det_en[e]),
      .artifact_det  (artifact_det[e]),
      .output_clean  (eng_out[e]));
  end

  // alignment delay for all channels; a stage moves when the sample it
  // carries moves in the engines
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int s = 0; s < int'(LAT); s++)
        for (int c = 0; c < int'(NCH); c++) dly[s][c] <= '0;
    end else begin
      vld <= {vld[LAT-2:0], smp_en};
      if (smp_en) dly[0] <= src;
      for (int s = 1; s < int'(LAT); s++)
        if (vld[s-1]) dly[s] <= dly[s-1];
    end
  end

  always_comb begin
    for (int c = 0; c < int'(NCH); c++) begin
      ch_out[c] = dly[LAT-1][c];
      if (!bypass_asar)
        for (int e = int'(NENG) - 1; e >= 0; e--)
          if (eng_en[e] && clean_sel[e] == SEL_W'(c)) ch_out[c] = eng_out[e];
    end
  end

  assign out_valid = vld[LAT-1];

endmodule
