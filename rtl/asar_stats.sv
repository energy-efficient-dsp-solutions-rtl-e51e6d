// asar_stats: phase I (training) of the ASAR engine. It learns the mean and
// the standard deviation of the adjacent (template) channel while no
// stimulation is applied, and so sets the blanking threshold of the template
// detector.
//
// For the first N = 2^LOG2N samples after reset or calc_rst it accumulates
// S += x and T += x^2. On the next sample slot it stores
//   avg = S / N                       (arithmetic shift, floor)
//   std = sqrt((T - S^2 / N) / N)     (shifts, then the square-root table)
// and enters phase II, where it stays until the next calc_rst or reset.
// Because N is a power of two every division is a shift; the variance
// divides by N rather than N-1, which the published design allows for large
// N. Phase I therefore lasts N+1 sample slots, as in the published timing.
//
// Interface: x is the template channel d_k' (signed, W bits), sampled when
// smp_en is high (tie high to process one sample per clock). train_mode_id is
// 1 during phase I, det_enable is 1 during phase II. avg is a signed W-bit
// integer, std_fx is unsigned with STD_FRAC fraction bits. rst_n is an
// asynchronous global reset, calc_rst a synchronous re-train request; both
// restart phase I with cleared accumulators.
module asar_stats
  import asar_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned LOG2N = STATS_LOG2N,
  parameter int unsigned STD_W = W + STD_FRAC + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                calc_rst,
  input  logic                smp_en,
  input  logic signed [W-1:0] x,
  output logic                train_mode_id,
  output logic                det_enable,
  output logic signed [W-1:0] avg,
  output logic [STD_W-1:0]    std_fx
);

  localparam int unsigned S_W = W + LOG2N;          // sum of samples
  localparam int unsigned T_W = 2 * W + LOG2N;      // sum of squares
  localparam int unsigned V_W = 2 * W;              // variance

  asar_phase_e            phase;
  logic [LOG2N:0]         cnt;
  logic signed [S_W-1:0]  s_acc;
  logic [T_W-1:0]         t_acc;

  logic signed [2*W-1:0]  x_sq;
  logic signed [2*S_W-1:0] s_sq;
  logic [T_W-1:0]         s_sq_n;
  logic [T_W-1:0]         t_diff;
  logic [V_W-1:0]         var_v;
  logic [V_W/2+STD_FRAC:0] std_new;

  assign x_sq   = x * x;
  assign s_sq   = s_acc * s_acc;
  assign s_sq_n = T_W'(s_sq >>> LOG2N);
  assign t_diff = (t_acc >= s_sq_n) ? t_acc - s_sq_n : '0;

  always_comb begin
    logic [T_W-1:0] v;
    v = t_diff >> LOG2N;
    var_v = (v > T_W'({V_W{1'b1}})) ? {V_W{1'b1}} : V_W'(v);
  end

  asar_sqrt_lut #(.X_W(V_W)) u_sqrt (
    .x (var_v),
    .y (std_new)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_TRAIN;
      cnt    <= '0;
      s_acc  <= '0;
      t_acc  <= '0;
      avg    <= '0;
      std_fx <= '0;
    end else if (calc_rst) begin
      phase  <= PH_TRAIN;
      cnt    <= '0;
      s_acc  <= '0;
      t_acc  <= '0;
    end else if (smp_en) begin
      unique case (phase)
        PH_TRAIN: begin
          s_acc <= s_acc + S_W'(x);
          t_acc <= t_acc + T_W'($unsigned(x_sq));
          cnt   <= cnt + 1'b1;
          if (cnt == (LOG2N+1)'((1 << LOG2N) - 1)) phase <= PH_STORE;
        end
        PH_STORE: begin
          avg    <= W'(s_acc >>> LOG2N);
          std_fx <= STD_W'(std_new);
          phase  <= PH_RUN;
        end
        default: ;
      endcase
    end
  end

  assign train_mode_id = (phase != PH_RUN);
  assign det_enable    = (phase == PH_RUN);

endmodule
