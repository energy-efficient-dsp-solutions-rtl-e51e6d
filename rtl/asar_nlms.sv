// asar_nlms: 16-tap normalised LMS adaptive filter of the ASAR engine.
//
// For every sample i it receives the template u_i (from the template
// detector) and the measured sample d(i) of the channel being cleaned, and
//   1. forms the priori error       e    = d(i) - u_i . w_{i-1}
//   2. forms the step               g    = mu / (||u_i||^2 + eps)
//   3. updates the weights          w_i  = w_{i-1} + g * u_i^T * e
//   4. outputs the posteriori error s(i) = d(i) - u_i . w_i
// The step size is recomputed from the template norm at every sample, so no
// fixed step has to trade convergence speed against accuracy, and the clean
// estimate uses the posteriori error, i.e. the freshly updated weights, as in
// the published design. Steps 1-3 are one combinational path so that the
// weight recursion completes in a single cycle; step 4 uses the registered
// weights and template in the following cycle.
//
// Fixed point (choices made here; the published bit widths are not
// reproduced): d, u and s are signed W-bit integers; weights are signed WW
// bits with WF fraction bits and saturate; mu = 2^-MU_SHIFT; the division
// keeps GB guard bits; filter sums are rounded to the nearest integer and s
// saturates to W bits. eps = EPS (2^16 by default) is large on purpose: it
// keeps the step small when only a few small template samples pass the
// threshold, so that noise on those samples does not throw the weights off.
// A zero template gives zero estimate and no update, so s(i) = d(i) when no
// artifact is detected.
//
// Interface: u and d are sampled when smp_en is high; s is updated on the
// following clock edge, i.e. s is valid two clock edges after the sample
// (register after the weight update, register after the posteriori
// subtraction). clr synchronously clears the weights.
module asar_nlms
  import asar_pkg::*;
#(
  parameter int unsigned W        = 16,
  parameter int unsigned M        = NTAPS,
  parameter int unsigned WW       = 24,
  parameter int unsigned WF       = 16,
  parameter int unsigned GB       = 8,
  parameter int unsigned MU_SHIFT = 1,
  parameter int unsigned EPS      = 65536
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 smp_en,
  input  logic signed [W-1:0]  u [M],
  input  logic signed [W-1:0]  d,
  output logic signed [W-1:0]  s,
  output logic signed [WW-1:0] w [M]
);

  localparam int unsigned P_W   = W + WW;                 // u * w
  localparam int unsigned ACC_W = P_W + $clog2(M) + 1;    // sum of u * w
  localparam int unsigned E_W   = W + 8;                  // priori error
  localparam int unsigned N_W   = 2 * W + $clog2(M) + 1;  // ||u||^2 + eps
  localparam int unsigned Q_W   = E_W + WF + GB;          // numerator / step
  localparam int unsigned D_W   = W + Q_W;                // u * step

  localparam logic signed [WW-1:0] W_MAX = {1'b0, {(WW-1){1'b1}}};
  localparam logic signed [WW-1:0] W_MIN = {1'b1, {(WW-1){1'b0}}};
  localparam logic signed [W-1:0]  S_MAX = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0]  S_MIN = {1'b1, {(W-1){1'b0}}};

  // Rounded (u . w) / 2^WF in ACC_W bits.
  function automatic logic signed [ACC_W-1:0] dot_round(
      input logic signed [W-1:0]  uu [M],
      input logic signed [WW-1:0] ww [M]);
    logic signed [ACC_W-1:0] acc;
    acc = ACC_W'(1) <<< (WF - 1);
    for (int l = 0; l < int'(M); l++)
      acc += ACC_W'(uu[l]) * ACC_W'(ww[l]);
    return acc >>> WF;
  endfunction

  // ---------------- weight update (one cycle) ----------------
  logic signed [ACC_W-1:0] y_pri;
  logic signed [ACC_W-1:0] e_full;
  logic signed [E_W-1:0]   e;
  logic [N_W-1:0]          nrm;
  logic signed [E_W:0]     e_ext;
  logic [E_W-1:0]          e_mag;
  logic [Q_W-1:0]          num_mag;
  logic [Q_W-1:0]          q_mag;
  logic signed [Q_W:0]     g;
  logic signed [WW-1:0]    w_new [M];

  always_comb begin
    y_pri  = dot_round(u, w);
    e_full = ACC_W'(d) - y_pri;
    if (e_full > ACC_W'(2**(E_W-1) - 1))   e = {1'b0, {(E_W-1){1'b1}}};
    else if (e_full < -ACC_W'(2**(E_W-1))) e = {1'b1, {(E_W-1){1'b0}}};
    else                                   e = E_W'(e_full);

    nrm = N_W'(EPS);
    for (int l = 0; l < int'(M); l++)
      nrm += N_W'($unsigned(N_W'(u[l]) * N_W'(u[l])));

    // g = e * 2^(WF+GB) * mu / nrm, by magnitude division
    e_ext   = (E_W+1)'(e);
    e_mag   = e_ext[E_W] ? E_W'(-e_ext) : E_W'(e_ext);
    num_mag = Q_W'(e_mag) << (WF + GB - MU_SHIFT);
    q_mag   = num_mag / Q_W'(nrm);
    g       = e[E_W-1] ? -$signed({1'b0, q_mag}) : $signed({1'b0, q_mag});

    for (int l = 0; l < int'(M); l++) begin
      logic signed [D_W:0]  dw;
      logic signed [D_W+1:0] sum;
      dw  = ((D_W+1)'(u[l]) * (D_W+1)'(g)) >>> GB;
      sum = (D_W+2)'(w[l]) + (D_W+2)'(dw);
      if (sum > (D_W+2)'(W_MAX))      w_new[l] = W_MAX;
      else if (sum < (D_W+2)'(W_MIN)) w_new[l] = W_MIN;
      else                            w_new[l] = WW'(sum);
    end
  end

  logic signed [W-1:0] u_r [M];
  logic signed [W-1:0] d_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < int'(M); l++) begin
        w[l]   <= '0;
        u_r[l] <= '0;
      end
      d_r <= '0;
    end else if (clr) begin
      for (int l = 0; l < int'(M); l++) begin
        w[l]   <= '0;
        u_r[l] <= '0;
      end
      d_r <= d;
    end else if (smp_en) begin
      w   <= w_new;
      u_r <= u;
      d_r <= d;
    end
  end

  // ---------------- posteriori error ----------------
  logic signed [ACC_W-1:0] y_post;
  logic signed [ACC_W-1:0] s_full;

  always_comb begin
    y_post = dot_round(u_r, w);
    s_full = ACC_W'(d_r) - y_post;
  end

  logic en_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_b <= 1'b0;
    else        en_b <= smp_en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s <= '0;
    else if (en_b) begin
      if (s_full > ACC_W'(S_MAX))      s <= S_MAX;
      else if (s_full < ACC_W'(S_MIN)) s <= S_MIN;
      else                             s <= W'(s_full);
    end
  end

endmodule
