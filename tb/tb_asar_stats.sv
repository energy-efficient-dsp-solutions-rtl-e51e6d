// tb_asar_stats: checks phase I of the ASAR engine (training length 2^8).
// Random samples (two runs with different mean and spread) are fed on every
// other clock through smp_en. The testbench keeps its own sums and checks
// that avg equals floor(S/N), that std is within 1/16 + 0.5 % of
// sqrt(T/N - (S/N)^2), that training lasts exactly N+1 sample slots, and that
// calc_rst in the middle of training discards what was accumulated.
module tb_asar_stats;
  import asar_pkg::*;

  localparam int W = 16;
  localparam int LOG2N = 8;
  localparam int N = 1 << LOG2N;
  localparam int STD_W = W + STD_FRAC + 1;

  logic clk = 1'b0, rst_n = 1'b0, calc_rst = 1'b0, smp_en = 1'b0;
  logic signed [W-1:0] x = '0;
  logic train_mode_id, det_enable;
  logic signed [W-1:0] avg;
  logic [STD_W-1:0] std_fx;
  int checks = 0, failures = 0;

  asar_stats #(.W(W), .LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic train(int mean, int spread, int abort_after);
    longint s, t;
    int slots, v;
    real m, sd, got;
    s = 0; t = 0; slots = 0;
    if (abort_after > 0) begin
      for (int i = 0; i < abort_after; i++) begin
        x = W'(mean + 5000); smp_en = 1'b1; @(posedge clk); #1;
        smp_en = 1'b0; @(posedge clk); #1;
      end
      calc_rst = 1'b1; @(posedge clk); #1; calc_rst = 1'b0;
    end
    while (1) begin
      checks++;
      if (!train_mode_id || det_enable) begin
        failures++; $display("FAIL left training after %0d slots", slots); break;
      end
      v = mean + int'($urandom_range(0, 2 * spread)) - spread;
      x = W'(v);
      smp_en = 1'b1;
      @(posedge clk); #1;
      smp_en = 1'b0;
      slots++;
      if (slots <= N) begin s += v; t += longint'(v) * v; end
      @(posedge clk); #1;
      if (!train_mode_id) break;
    end
    checks++;
    if (slots != N + 1) begin
      failures++; $display("FAIL training lasted %0d slots, expected %0d", slots, N + 1);
    end
    checks++;
    if (!det_enable) begin failures++; $display("FAIL det_enable low after training"); end
    checks++;
    if (avg != W'(s >>> LOG2N)) begin
      failures++; $display("FAIL avg %0d expected %0d", avg, s >>> LOG2N);
    end
    m   = real'(s) / N;
    sd  = $sqrt(real'(t) / N - m * m);
    got = real'(std_fx) / 16.0;
    checks++;
    if (got > sd + 1.0 / 16 || got < sd - 1.0 / 16 - 0.005 * sd) begin
      failures++; $display("FAIL std %f expected %f", got, sd);
    end
    $display("mean %f avg %0d std %f ref %f", m, avg, got, sd);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    train(120, 300, 0);
    // stays in phase II
    repeat (10) begin smp_en = 1'b1; x = 16'sd9000; @(posedge clk); #1; end
    smp_en = 1'b0;
    checks++;
    if (train_mode_id) begin failures++; $display("FAIL phase II not held"); end
    // re-train with a different signal, aborted once after 37 samples
    calc_rst = 1'b1; @(posedge clk); #1; calc_rst = 1'b0;
    train(-40, 15, 37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
