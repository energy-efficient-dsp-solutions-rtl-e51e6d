// tb_asar_sqrt_lut: checks the table square root against real-valued sqrt.
// The result has 4 fraction bits and is truncated twice (table entry and
// output shift), so the allowed error is 1/16 + 0.4 % of the true root; the
// table is only meant to keep the relative error bounded. Exact corner
// values (0, 1, 4, 256, 65536) are checked separately.
module tb_asar_sqrt_lut;
  import asar_pkg::*;

  localparam int X_W = 32;
  localparam int Y_W = X_W / 2 + STD_FRAC + 1;

  logic [X_W-1:0] x;
  logic [Y_W-1:0] y;
  int checks = 0, failures = 0;

  asar_sqrt_lut #(.X_W(X_W)) dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint unsigned v);
    real r, got, tol;
    x = X_W'(v);
    #1;
    r   = $sqrt(real'(v));
    got = real'(y) / 16.0;
    tol = 1.0 / 16.0 + 0.004 * r;
    checks++;
    if (got > r + 1e-9 || got < r - tol) begin
      failures++;
      $display("FAIL sqrt(%0d) = %f, expected %f", v, got, r);
    end
  endtask

  initial begin
    x = '0; #1;
    checks++;
    if (y != '0) begin failures++; $display("FAIL sqrt(0) = %0d", y); end
    check(1); check(4); check(256); check(65536); check(2); check(3);
    for (int i = 0; i < 2000; i++) check(longint'(i));
    for (int i = 0; i < 3000; i++) begin
      int sh;
      sh = $urandom_range(0, 31);
      check(longint'({$urandom, $urandom}) & ((64'd1 << (sh + 1)) - 1));
    end
    check(64'hFFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
