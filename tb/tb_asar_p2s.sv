// tb_asar_p2s: loads random 16-bit words and checks that each is sent MSB
// first on the W clocks after the load, with sframe high on the first bit,
// sdo low when idle, and that a load in mid-word restarts with the new word.
module tb_asar_p2s;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [W-1:0] word = '0;
  logic sdo, sframe;
  int checks = 0, failures = 0;

  asar_p2s #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      logic [W-1:0] v;
      int nbits;
      v = W'($urandom);
      nbits = (i % 7 == 5) ? 6 : W;     // some words are cut by the next load
      word = v; load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0; word = '0;
      for (int b = 0; b < nbits; b++) begin
        checks++;
        if (sdo != v[W-1-b] || sframe != (b == 0)) begin
          failures++;
          $display("FAIL word %h bit %0d sdo %0d sframe %0d", v, b, sdo, sframe);
        end
        if (b < nbits - 1) begin @(posedge clk); #1; end
      end
      if (nbits == W) begin
        @(posedge clk); #1;
        checks++;
        if (sdo != 1'b0 || sframe) begin failures++; $display("FAIL not idle after word"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
