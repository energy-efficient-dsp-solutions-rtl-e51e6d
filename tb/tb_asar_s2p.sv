// tb_asar_s2p: sends random 12-bit words MSB first with a frame marker on
// the first bit, with and without idle clocks between words, and checks that
// each word appears on word with a one-clock valid pulse exactly one clock
// after its last bit; also checks that a frame marker in mid-word restarts
// the word.
module tb_asar_s2p;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0, frame = 1'b0, sdi = 1'b0;
  logic [W-1:0] word;
  logic valid;
  int checks = 0, failures = 0, nvalid = 0;

  asar_s2p #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (valid) nvalid++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [W-1:0] v, int cut);
    for (int b = W - 1; b >= 0; b--) begin
      frame = (b == W - 1);
      sdi   = v[b];
      @(posedge clk); #1;
      checks++;
      if (b > 0 && valid) begin failures++; $display("FAIL valid during word"); end
      if (cut > 0 && (W - 1 - b) == cut) break;
    end
    frame = 1'b0;
    sdi = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      logic [W-1:0] v;
      int n0;
      v = W'($urandom);
      if (i % 10 == 3) send(W'($urandom), 5);   // aborted word
      n0 = nvalid;
      send(v, 0);
      // the last bit went in at the previous edge: valid is high now
      checks++;
      if (!valid || word != v) begin
        failures++; $display("FAIL word %h valid %0d expected %h", word, valid, v);
      end
      if (i % 2 == 0) begin
        @(posedge clk); #1;
        checks++;
        if (valid) begin failures++; $display("FAIL valid longer than one clock"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
