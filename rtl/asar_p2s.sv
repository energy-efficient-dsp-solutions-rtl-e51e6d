// asar_p2s: parallel-to-serial output interface of the standalone ASAR chip.
//
// The cleaned W-bit output sample leaves the chip on a single pin. When load
// is high the word is captured and then sent most significant bit first, one
// bit per clock, on the W clocks that follow; sframe is high with the first
// bit. The document names this block and its purpose only; bit order, the
// frame marker and the load handshake are this implementation's choices and
// match asar_s2p, so an s2p can receive what a p2s sends. A load while a word
// is still being sent restarts with the new word.
//
// Interface: load, word in; sdo, sframe out. Bit j (from the MSB) of a word
// loaded at clock edge t is on sdo between edges t+j and t+j+1.
module asar_p2s #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] word,
  output logic         sdo,
  output logic         sframe
);

  localparam int unsigned C_W = $clog2(W + 1);

  logic [W-1:0]   sh;
  logic [C_W-1:0] left;     // bits still to send, including the one on sdo

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= '0;
      left   <= '0;
      sframe <= 1'b0;
    end else if (load) begin
      sh     <= word;
      left   <= C_W'(W);
      sframe <= 1'b1;
    end else begin
      sframe <= 1'b0;
      if (left != '0) begin
        sh   <= sh << 1;
        left <= left - 1'b1;
      end
    end
  end

  assign sdo = (left != '0) ? sh[W-1] : 1'b0;

endmodule
