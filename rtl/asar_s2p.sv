// asar_s2p: serial-to-parallel input interface of the standalone ASAR chip.
//
// The fabricated ASAR designs had too few pads for parallel data, so each
// W-bit sample arrives on one pin, one bit per clock, and the engine clock is
// W times the sample rate (16 x 6 kHz = 96 kHz for the LFP design,
// 12 x 24 kHz = 288 kHz for the Spike design). The document gives only that
// function; the framing used here is this implementation's choice: bits come
// most significant first, frame is high with the first bit of every word, and
// valid pulses for one clock with the completed word in the cycle after its
// last bit has been shifted in. A frame pulse always restarts the word.
//
// Interface: sdi, frame in; word (W bits) and valid out. One word per W
// clocks; word is held until the next word completes.
module asar_s2p #(
  parameter int unsigned W = 16   // at least 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         frame,
  input  logic         sdi,
  output logic [W-1:0] word,
  output logic         valid
);

  localparam int unsigned C_W = $clog2(W + 1);

  logic [W-1:0]   sh;
  logic [C_W-1:0] cnt;      // bits received in the current word
  logic           active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= '0;
      cnt    <= '0;
      active <= 1'b0;
      word   <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (frame) begin
        sh     <= {{(W-1){1'b0}}, sdi};
        cnt    <= C_W'(1);
        active <= 1'b1;
      end else if (active) begin
        sh  <= {sh[W-2:0], sdi};
        cnt <= cnt + 1'b1;
        if (cnt == C_W'(W - 1)) begin
          word   <= {sh[W-2:0], sdi};
          valid  <= 1'b1;
          active <= 1'b0;
        end
      end
    end
  end

endmodule
