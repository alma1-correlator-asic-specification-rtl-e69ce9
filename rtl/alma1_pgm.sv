// alma1_pgm -- serial program word with secondary (shadow) register.
//
// PGM CLK, PGM DATA and PGM STB are sampled with the 125 MHz chip clock,
// which is why PGM CLK may run at no more than half that frequency.  On each
// rising edge of PGM CLK the shift register takes PGM DATA at its top and
// moves one place toward bit 0, so the first bit shifted in ends in bit 0.
// Bit 0, the last stage, is PGM DATA OUT for the next chip in the chain.
// A rising edge of PGM STB copies the shift register into the shadow
// register pw, so all mode bits change at once.  rst_n (a chip reset, this
// design's addition) clears both registers.
//
// Timing: the shift happens two chip clocks after PGM CLK rises, and pw
// changes two chip clocks after PGM STB rises.
module alma1_pgm
  import alma1_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      pgm_clk,
  input  logic      pgm_data,
  input  logic      pgm_stb,
  output logic      pgm_data_out,
  output pgm_word_t pw
);

  logic [PGM_BITS-1:0] sr;
  logic clk_s, clk_s2, data_s, stb_s, stb_s2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clk_s  <= 1'b0;
      clk_s2 <= 1'b0;
      data_s <= 1'b0;
      stb_s  <= 1'b0;
      stb_s2 <= 1'b0;
      sr     <= '0;
      pw     <= '0;
    end else begin
      clk_s  <= pgm_clk;
      clk_s2 <= clk_s;
      data_s <= pgm_data;
      stb_s  <= pgm_stb;
      stb_s2 <= stb_s;
      if (clk_s && !clk_s2) sr <= {data_s, sr[PGM_BITS-1:1]};
      if (stb_s && !stb_s2) pw <= pgm_word_t'(sr);
    end
  end

  assign pgm_data_out = sr[0];

endmodule
