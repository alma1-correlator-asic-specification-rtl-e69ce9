// tb_alma1_pgm -- self-checking test of the serial program word.
//
// Shifts random words in at the fastest allowed rate (PGM CLK at half the
// chip clock) and at a slower rate, bit 0 first, and checks: the shadow
// word pw does not change while shifting; after PGM STB it equals the word
// shifted in; and PGM DATA OUT delivers the previous word, bit 0 first, so
// a second chip chained behind this one would receive it.
module tb_alma1_pgm;
  import alma1_pkg::*;
  logic      clk = 1'b0, rst_n, pgm_clk, pgm_data, pgm_stb, pgm_data_out;
  pgm_word_t pw;
  int        checks = 0, failures = 0;

  alma1_pgm dut (.*);

  // a second chip chained behind the first, as on the correlator card
  pgm_word_t pw2;
  logic      unused_out2;
  alma1_pgm next_chip (
    .clk(clk), .rst_n(rst_n), .pgm_clk(pgm_clk), .pgm_data(pgm_data_out),
    .pgm_stb(pgm_stb), .pgm_data_out(unused_out2), .pw(pw2)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PGM_BITS-1:0] words [4];

  task automatic shift_word(input logic [PGM_BITS-1:0] w, input int half);
    pgm_word_t prev_pw = pw;
    for (int i = 0; i < PGM_BITS; i++) begin
      @(negedge clk) begin pgm_data = w[i]; pgm_clk = 0; end
      repeat (half - 1) @(negedge clk);
      @(negedge clk) pgm_clk = 1;
      repeat (half - 1) @(negedge clk);
    end
    @(negedge clk) pgm_clk = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (pw !== prev_pw) begin failures++; $display("FAIL pw changed before strobe"); end
  endtask

  task automatic strobe();
    @(negedge clk) pgm_stb = 1;
    repeat (3) @(negedge clk);
    pgm_stb = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; pgm_clk = 0; pgm_data = 0; pgm_stb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++)
      for (int b = 0; b < PGM_BITS; b++) words[i][b] = 1'($urandom);
    for (int i = 0; i < 4; i++) begin
      shift_word(words[i], (i % 2) ? 3 : 1);
      strobe();
      if (i > 0) begin
        checks++;
        if (pw2 !== pgm_word_t'(words[i-1])) begin failures++; $display("FAIL chained word %0d", i); end
      end
      checks++;
      if (pw !== pgm_word_t'(words[i])) begin failures++; $display("FAIL pw word %0d", i); end
    end
    // a field lands where the struct says
    checks++;
    if (pw.seldly !== words[3][11:7]) begin failures++; $display("FAIL seldly position"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
