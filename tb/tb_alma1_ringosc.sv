// tb_alma1_ringosc -- checks the ring-oscillator model: no edges while the
// enable (PGM STB) is low, steady toggling at the model's half period while
// it is high, and rest at 0 once it goes low again.
module tb_alma1_ringosc;
  logic en, ringosc;
  int   checks = 0, failures = 0, edges = 0;

  alma1_ringosc #(.HALF(2)) dut (.*);

  always @(ringosc) edges++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0;
    #20;
    edges = 0;
    #40;
    checks++;
    if (edges != 0 || ringosc !== 1'b0) begin failures++; $display("FAIL toggles while disabled"); end
    en = 1;
    #1;
    edges = 0;
    #40;
    checks++;
    if (edges < 19 || edges > 21) begin failures++; $display("FAIL %0d edges in 40 time units", edges); end
    en = 0;
    #10;
    checks++;
    if (ringosc !== 1'b0) begin failures++; $display("FAIL not at rest"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
