// tb_alma1_vdelay -- self-checking test of the adjustable delay line.
// For every setting 0..31 random words are fed in and each output word is
// compared with the input word of dly clocks before.
module tb_alma1_vdelay;
  logic        clk = 1'b0;
  logic [4:0]  dly;
  logic [16:0] din, dout;
  logic [16:0] hist [64];
  int          cyc = 0, checks = 0, failures = 0;

  alma1_vdelay #(.W(17), .DEPTH(31)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    hist[cyc % 64] = din;
    cyc++;
  end

  initial begin
    din = 0; dly = 0;
    for (int d = 0; d < 32; d++) begin
      dly = 5'(d);
      for (int i = 0; i < 80; i++) begin
        @(negedge clk) din = 17'($urandom);
        #1;
        if (i > 33) begin
          checks++;
          // the word in din now entered at cycle cyc; d edges ago it was hist[cyc-d]
          if (dout !== ((d == 0) ? din : hist[(cyc - d) % 64])) begin
            failures++;
            if (failures < 10) $display("FAIL dly=%0d: %h", d, dout);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
