// tb_alma1_ctrl -- self-checking test of the dump/reset sequencer.
//
// For blanking pulses of several widths (2 to 600 clocks) it checks that
// exactly one SEQ DUMP TO STORAGE comes DUMP_DLY clocks after the rising
// edge of blank and exactly one SEQ ACCUMULATOR RESET two clocks after
// that, and that with resetenb=1 neither pulse appears.
module tb_alma1_ctrl;
  localparam int DLY = 14;
  logic clk = 1'b0, rst_n, blank, resetenb, seq_dump, seq_reset;
  int   checks = 0, failures = 0;

  alma1_ctrl #(.DUMP_DLY(DLY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulse(input int width, input bit renb);
    int t_dump = -1, t_rst = -1, n_dump = 0, n_rst = 0;
    @(negedge clk) begin blank = 1; resetenb = renb; end
    for (int t = 1; t <= 60 + width; t++) begin
      @(negedge clk);
      if (t == width) blank = 0;
      if (seq_dump)  begin n_dump++; t_dump = t; end
      if (seq_reset) begin n_rst++;  t_rst  = t; end
    end
    expect_eq(n_dump, renb ? 0 : 1, $sformatf("dump count w=%0d", width));
    expect_eq(n_rst,  renb ? 0 : 1, $sformatf("reset count w=%0d", width));
    if (!renb) begin
      expect_eq(t_dump, DLY, "dump time");
      expect_eq(t_rst,  DLY + 2, "reset time");
    end
  endtask

  initial begin
    rst_n = 0; blank = 0; resetenb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pulse(2, 0);
    pulse(64, 0);
    pulse(600, 0);
    pulse(64, 1);
    pulse(128, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
