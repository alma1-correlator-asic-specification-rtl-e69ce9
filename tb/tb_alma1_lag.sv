// tb_alma1_lag -- self-checking test of one correlator lag.
//
// A reference integer accumulator sums the biased products, computed here
// from the sample levels as ((2a-3)(2b-3)+9)/2, on every unblanked clock.
// After each run the lag is dumped and the storage compared with bits
// [24:9] (25-bit mode) or [20:5] (21-bit mode) of the reference, or, in
// RC_TSTE64 mode, with both bytes equal to the low byte of the carry count.
// Runs: 25-bit mode, 21-bit mode, 21-bit mode long enough to wrap 2^21,
// RC_TSTE64, blanking, reset, and the readout shift path.
module tb_alma1_lag;
  logic        clk = 1'b0;
  logic [1:0]  p = '0, d = '0;
  logic        blank = 1'b1, acc_rst = 1'b0, fullacc = 1'b0, rc_tste64 = 1'b0;
  logic        store_ld = 1'b0, shift_en = 1'b0;
  logic [15:0] shift_in = '0, store;
  int          checks = 0, failures = 0;
  longint      total;

  alma1_lag dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_prod(input logic [1:0] a, input logic [1:0] b);
    int la = 2 * int'(a) - 3;
    int lb = 2 * int'(b) - 3;
    return (la * lb + 9) / 2;
  endfunction

  // reference accumulation at each rising edge
  always @(posedge clk) begin
    if (acc_rst) total <= 0;
    else if (!blank) total <= total + longint'(ref_prod(p, d));
  end

  task automatic check(input logic [15:0] exp, input string what);
    checks++;
    if (store !== exp) begin
      failures++;
      $display("FAIL %s: store=%h expected=%h (total=%0d)", what, store, exp, total);
    end
  endtask

  task automatic do_reset();
    @(negedge clk) acc_rst = 1'b1;
    @(negedge clk) acc_rst = 1'b0;
  endtask

  task automatic dump();
    @(negedge clk) begin blank = 1'b1; store_ld = 1'b1; end
    @(negedge clk) store_ld = 1'b0;
  endtask

  task automatic run(input int n, input int blank_pct, input bit maxprod);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      p     = maxprod ? 2'b11 : 2'($urandom);
      d     = maxprod ? 2'b11 : 2'($urandom);
      blank = ($urandom % 100) < blank_pct;
    end
  endtask

  initial begin
    // product table, one entry at a time, in 21-bit mode
    p = 0; d = 0; blank = 1; acc_rst = 0; fullacc = 0; rc_tste64 = 0;
    store_ld = 0; shift_en = 0; shift_in = 0; total = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        do_reset();
        @(negedge clk) begin p = 2'(a); d = 2'(b); blank = 0; end
        repeat (32) @(negedge clk);
        blank = 1;
        dump();
        check(16'(ref_prod(2'(a), 2'(b))), $sformatf("product %0d x %0d", a, b));
      end

    // 25-bit mode, random data, 20 % blanked
    fullacc = 1;
    do_reset();
    run(40000, 20, 0);
    dump();
    check(16'(total >> 9), "25-bit random");

    // 21-bit mode, random data
    fullacc = 0;
    do_reset();
    run(20000, 10, 0);
    dump();
    check(16'(total >> 5), "21-bit random");

    // 21-bit mode past 2^21: wraps
    do_reset();
    run(240000, 0, 1);
    dump();
    check(16'((total % (64'd1 << 21)) >> 5), "21-bit wrap");

    // blanking holds the accumulator
    do_reset();
    run(1000, 0, 0);
    run(500, 100, 0);
    dump();
    check(16'(total >> 5), "blanked");

    // RC_TSTE64: both bytes count the carries in parallel
    rc_tste64 = 1;
    do_reset();
    run(3000, 0, 1);
    dump();
    check({2{8'(total >> 5)}}, "rc_tste64 21-bit");
    fullacc = 1;
    do_reset();
    run(3000, 0, 1);
    dump();
    check({2{8'(total >> 9)}}, "rc_tste64 25-bit");
    rc_tste64 = 0;

    // reset clears, storage keeps the last dump until shifted
    do_reset();
    @(negedge clk);
    dump();
    check(16'h0000, "after reset");

    // readout shift
    @(negedge clk) begin shift_in = 16'hA5C3; shift_en = 1; end
    @(negedge clk) shift_en = 0;
    check(16'hA5C3, "shift");
    @(negedge clk) shift_in = 16'h1111;
    @(negedge clk);
    check(16'hA5C3, "hold without shift_en");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
