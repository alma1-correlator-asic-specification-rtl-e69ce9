// tb_alma1_sub64 -- self-checking test of the 64-lag sub-block.
//
// The testbench keeps a history of every input sample and works out, for
// each lag k, which delayed sample it must see: d(t - n - k*s), with
// s = 2 when oversampled, else 1, and n the input delay-line length
// (CONCAT: s, LEAD: 1+s, neither: 1).  A reference accumulator per lag sums
// the biased products of the registered prompt and that sample on every
// unblanked clock.  For all eight CONCAT/LEAD/OVERSAMP settings it checks
// chain_out every clock, then dumps and reads the 64 lags out through the
// broadside shift register and compares each word (21-bit mode, so the
// words are the accumulator bits [20:5]).
module tb_alma1_sub64;
  import alma1_pkg::*;
  localparam int N = 64;
  localparam int H = 4096;     // history depth (power of two)

  logic        clk = 1'b0;
  logic [1:0]  p_in, d_in, chain_out;
  logic        blank_in, concat, lead, oversamp, fullacc, rc_tste64;
  logic        acc_rst, store_ld, shift_en;
  logic [15:0] rd_data;
  int          checks = 0, failures = 0;

  int          cyc = 0;
  logic [1:0]  ph [H];
  logic [1:0]  dh [H];
  logic        bh [H];
  longint      racc [N];
  logic [15:0] rstore [N];

  alma1_sub64 #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_prod(input logic [1:0] a, input logic [1:0] b);
    return ((2 * int'(a) - 3) * (2 * int'(b) - 3) + 9) / 2;
  endfunction

  function automatic int step();
    return oversamp ? 2 : 1;
  endfunction

  function automatic int nline();
    if (concat) return step();
    if (lead)   return 1 + step();
    return 1;
  endfunction

  // reference model, evaluated at each rising edge before the history grows
  always @(posedge clk) begin
    if (store_ld)
      for (int k = 0; k < N; k++) rstore[k] = 16'(racc[k] >> 5);
    else if (shift_en)
      for (int k = 0; k < N; k++) rstore[k] = (k == N-1) ? 16'h0 : rstore[k+1];
    for (int k = 0; k < N; k++) begin
      if (acc_rst) racc[k] = 0;
      else if (!bh[(cyc-1) % H])
        racc[k] = (racc[k] + ref_prod(ph[(cyc-1) % H], dh[(cyc - nline() - k*step()) % H])) % (64'd1 << 21);
    end
    ph[cyc % H] = p_in;
    dh[cyc % H] = d_in;
    bh[cyc % H] = blank_in;
    cyc++;
  end

  // chain_out = sample entering lag 63
  task automatic check_chain();
    checks++;
    if (chain_out !== dh[(cyc - nline() - (N-1)*step()) % H]) begin
      failures++;
      if (failures < 10) $display("FAIL chain_out at %0d", cyc);
    end
  endtask

  task automatic drive(input int n, input bit blk);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      p_in = 2'($urandom); d_in = 2'($urandom); blank_in = blk;
      if (i > 2 * N + 8) check_chain();
    end
  endtask

  initial begin
    p_in = 0; d_in = 0; blank_in = 1; concat = 0; lead = 0; oversamp = 0;
    fullacc = 0; rc_tste64 = 0; acc_rst = 0; store_ld = 0; shift_en = 0;
    for (int cfg = 0; cfg < 8; cfg++) begin
      {concat, lead, oversamp} = 3'(cfg);
      drive(2 * N + 20, 1);                 // refill the lag generator
      @(negedge clk) acc_rst = 1;
      @(negedge clk) acc_rst = 0;
      drive(600, 0);
      drive(20, 1);
      @(negedge clk) store_ld = 1;
      @(negedge clk) store_ld = 0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (rd_data !== rstore[0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL cfg=%0d lag %0d: got %h expected %h", cfg, k, rd_data, rstore[0]);
        end
        @(negedge clk) shift_en = 1;
        @(negedge clk) shift_en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
