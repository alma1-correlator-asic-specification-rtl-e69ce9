// tb_alma1_matrix -- self-checking test of the full 4x4 matrix (4096 lags).
//
// Each round draws a random program word (all multiplexers, CONCAT bits,
// LEAD bits, OVERSAMP and FULLACC per row), refills every delay chain with
// blanking high, resets, integrates random samples on both axes and on the
// D0-X chain input, dumps, and reads all 64 sub-blocks out over the results
// bus, comparing every lag with the reference model in alma1_ref_pkg.  D4-X
// is compared with the model's chain end every clock.  One round chains
// all 64 sub-blocks into one 4096-lag correlator fed from D0-X, and the
// last dump is made with DUMP ENABLE low so that 25-bit rows keep their old
// storage while 21-bit rows dump.
module tb_alma1_matrix;
  import alma1_pkg::*;
  import alma1_ref_pkg::*;

  localparam int NL = 4;      // lags per sub-block in this test

  logic        clk = 1'b0;
  logic [15:0] ybus, xbus, rd_bus;
  logic        yblank, seq_dump, seq_reset, dump_en, rd_en;
  logic [1:0]  d0x, d4x;
  logic [5:0]  sel_p;
  pgm_word_t   pw;
  int          checks = 0, failures = 0, chain_checks = 0;
  bit          chk_chain = 0;
  corr_ref     m;

  alma1_matrix #(.N(NL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (chk_chain) begin
      chain_checks++;
      if (d4x !== m.chain_end()) begin
        failures++;
        if (failures < 10) $display("FAIL d4x at %0d", m.cyc);
      end
    end
    m.step(xbus, ybus, yblank, d0x, seq_dump, seq_reset, dump_en);
  end

  task automatic drive(input int n, input bit blk);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      xbus = 16'($urandom); ybus = 16'($urandom); d0x = 2'($urandom); yblank = blk;
    end
  endtask

  task automatic dump_seq(input bit de);
    @(negedge clk) begin dump_en = de; seq_dump = 1; end
    @(negedge clk) seq_dump = 0;
    @(negedge clk) seq_reset = 1;
    @(negedge clk) begin seq_reset = 0; dump_en = 0; end
    repeat (2) @(negedge clk);
  endtask

  task automatic read_all();
    for (int b = 0; b < NBLOCKS; b++)
      for (int s = 0; s < 4; s++) begin
        @(negedge clk) sel_p = {4'(b), 2'(s)};
        @(negedge clk);
        for (int k = 0; k < NL; k++) begin
          checks++;
          if (rd_bus !== m.store[b][s][k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL block %0d sub %0d lag %0d: got %h expected %h", b, s, k, rd_bus, m.store[b][s][k]);
          end
          @(negedge clk) rd_en = 1;
          @(negedge clk) rd_en = 0;
        end
      end
  endtask

  initial begin
    m = new(NL);
    xbus = 0; ybus = 0; yblank = 1; d0x = 0; seq_dump = 0; seq_reset = 0;
    dump_en = 0; rd_en = 0; sel_p = 0; pw = '0;
    m.configure(pw);
    for (int round = 0; round < 3; round++) begin
      int maxdel = 0;
      @(negedge clk);
      pw = pgm_word_t'({4{$urandom}});
      pw.rc_tste64 = 0;
      if (round == 0) begin                  // one 4096-lag chain from D0-X
        pw.wrap_blk = '1;
        foreach (pw.r_w[r]) pw.r_w[r] = '1;
        pw.oversamp = 4'b0101;
      end
      if (round == 2) pw.fullacc = 4'b0011;
      m.configure(pw);
      for (int b = 0; b < NBLOCKS; b++)
        for (int s = 0; s < 4; s++)
          if (m.ddel[b][s][NL-1] > maxdel) maxdel = m.ddel[b][s][NL-1];
      chk_chain = 0;
      drive(maxdel + 8, 1);
      chk_chain = 1;
      dump_seq(1);
      drive(200, 0);
      drive(4, 1);
      dump_seq(1);
      if (round == 2) begin                  // second integration, DUMP ENABLE low
        drive(150, 0);
        drive(4, 1);
        dump_seq(0);
      end
      chk_chain = 0;
      read_all();
    end
    checks += chain_checks;
    checks++;
    if (m.n_dumps == 0) begin failures++; $display("FAIL no dumps"); end
    $display("dumps=%0d resets=%0d chain checks=%0d", m.n_dumps, m.n_resets, chain_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
