// tb_alma1_block256 -- self-checking test of a 256-lag block.
//
// Each round loads a random multiplexer setting (prompt and delayed source
// of each sub-block, CONCAT bits, LEADLL/LEADUR, OVERSAMP), feeds random
// samples on the four digitizer inputs and the incoming delay chain, and
// keeps a reference accumulator for all 256 lags.  The reference resolves
// each lag's delayed sample by walking the chain: a non-concatenated
// sub-block starts at its own source with delay n (1, or 1+s for a LEAD
// block), a concatenated one continues from lag 63 of the sub-block before
// it (or from chain_in) with one more lag step s.  The block sits at row 1,
// column 0, so LEADLL makes it a LEAD block and LEADUR does not.
// Then a dump/reset sequence is applied with DUMP ENABLE and FULLACC
// chosen so that it is sometimes suppressed, and all four sub-blocks are
// read out through the SEL/RDCLKENBL path and compared.
module tb_alma1_block256;
  import alma1_pkg::*;
  localparam int N = 64;
  localparam int H = 8192;

  logic        clk = 1'b0;
  logic [1:0]  xm [2];
  logic [1:0]  ym [2];
  logic [1:0]  chain_in, chain_out;
  logic        blank;
  logic [15:0] r_m;
  logic [2:0]  r_w;
  logic        wrap, leadll, leadur, oversamp, fullacc, rc_tste64;
  logic        seq_dump, seq_reset, dump_en, rd_en;
  logic [5:0]  sel_p;
  logic [15:0] rd_data;
  logic        block_sel;
  int          checks = 0, failures = 0;
  int          n_suppressed = 0, n_dumped = 0, n_lead = 0, n_concat = 0;

  alma1_block256 #(.ROW(1), .COL(0), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          cyc = 0;
  logic [1:0]  sh [5][H];      // 0..3: X-M0, X-M1, Y-M0, Y-M1; 4: chain_in
  logic        bh [H];
  longint      racc  [4][N];
  logic [15:0] rstore[4][N];
  int          dsrc  [4][N];
  int          ddel  [4][N];
  logic        dump_d;

  function automatic int ref_prod(input logic [1:0] a, input logic [1:0] b);
    return ((2 * int'(a) - 3) * (2 * int'(b) - 3) + 9) / 2;
  endfunction

  // where lag k of sub-block s takes its delayed sample from
  task automatic resolve();
    int st = oversamp ? 2 : 1;
    logic [3:0] cc = {r_w, wrap};
    bit is_lead = leadll;            // row 1, column 0: lower left
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < N; k++) begin
        if (cc[s]) begin
          dsrc[s][k] = (s == 0) ? 4 : dsrc[s-1][N-1];
          ddel[s][k] = ((s == 0) ? 0 : ddel[s-1][N-1]) + st + k * st;
        end else begin
          dsrc[s][k] = int'(r_m[4*s+2 +: 2]);
          ddel[s][k] = (is_lead ? 1 + st : 1) + k * st;
        end
      end
  endtask

  always @(posedge clk) begin
    logic dg, rg;
    dg = seq_dump  & (dump_en | ~fullacc);
    rg = seq_reset & (dump_en | ~fullacc);
    for (int s = 0; s < 4; s++) begin
      if (dump_d)
        for (int k = 0; k < N; k++) rstore[s][k] = 16'(racc[s][k] >> 5);
      else if (rd_en && sel_p == {4'(1 * 4 + 0), 2'(s)})
        for (int k = 0; k < N; k++) rstore[s][k] = (k == N-1) ? 16'h0 : rstore[s][k+1];
      for (int k = 0; k < N; k++) begin
        if (rg) racc[s][k] = 0;
        else if (!bh[(cyc-1) % H])
          racc[s][k] = (racc[s][k] + ref_prod(sh[int'(r_m[4*s +: 2])][(cyc-1) % H],
                                              sh[dsrc[s][k]][(cyc - ddel[s][k]) % H])) % (64'd1 << 21);
      end
    end
    dump_d = dg;
    sh[0][cyc % H] = xm[0];
    sh[1][cyc % H] = xm[1];
    sh[2][cyc % H] = ym[0];
    sh[3][cyc % H] = ym[1];
    sh[4][cyc % H] = chain_in;
    bh[cyc % H]    = blank;
    cyc++;
  end

  task automatic drive(input int n, input bit blk);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      xm[0] = 2'($urandom); xm[1] = 2'($urandom);
      ym[0] = 2'($urandom); ym[1] = 2'($urandom);
      chain_in = 2'($urandom); blank = blk;
    end
  endtask

  task automatic pulse_seq(input bit de);
    @(negedge clk) begin dump_en = de; seq_dump = 1; end
    @(negedge clk) seq_dump = 0;
    @(negedge clk) seq_reset = 1;
    @(negedge clk) begin seq_reset = 0; dump_en = 0; end
  endtask

  task automatic read_sub(input int s);
    @(negedge clk) sel_p = {4'd4, 2'(s)};
    @(negedge clk);
    checks++;
    if (!block_sel) begin failures++; $display("FAIL block_sel"); end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (rd_data !== rstore[s][0]) begin
        failures++;
        if (failures < 10) $display("FAIL sub %0d lag %0d: got %h expected %h", s, k, rd_data, rstore[s][0]);
      end
      @(negedge clk) rd_en = 1;
      @(negedge clk) rd_en = 0;
    end
  endtask

  initial begin
    xm[0] = 0; xm[1] = 0; ym[0] = 0; ym[1] = 0; chain_in = 0; blank = 1;
    r_m = 0; r_w = 0; wrap = 0; leadll = 0; leadur = 0; oversamp = 0; fullacc = 0;
    rc_tste64 = 0; seq_dump = 0; seq_reset = 0; dump_en = 0; rd_en = 0; sel_p = 0;
    dump_d = 0;
    for (int round = 0; round < 10; round++) begin
      bit de;
      @(negedge clk);
      r_m = 16'($urandom); r_w = 3'($urandom); wrap = 1'($urandom);
      {leadll, leadur} = 2'($urandom); oversamp = 1'($urandom);
      if (round == 0) begin r_w = 3'b111; wrap = 1; oversamp = 1; end
      if (round == 1) begin r_w = 3'b000; wrap = 0; leadll = 1; end
      n_concat += int'(wrap) + $countones(r_w);
      n_lead   += int'(leadll);
      resolve();
      drive(4 * 2 * N + 16, 1);          // refill all delay chains
      fullacc = 0;
      pulse_seq(0);                      // 21-bit mode: always resets
      drive(300 + 10 * round, 0);
      drive(8, 1);
      // first check suppression: FULLACC=1 with DUMP ENABLE=0 keeps storage
      fullacc = (round % 3) == 1;
      de = (round % 3) == 2;
      if (fullacc && !de) n_suppressed++; else n_dumped++;
      pulse_seq(de);
      fullacc = 0;
      for (int s = 0; s < 4; s++) read_sub(s);
    end
    checks++;
    if (n_suppressed == 0 || n_dumped == 0 || n_lead == 0 || n_concat == 0) begin
      failures++;
      $display("FAIL coverage: suppressed=%0d dumped=%0d lead=%0d concat=%0d",
               n_suppressed, n_dumped, n_lead, n_concat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
