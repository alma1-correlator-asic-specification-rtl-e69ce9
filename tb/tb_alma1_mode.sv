// tb_alma1_mode -- self-checking test of the chip data-bus modes.
//
// Steps through the card modes of the production test (T1, T2, T3, T5 and
// CENTERBUS=3 with the Aux bus) with random data on all input buses and
// checks, two clocks after each input word: the Main bus on dtl, the Aux
// bus (or zeros without AUXEN) on dtr, the selected center-bus source on
// center (one clock) and on dl/dr, the left/right output enables from
// LTOR-IN and LTOR, LTOR-OUT, and HIZ.  It also checks that after each
// CENTERBUS change the center bus carries zeros for exactly one clock
// (break-before-make) and counts these gaps.
module tb_alma1_mode;
  import alma1_pkg::*;
  logic        clk = 1'b0, rst_n;
  logic [15:0] dbl, dbr, dl_in, dr_in;
  logic        ltor_in, ltor, auxen, hiz;
  logic [1:0]  centerbus;
  logic [15:0] main_bus, center, dtl, dtr, dl_out, dr_out;
  logic        dt_oe, dl_oe, dr_oe, ltor_out;
  int          checks = 0, failures = 0, gaps = 0;

  alma1_mode dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] h_dbl [4], h_dbr [4], h_dl [4], h_dr [4];
  int cyc = 0;
  always @(posedge clk) begin
    h_dbl[cyc % 4] = dbl; h_dbr[cyc % 4] = dbr; h_dl[cyc % 4] = dl_in; h_dr[cyc % 4] = dr_in;
    cyc++;
  end

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] src_at(input int code, input int ago);
    int i = (cyc - 1 - ago) % 4;
    case (code)
      0: return h_dl[i];
      1: return h_dbl[i];
      2: return h_dbr[i];
      default: return h_dr[i];
    endcase
  endfunction

  task automatic mode(input logic li, input logic lt, input logic [1:0] cb, input logic ax, input string name);
    @(negedge clk) begin ltor_in = li; ltor = lt; centerbus = cb; auxen = ax; end
    // first clock after a change: center bus idle
    for (int i = 0; i < 12; i++) begin
      @(negedge clk) begin
        dbl = 16'($urandom); dbr = 16'($urandom); dl_in = 16'($urandom); dr_in = 16'($urandom);
      end
      #1;
      if (i == 0) begin
        chk(center, 16'h0, {name, " break-before-make"});
        if (center == 0) gaps++;
      end
      if (i >= 3) begin
        chk(center, src_at(cb, 0), {name, " center"});
        chk(dtl, src_at(1, 1), {name, " dtl"});
        chk(dtr, ax ? src_at(2, 1) : 16'h0, {name, " dtr"});
        chk(dl_out, src_at(cb, 1), {name, " dl_out"});
        chk(dr_out, src_at(cb, 1), {name, " dr_out"});
        chk(main_bus, src_at(1, 0), {name, " main"});
        chk({15'h0, dl_oe}, {15'h0, ~li}, {name, " dl_oe"});
        chk({15'h0, dr_oe}, {15'h0, lt}, {name, " dr_oe"});
        chk({15'h0, ltor_out}, {15'h0, lt}, {name, " ltor_out"});
        chk({15'h0, dt_oe}, 16'h1, {name, " dt_oe"});
      end
    end
  endtask

  initial begin
    rst_n = 0; dbl = 0; dbr = 0; dl_in = 0; dr_in = 0; ltor_in = 1; ltor = 1;
    auxen = 0; hiz = 0; centerbus = 2'd3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    mode(1, 1, 2'd0, 0, "T1");
    mode(0, 1, 2'd1, 0, "T2");
    mode(0, 1, 2'd2, 1, "T3");
    mode(0, 0, 2'd3, 0, "T5");
    mode(1, 0, 2'd1, 1, "T5aux");
    mode(1, 1, 2'd0, 0, "T1b");
    @(negedge clk) hiz = 1;
    #1;
    chk({13'h0, dt_oe, dl_oe, dr_oe}, 16'h0, "hiz");
    checks++;
    if (gaps != 6) begin failures++; $display("FAIL break-before-make gaps=%0d", gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
