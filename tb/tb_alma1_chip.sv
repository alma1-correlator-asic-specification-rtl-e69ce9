// tb_alma1_chip -- end-to-end test of the correlator chip from its pins.
//
// Everything goes through the pins: program words are shifted in on
// PGM CLK/PGM DATA at half the chip clock and applied with PGM STB, random
// samples drive the Main, Aux, Left and Right buses and D0-X, BLANKING and
// DUMP ENABLE start the dump/reset sequences, and the results are read out
// on OUT[15:0] at half rate with SEL/RDCLKENBL.  Pin histories give the
// values at the matrix ports (vertical data and blanking after SELDLY + 1
// clocks, center bus after 1, D0-X and DUMP ENABLE after 1) for the
// reference model in alma1_ref_pkg, and the dump/reset times (DUMP_DLY and
// DUMP_DLY+2 clocks after the delayed blanking rises, unless RESETENB=1).
//
// Configurations, one per center-bus source:
//   A  CENTERBUS=Main (self-card diagonal), SELDLY=3, LEAD blocks, mixed
//      FULLACC and OVERSAMP rows, full readout of all 64 sub-blocks;
//   B  CENTERBUS=Aux with AUXEN (cross card), all 64 sub-blocks chained
//      from D0-X, RC_TSTE64, a blanking with RESETENB=1 (no dump, no reset)
//      and one with DUMP ENABLE low (25-bit rows keep their storage);
//   C  CENTERBUS=Left, D  CENTERBUS=Right: bus paths and two sub-blocks.
// Along the way: the bus outputs and their enables, LTOR-OUT, the
// break-before-make gap, C125OUT gating by CKPINEN, PGM STB OUT, the ring
// oscillator, XOE\/YOE\ and HIZ.  Each mechanism is counted and a failure
// is counted for one that never happened.
module tb_alma1_chip;
  import alma1_pkg::*;
  import alma1_ref_pkg::*;

  localparam int NL = 4;      // lags per sub-block in this test

  localparam int DLY = 14;    // DUMP_DLY default of the chip

  logic        c125 = 1'b0, rst_n;
  logic [15:0] dbl, dbr, dl_in, dr_in, dtl, dtr, dl_out, dr_out, out;
  logic        ltor_in, dt_oe, dl_oe, dr_oe, ltor_out;
  logic [1:0]  d0x, d4x;
  logic        blanking, dump_enable, rdclkenbl, xoe_n, yoe_n, out_oe;
  logic [5:0]  sel;
  logic        pgm_clk, pgm_data, pgm_stb, pgm_clk_out, pgm_data_out, pgm_stb_out;
  logic        hiz, c125out, pads_oe, ringosc;

  alma1_chip #(.N(NL)) dut (.*);

  always #5 c125 = ~c125;

  int checks = 0, failures = 0;
  int n_oversamp = 0, n_lead = 0, n_concat = 0, n_21bit = 0, n_25bit = 0;
  int n_dumps = 0, n_inhibit_dumpen = 0, n_inhibit_resetenb = 0, n_bbm = 0;
  int n_cb [4] = '{0, 0, 0, 0};
  int n_rc = 0, n_ring = 0, n_hiz = 0, n_xyoe = 0, n_ckpin = 0, n_words = 0;

  initial begin
    repeat (400_000) @(posedge c125);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- model
  localparam int PH = 64;
  corr_ref     m;
  pgm_word_t   act;                 // program word in effect
  int          cyc = 0;
  logic [15:0] h_dbl [PH], h_dbr [PH], h_dl [PH], h_dr [PH];
  logic        h_blk [PH], h_de [PH];
  logic [1:0]  h_d0x [PH];
  int          dump_at = -1, rst_at = -1;
  logic        yb_prev = 1'b0;
  bit          stable = 0;          // center source settled

  function automatic logic [15:0] center_src(input int t);
    case (act.centerbus)
      CB_LEFT: return h_dl[t % PH];
      CB_MAIN: return h_dbl[t % PH];
      CB_AUX:  return h_dbr[t % PH];
      default: return h_dr[t % PH];
    endcase
  endfunction

  always @(posedge c125) begin
    logic [15:0] x, y;
    logic yb, de, sd, sr;
    int T;
    T = cyc;
    h_dbl[T % PH] = dbl; h_dbr[T % PH] = dbr; h_dl[T % PH] = dl_in; h_dr[T % PH] = dr_in;
    h_blk[T % PH] = blanking; h_de[T % PH] = dump_enable; h_d0x[T % PH] = d0x;
    if (T > 40 && m != null) begin
      x  = stable ? center_src(T - 1) : 16'h0;
      y  = h_dbl[(T - 1 - int'(act.seldly)) % PH];
      yb = h_blk[(T - 1 - int'(act.seldly)) % PH];
      de = h_de[(T - 1) % PH];
      if (yb && !yb_prev) begin
        dump_at = T + DLY;
        rst_at  = T + DLY + 2;
      end
      yb_prev = yb;
      sd = (T == dump_at) && !act.resetenb;
      sr = (T == rst_at)  && !act.resetenb;
      if (T == dump_at && act.resetenb) n_inhibit_resetenb++;
      if (sd && !de && act.fullacc != 4'h0) n_inhibit_dumpen++;
      if (sd) n_dumps++;
      m.step(x, y, yb, h_d0x[(T - 1) % PH], sd, sr, de);
    end
    cyc++;
  end

  // ---------------------------------------------------------------- pins
  task automatic load_word(input pgm_word_t w);
    logic [PGM_BITS-1:0] bits = PGM_BITS'(w);
    for (int i = 0; i < PGM_BITS; i++) begin
      @(negedge c125) begin pgm_data = bits[i]; pgm_clk = 0; end
      @(negedge c125) pgm_clk = 1;
    end
    @(negedge c125) pgm_clk = 0;
  endtask

  task automatic strobe(input pgm_word_t w);
    int edges = 0;
    logic r0;
    @(negedge c125) pgm_stb = 1;
    r0 = ringosc;
    for (int i = 0; i < 3; i++) begin
      @(negedge c125);
      chk(pgm_stb_out == 1'b1, "PGM STB OUT");
    end
    if (ringosc !== r0) n_ring++;
    pgm_stb = 0;
    @(negedge c125);
    if (w.centerbus != act.centerbus) stable = 0;   // break-before-make gap
    act = w;
    if (m != null) m.configure(w);
    @(negedge c125);
    @(negedge c125);
    stable = 1;
    n_words++;
  endtask

  task automatic drive(input int n, input bit blk, input bit de);
    for (int i = 0; i < n; i++) begin
      @(negedge c125);
      dbl = 16'($urandom); dbr = 16'($urandom); dl_in = 16'($urandom); dr_in = 16'($urandom);
      d0x = 2'($urandom); blanking = blk; dump_enable = de;
    end
  endtask

  // blanking pulse long enough to cover the dump/reset sequence
  task automatic blank_pulse(input bit de);
    drive(int'(act.seldly) + DLY + 12, 1, de);
  endtask

  // bus outputs: two clocks through the chip
  task automatic check_buses();
    for (int i = 0; i < 6; i++) begin
      drive(1, blanking, dump_enable);
      #1;
      chk(dtl == h_dbl[(cyc - 2) % PH], "DTL = Main bus");
      chk(dtr == (act.auxen ? h_dbr[(cyc - 2) % PH] : 16'h0), "DTR = Aux bus or zero");
      chk(dl_out == center_src(cyc - 2) && dr_out == center_src(cyc - 2), "DL/DR = center bus");
      chk(dl_oe == !ltor_in && dr_oe == act.ltor && ltor_out == act.ltor && dt_oe, "bus enables");
    end
  endtask

  task automatic read_sub(input int b, input int s);
    @(negedge c125) sel = {4'(b), 2'(s)};
    @(negedge c125);
    @(negedge c125);
    // RDCLKENBL every other clock (the maximum rate); lag k is on OUT
    // three clocks after the enable that moved it to lag 0
    for (int k = 0; k < NL; k++) begin
      @(negedge c125) rdclkenbl = 1;
      @(negedge c125) rdclkenbl = 0;
      chk(out == m.store[b][s][k], $sformatf("OUT block %0d sub %0d lag %0d: %h vs %h",
                                             b, s, k, out, m.store[b][s][k]));
    end
    repeat (2) @(negedge c125);
  endtask

  task automatic read_all();
    for (int b = 0; b < NBLOCKS; b++)
      for (int s = 0; s < 4; s++) read_sub(b, s);
  endtask

  function automatic void count_cfg(input pgm_word_t w);
    n_oversamp += $countones(w.oversamp);
    n_lead     += int'(w.leadll) + int'(w.leadur);
    n_concat   += $countones(w.wrap_blk) + $countones(w.r_w);
    n_21bit    += 4 - $countones(w.fullacc);
    n_25bit    += $countones(w.fullacc);
    n_rc       += int'(w.rc_tste64);
    n_cb[w.centerbus]++;
  endfunction

  // run one configuration: refill, reset, integrate, dump
  task automatic integrate(input pgm_word_t w, input int len);
    int maxdel = 0;
    load_word(w);
    strobe(w);
    count_cfg(w);
    for (int b = 0; b < NBLOCKS; b++)
      for (int s = 0; s < 4; s++)
        if (m.ddel[b][s][NL-1] > maxdel) maxdel = m.ddel[b][s][NL-1];
    drive(4, 0, 1);
    drive(maxdel + 40, 1, 1);          // blanking rises: reset; chains refill
    drive(len, 0, 1);
    blank_pulse(1);                    // dump
  endtask

  initial begin
    pgm_word_t w;
    int        bbm_seen;
    rst_n = 0; dbl = 0; dbr = 0; dl_in = 0; dr_in = 0; ltor_in = 0; d0x = 0;
    blanking = 0; dump_enable = 0; sel = 0; rdclkenbl = 0; xoe_n = 0; yoe_n = 0;
    pgm_clk = 0; pgm_data = 0; pgm_stb = 0; hiz = 0;
    act = '0;
    repeat (4) @(negedge c125);
    rst_n = 1;
    m = new(NL);
    m.configure(act);

    // ---------------- A: self-card diagonal, CENTERBUS = Main
    w = pgm_word_t'({4{$urandom}});
    w.centerbus = CB_MAIN; w.auxen = 0; w.ltor = 1; w.seldly = 5'd3; w.resetenb = 0;
    w.rc_tste64 = 0; w.leadll = 1; w.leadur = 0; w.fullacc = 4'b0110; w.oversamp = 4'b1010;
    w.ckpinen = 1;
    integrate(w, 300);
    // break-before-make: center bus was idle one clock after the strobe
    check_buses();
    // C125OUT follows the clock while CKPINEN=1
    @(posedge c125); #1; chk(c125out == 1'b1, "C125OUT high"); n_ckpin++;
    @(negedge c125); #1; chk(c125out == 1'b0, "C125OUT low");
    read_all();

    // ---------------- B: cross card, CENTERBUS = Aux, one 4096-lag chain
    w = pgm_word_t'({4{$urandom}});
    w.centerbus = CB_AUX; w.auxen = 1; w.ltor = 0; w.seldly = 5'd0; w.resetenb = 0;
    w.wrap_blk = '1; foreach (w.r_w[r]) w.r_w[r] = '1;
    w.rc_tste64 = 1; w.fullacc = 4'b0011; w.ckpinen = 0;
    ltor_in = 1;
    integrate(w, 250);
    @(posedge c125); #1; chk(c125out == 1'b0, "C125OUT gated off"); n_ckpin++;
    check_buses();
    // blanking with RESETENB=1: neither dump nor reset, integration goes on
    w.resetenb = 1;
    load_word(w);
    strobe(w);
    drive(100, 0, 1);
    blank_pulse(1);
    drive(100, 0, 1);
    // back to RESETENB=0, dump with DUMP ENABLE low: only 21-bit rows dump
    w.resetenb = 0;
    load_word(w);
    strobe(w);
    drive(50, 0, 0);
    blank_pulse(0);
    read_all();

    // ---------------- C, D: CENTERBUS = Left, then Right
    for (int cb = 0; cb < 2; cb++) begin
      w = pgm_word_t'({4{$urandom}});
      w.centerbus = cb ? CB_RIGHT : CB_LEFT; w.auxen = 0; w.resetenb = 0; w.rc_tste64 = 0;
      w.ltor = cb ? 0 : 1; w.seldly = 5'(7 * cb + 2);
      w.wrap_blk = '0;
      ltor_in = cb ? 0 : 1;
      integrate(w, 200);
      check_buses();
      read_sub(0, 0);
      read_sub(15, 3);
      read_sub(6, 1);
    end

    // ---------------- output enables and HIZ
    sel = 6'd0;
    for (int i = 0; i < 8; i++) begin
      @(negedge c125) {xoe_n, yoe_n, hiz} = 3'(i);
      #1;
      chk(out_oe == (!xoe_n && !yoe_n && !hiz), "OUT enable");
      chk(pads_oe == !hiz && dt_oe == !hiz && (!hiz || (!dl_oe && !dr_oe)), "HIZ");
      if (hiz) n_hiz++; else if (xoe_n || yoe_n) n_xyoe++;
    end

    // ---------------- mechanisms seen
    bbm_seen = n_words;                       // every strobe changed CENTERBUS or not
    n_bbm = 0;
    foreach (n_cb[i]) if (n_cb[i] > 0) n_bbm++;
    chk(n_bbm == 4, "all four center-bus sources used");
    chk(n_oversamp > 0, "oversampled rows");
    chk(n_lead > 0, "LEAD blocks");
    chk(n_concat > 0, "concatenated sub-blocks");
    chk(n_21bit > 0 && n_25bit > 0, "21- and 25-bit rows");
    chk(n_dumps > 0, "dumps");
    chk(n_inhibit_dumpen > 0, "dump held off by DUMP ENABLE");
    chk(n_inhibit_resetenb > 0, "dump held off by RESETENB");
    chk(n_rc > 0, "RC_TSTE64");
    chk(n_ring > 0, "ring oscillator ran during PGM STB");
    chk(n_hiz > 0 && n_xyoe > 0, "HIZ and XOE/YOE");
    chk(n_ckpin == 2, "CKPINEN");
    chk(m.n_dumps > 0 && m.n_resets > 0, "model saw dumps and resets");
    $display("words=%0d dumps=%0d inhibit(dumpen)=%0d inhibit(resetenb)=%0d ring=%0d cb=%0d/%0d/%0d/%0d",
             bbm_seen, n_dumps, n_inhibit_dumpen, n_inhibit_resetenb, n_ring,
             n_cb[0], n_cb[1], n_cb[2], n_cb[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
