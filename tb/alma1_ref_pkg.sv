// alma1_ref_pkg -- reference model of the correlator matrix for testbenches.
//
// corr_ref works from the values at the ports of alma1_matrix, one call of
// step() per rising clock edge with the values sampled at that edge.  It
// does not copy the RTL structure: from the program word it works out, for
// every lag, which input sample (vertical or horizontal antenna, digitizer,
// or the D0-X chain input) it multiplies and with what delay, by following
// the delay chain from sub-block to sub-block and from block to block.  It
// then sums the biased products ((2a-3)(2b-3)+9)/2 on unblanked clocks,
// applies the per-row dump/reset gating (DUMP ENABLE or 21-bit mode) and
// keeps the expected storage word of every lag.
//
// Port-to-lag timing: the matrix registers its x, y and blank inputs, each
// sub-block registers the prompt and the blanking once more, so the lag
// updated at edge T uses prompt and blank sampled at the ports at T-2 and
// a delayed sample from T-1-del (x/y) or T-del (D0-X), where del is the
// chain delay at the block inputs.
package alma1_ref_pkg;
  import alma1_pkg::*;

  localparam int H = 32768;   // history depth, power of two

  function automatic int ref_prod(input logic [1:0] a, input logic [1:0] b);
    return ((2 * int'(a) - 3) * (2 * int'(b) - 3) + 9) / 2;
  endfunction

  class corr_ref;
    int          nl;                  // lags per sub-block
    pgm_word_t   pw;
    logic [1:0]  sh [17][H];          // port samples: 0..7 x (2a+m), 8..15 y, 16 d0x
    logic        bh [H];
    int          cyc;
    longint      acc   [NBLOCKS][4][];
    logic [15:0] store [NBLOCKS][4][];
    int          psrc  [NBLOCKS][4];
    int          dsrc  [NBLOCKS][4][];
    int          ddel  [NBLOCKS][4][];
    bit          dump_d [NROWS];
    int          n_dumps, n_resets;

    function new(int nlags);
      nl = nlags;
      cyc = 0;
      n_dumps = 0;
      n_resets = 0;
      for (int b = 0; b < NBLOCKS; b++)
        for (int s = 0; s < 4; s++) begin
          acc[b][s]   = new[nl];
          store[b][s] = new[nl];
          dsrc[b][s]  = new[nl];
          ddel[b][s]  = new[nl];
          for (int k = 0; k < nl; k++) begin acc[b][s][k] = 0; store[b][s][k] = 0; end
        end
      for (int r = 0; r < NROWS; r++) dump_d[r] = 0;
    endfunction

    // global source id of a 4-1 multiplexer code in block (r, c)
    static function int gsrc(int r, int c, logic [1:0] code);
      case (code)
        2'd0: return 2 * c;
        2'd1: return 2 * c + 1;
        2'd2: return 8 + 2 * r;
        default: return 8 + 2 * r + 1;
      endcase
    endfunction

    function void configure(pgm_word_t w);
      pw = w;
      for (int b = 0; b < NBLOCKS; b++) begin
        int r = b / NCOLS, c = b % NCOLS;
        int st = pw.oversamp[r] ? 2 : 1;
        bit lead = ((c < r) && pw.leadll) || ((c > r) && pw.leadur);
        for (int s = 0; s < 4; s++) begin
          bit cc = (s == 0) ? pw.wrap_blk[b] : pw.r_w[r][s-1];
          psrc[b][s] = gsrc(r, c, pw.r_m[r][4*s +: 2]);
          for (int k = 0; k < nl; k++) begin
            if (!cc) begin
              dsrc[b][s][k] = gsrc(r, c, pw.r_m[r][4*s+2 +: 2]);
              ddel[b][s][k] = (lead ? 1 + st : 1) + k * st;
            end else if (s == 0 && b == 0) begin
              dsrc[b][s][k] = 16;
              ddel[b][s][k] = st + k * st;
            end else begin
              int pb = (s == 0) ? b - 1 : b;
              int ps = (s == 0) ? 3 : s - 1;
              dsrc[b][s][k] = dsrc[pb][ps][nl-1];
              ddel[b][s][k] = ddel[pb][ps][nl-1] + st + k * st;
            end
          end
        end
      end
    endfunction

    function logic [1:0] sample(int id, int t);
      return sh[id][t % H];
    endfunction

    // one rising edge; arguments are the matrix port values at this edge
    function void step(logic [15:0] x, logic [15:0] y, logic yblank, logic [1:0] d0x,
                       logic seq_dump, logic seq_reset, logic dump_en);
      bit acc_on = (cyc >= 2) && !bh[(cyc - 2) % H];
      for (int r = 0; r < NROWS; r++) begin
        bit gate = dump_en || !pw.fullacc[r];
        bit rst  = seq_reset && gate;
        if (dump_d[r]) n_dumps++;
        if (rst) n_resets++;
        for (int c = 0; c < NCOLS; c++) begin
          int b = r * NCOLS + c;
          for (int s = 0; s < 4; s++)
            for (int k = 0; k < nl; k++) begin
              if (dump_d[r]) store[b][s][k] = stored(r, acc[b][s][k]);
              if (rst) acc[b][s][k] = 0;
              else if (acc_on) begin
                int id = dsrc[b][s][k];
                int t  = (id == 16) ? cyc - ddel[b][s][k] : cyc - 1 - ddel[b][s][k];
                acc[b][s][k] = (acc[b][s][k]
                  + 64'(ref_prod(sample(psrc[b][s], cyc - 2), sample(id, t)))) % (64'd1 << 25);
              end
            end
        end
        dump_d[r] = seq_dump && gate;
      end
      for (int i = 0; i < 8; i++) begin
        sh[i][cyc % H]     = x[2*i +: 2];
        sh[8 + i][cyc % H] = y[2*i +: 2];
      end
      sh[16][cyc % H] = d0x;
      bh[cyc % H] = yblank;
      cyc++;
    endfunction

    // the 16 counter bits a lag holds for accumulated value a
    function logic [15:0] stored(int r, longint a);
      longint cnt = pw.fullacc[r] ? (a >> 9) : ((a % (64'd1 << 21)) >> 5);
      if (pw.rc_tste64) return {2{8'(cnt)}};
      return 16'(cnt);
    endfunction

    // D sample that lag 63 of block 15 holds, i.e. the chain out, at the current edge
    function logic [1:0] chain_end();
      int id = dsrc[NBLOCKS-1][3][nl-1];
      int t  = (id == 16) ? cyc - ddel[NBLOCKS-1][3][nl-1] : cyc - 1 - ddel[NBLOCKS-1][3][nl-1];
      return sample(id, t);
    endfunction
  endclass

endpackage
