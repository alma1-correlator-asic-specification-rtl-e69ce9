// alma1_block256 -- 256-lag correlator block: four 64-lag sub-blocks and
// their input multiplexers.
//
// Inputs are the two digitizer samples of one horizontal antenna (xm[0],
// xm[1] = X-M0, X-M1) and of one vertical antenna (ym[0], ym[1]).  In front
// of sub-block k sit a 4-1 prompt multiplexer (select r_m[4k+1:4k]) and a
// 5-1 delayed-input multiplexer: a 4-1 source select (r_m[4k+3:4k+2]) plus
// the CONCAT bit, which picks the delay chain of the previous sub-block
// instead (for sub-block 0 that is the previous 256-lag block, chain_in).
// CONCAT of sub-block 0 is the block's own WRAP-BLK bit, of sub-blocks 1..3
// the row bits r_w[0..2].  Source codes: see alma1_pkg::src_sel_e.
// Configured this way the block is one 256-lag, two 128-lag or four 64-lag
// correlators.
//
// LEAD-BLK is common to the four sub-blocks.  The block at (ROW, COL) is a
// LEAD block when it lies below the matrix diagonal (COL < ROW) and leadll
// is set, or above it (COL > ROW) and leadur is set; diagonal blocks are
// never LEAD blocks.  (This reading of the LEADLL/LEADUR rule is this
// design's own.)
//
// The sequenced dump and reset pulses are passed on when dump_en (DUMP
// ENABLE pin) is high or the row is in 21-bit mode (fullacc=0).  DUMP TO
// STORAGE' is the gated dump delayed one clock; it loads the storage.
// The reset pulse comes two clocks after the dump, after the load.
//
// Readout: sub-block s shifts when rd_en and sel_p == {BLK, s}.  sel_p[1:0]
// passes one more pipeline register (SELP) before the 4-1 output
// multiplexer; block_sel (sel_p[5:2] == BLK) has none, so the external
// controller leaves one idle clock after switching blocks.
module alma1_block256
  import alma1_pkg::*;
#(
  parameter int unsigned ROW = 0,
  parameter int unsigned COL = 0,
  parameter int unsigned N   = NLAGS
) (
  input  logic        clk,
  input  logic [1:0]  xm [2],
  input  logic [1:0]  ym [2],
  input  logic [1:0]  chain_in,
  input  logic        blank,
  input  logic [15:0] r_m,
  input  logic [2:0]  r_w,
  input  logic        wrap,
  input  logic        leadll,
  input  logic        leadur,
  input  logic        oversamp,
  input  logic        fullacc,
  input  logic        rc_tste64,
  input  logic        seq_dump,
  input  logic        seq_reset,
  input  logic        dump_en,
  input  logic        rd_en,
  input  logic [5:0]  sel_p,
  output logic [1:0]  chain_out,
  output logic [15:0] rd_data,
  output logic        block_sel
);

  localparam logic [3:0] BLK = 4'(ROW * NCOLS + COL);

  logic        lead_blk;
  logic        dump_g, rst_g, dump_p;
  logic [1:0]  selp_q;
  logic [1:0]  src  [4];
  logic [1:0]  chn  [5];
  logic [15:0] rd   [4];
  logic [3:0]  concat;

  assign lead_blk = ((COL < ROW) && leadll) || ((COL > ROW) && leadur);
  assign concat   = {r_w, wrap};

  assign src[SRC_XM0] = xm[0];
  assign src[SRC_XM1] = xm[1];
  assign src[SRC_YM0] = ym[0];
  assign src[SRC_YM1] = ym[1];

  assign dump_g = seq_dump  & (dump_en | ~fullacc);
  assign rst_g  = seq_reset & (dump_en | ~fullacc);

  always_ff @(posedge clk) begin
    dump_p <= dump_g;
    selp_q <= sel_p[1:0];
  end

  assign chn[0] = chain_in;
  for (genvar s = 0; s < 4; s++) begin : g_sub
    logic [1:0] p_mux, d_mux;
    assign p_mux = src[r_m[4*s +: 2]];
    assign d_mux = concat[s] ? chn[s] : src[r_m[4*s+2 +: 2]];
    alma1_sub64 #(.N(N)) u_sub (
      .clk      (clk),
      .p_in     (p_mux),
      .d_in     (d_mux),
      .blank_in (blank),
      .concat   (concat[s]),
      .lead     (lead_blk),
      .oversamp (oversamp),
      .fullacc  (fullacc),
      .rc_tste64(rc_tste64),
      .acc_rst  (rst_g),
      .store_ld (dump_p),
      .shift_en (rd_en && (sel_p == {BLK, 2'(s)})),
      .chain_out(chn[s+1]),
      .rd_data  (rd[s])
    );
  end

  assign chain_out = chn[4];
  assign rd_data   = rd[selp_q];
  assign block_sel = (sel_p[5:2] == BLK);

endmodule
