// alma1_matrix -- the 4-by-4 matrix of 256-lag blocks and the results bus.
//
// The vertical bus (after the adjustable delay line) and the horizontal
// (center) bus each carry 4 antennas x 2 digitizers x 2 bits; antenna a,
// digitizer m sits at bits [4a+2m+1 : 4a+2m] (this bit order is this
// design's choice).  Both buses, and the delayed blanking that travels with
// the vertical data, pass one pipeline register before the matrix.  Block
// (row r, column c) correlates vertical antenna r with horizontal antenna
// c; its index is 4r+c.  Row r takes its mode bits (Rx-M, Rx-W, FULLACCx,
// OVERSAMPx) from the program word, each block its own WRAP-BLK bit.
//
// The delay chain runs through the blocks in index order: block 0 takes
// d0x (the D0-X input) and block 15's chain leaves as d4x (to D4-X).
//
// Results: the block whose index equals sel_p[5:2] drives rd_bus; the
// sixteen tri-stated block outputs of the chip are modelled as an AND-OR
// multiplexer with at most one enabled source.
module alma1_matrix
  import alma1_pkg::*;
#(
  parameter int unsigned N = NLAGS
) (
  input  logic        clk,
  input  logic [15:0] ybus,
  input  logic        yblank,
  input  logic [15:0] xbus,
  input  logic [1:0]  d0x,
  input  pgm_word_t   pw,
  input  logic        seq_dump,
  input  logic        seq_reset,
  input  logic        dump_en,
  input  logic        rd_en,
  input  logic [5:0]  sel_p,
  output logic [1:0]  d4x,
  output logic [15:0] rd_bus
);

  logic [15:0] y_q, x_q;
  logic        blank_q;
  logic [1:0]  chain  [NBLOCKS+1];
  logic [15:0] blk_rd [NBLOCKS];
  logic [NBLOCKS-1:0] blk_sel;

  always_ff @(posedge clk) begin
    y_q     <= ybus;
    x_q     <= xbus;
    blank_q <= yblank;
  end

  assign chain[0] = d0x;

  for (genvar r = 0; r < NROWS; r++) begin : g_row
    for (genvar c = 0; c < NCOLS; c++) begin : g_col
      localparam int unsigned B = r * NCOLS + c;
      logic [1:0] xm [2];
      logic [1:0] ym [2];
      assign xm[0] = x_q[4*c   +: 2];
      assign xm[1] = x_q[4*c+2 +: 2];
      assign ym[0] = y_q[4*r   +: 2];
      assign ym[1] = y_q[4*r+2 +: 2];
      alma1_block256 #(.ROW(r), .COL(c), .N(N)) u_blk (
        .clk      (clk),
        .xm       (xm),
        .ym       (ym),
        .chain_in (chain[B]),
        .blank    (blank_q),
        .r_m      (pw.r_m[r]),
        .r_w      (pw.r_w[r]),
        .wrap     (pw.wrap_blk[B]),
        .leadll   (pw.leadll),
        .leadur   (pw.leadur),
        .oversamp (pw.oversamp[r]),
        .fullacc  (pw.fullacc[r]),
        .rc_tste64(pw.rc_tste64),
        .seq_dump (seq_dump),
        .seq_reset(seq_reset),
        .dump_en  (dump_en),
        .rd_en    (rd_en),
        .sel_p    (sel_p),
        .chain_out(chain[B+1]),
        .rd_data  (blk_rd[B]),
        .block_sel(blk_sel[B])
      );
    end
  end

  assign d4x = chain[NBLOCKS];

  always_comb begin
    rd_bus = '0;
    for (int b = 0; b < NBLOCKS; b++)
      rd_bus |= blk_rd[b] & {16{blk_sel[b]}};
  end

endmodule
