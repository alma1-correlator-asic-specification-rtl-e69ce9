// alma1_chip -- the ALMA1 4096-lag correlator chip.
//
// Data path: the Main bus (dbl) drives the vertical axis of the 4x4
// correlator matrix through the adjustable delay line (SELDLY), the center
// bus chosen by CENTERBUS drives the horizontal axis; alma1_mode handles the
// six data buses.  BLANKING is registered at the pad and travels through
// the same delay line as the vertical data; while it is high no lag
// accumulates.  Its rising edge starts the dump/reset sequence of
// alma1_ctrl, which each row of blocks passes on when DUMP ENABLE is high or
// the row is in 21-bit mode.  After a dump, SEL/RDCLKENBL read any 64-lag
// sub-block out over OUT[15:0], lag 0 first (alma1_readout).
//
// Program word: serial in on PGM CLK/PGM DATA, chained out on PGM DATA OUT,
// applied on PGM STB (alma1_pgm).  PGM CLK and PGM STB are buffered to
// their OUT pins; PGM STB also enables the ring oscillator.
// C125OUT is the chip clock gated by the program bit CKPINEN (an AND gate,
// as in the specification, so CKPINEN should change while the clock is low).
// HIZ turns off every output enable except the ring oscillator's.
//
// Tri-state pads are value/enable pairs.  D0-X and D4-X (delay chain into
// block 0 and out of block 15), BLANKING and DUMP ENABLE have pad registers.
// rst_n is this design's addition: it clears the program word and the
// sequencer; accumulators are cleared by the first BLANKING sequence.
module alma1_chip
  import alma1_pkg::*;
#(
  parameter int unsigned DUMP_DLY = 14,
  parameter int unsigned N        = NLAGS   // lags per sub-block
) (
  input  logic        c125,
  input  logic        rst_n,
  // data buses
  input  logic [15:0] dbl,
  input  logic [15:0] dbr,
  input  logic [15:0] dl_in,
  input  logic [15:0] dr_in,
  input  logic        ltor_in,
  output logic [15:0] dtl,
  output logic [15:0] dtr,
  output logic        dt_oe,
  output logic [15:0] dl_out,
  output logic        dl_oe,
  output logic [15:0] dr_out,
  output logic        dr_oe,
  output logic        ltor_out,
  input  logic [1:0]  d0x,
  output logic [1:0]  d4x,
  // integration control
  input  logic        blanking,
  input  logic        dump_enable,
  // results readout
  input  logic [5:0]  sel,
  input  logic        rdclkenbl,
  input  logic        xoe_n,
  input  logic        yoe_n,
  output logic [15:0] out,
  output logic        out_oe,
  // program word
  input  logic        pgm_clk,
  input  logic        pgm_data,
  input  logic        pgm_stb,
  output logic        pgm_clk_out,
  output logic        pgm_data_out,
  output logic        pgm_stb_out,
  // miscellaneous
  input  logic        hiz,
  output logic        c125out,
  output logic        pads_oe,    // enable of ltor_out, d4x, c125out and PGM outputs
  output logic        ringosc
);

  pgm_word_t   pw;
  logic [15:0] main_bus, center, ybus, rd_bus;
  logic        yblank;
  logic        blank_q, dumpen_q;
  logic [1:0]  d0x_q, d4x_m;
  logic        seq_dump, seq_reset;
  logic [5:0]  sel_p;
  logic        rd_en;

  always_ff @(posedge c125) begin
    blank_q  <= blanking;
    dumpen_q <= dump_enable;
    d0x_q    <= d0x;
    d4x      <= d4x_m;
  end

  alma1_pgm u_pgm (
    .clk         (c125),
    .rst_n       (rst_n),
    .pgm_clk     (pgm_clk),
    .pgm_data    (pgm_data),
    .pgm_stb     (pgm_stb),
    .pgm_data_out(pgm_data_out),
    .pw          (pw)
  );

  alma1_mode u_mode (
    .clk      (c125),
    .rst_n    (rst_n),
    .dbl      (dbl),
    .dbr      (dbr),
    .dl_in    (dl_in),
    .dr_in    (dr_in),
    .ltor_in  (ltor_in),
    .ltor     (pw.ltor),
    .centerbus(pw.centerbus),
    .auxen    (pw.auxen),
    .hiz      (hiz),
    .main_bus (main_bus),
    .center   (center),
    .dtl      (dtl),
    .dtr      (dtr),
    .dt_oe    (dt_oe),
    .dl_out   (dl_out),
    .dl_oe    (dl_oe),
    .dr_out   (dr_out),
    .dr_oe    (dr_oe),
    .ltor_out (ltor_out)
  );

  alma1_vdelay #(.W(17), .DEPTH(SELDLY_MAX)) u_vdly (
    .clk (c125),
    .dly (pw.seldly),
    .din ({blank_q, main_bus}),
    .dout({yblank, ybus})
  );

  alma1_ctrl #(.DUMP_DLY(DUMP_DLY)) u_ctrl (
    .clk      (c125),
    .rst_n    (rst_n),
    .blank    (yblank),
    .resetenb (pw.resetenb),
    .seq_dump (seq_dump),
    .seq_reset(seq_reset)
  );

  alma1_matrix #(.N(N)) u_mat (
    .clk      (c125),
    .ybus     (ybus),
    .yblank   (yblank),
    .xbus     (center),
    .d0x      (d0x_q),
    .pw       (pw),
    .seq_dump (seq_dump),
    .seq_reset(seq_reset),
    .dump_en  (dumpen_q),
    .rd_en    (rd_en),
    .sel_p    (sel_p),
    .d4x      (d4x_m),
    .rd_bus   (rd_bus)
  );

  alma1_readout u_rd (
    .clk      (c125),
    .sel      (sel),
    .rdclkenbl(rdclkenbl),
    .xoe_n    (xoe_n),
    .yoe_n    (yoe_n),
    .hiz      (hiz),
    .rd_bus   (rd_bus),
    .sel_p    (sel_p),
    .rd_en    (rd_en),
    .out      (out),
    .out_oe   (out_oe)
  );

  alma1_ringosc u_ring (
    .en     (pgm_stb),
    .ringosc(ringosc)
  );

  assign c125out     = c125 & pw.ckpinen;
  assign pgm_clk_out = pgm_clk;
  assign pgm_stb_out = pgm_stb;
  assign pads_oe     = ~hiz;

endmodule
