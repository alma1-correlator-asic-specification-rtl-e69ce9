// alma1_mode -- chip data-bus structure ("mode logic").
//
// Six 16-bit buses meet in the chip: the Main and Aux buses enter at the
// bottom (dbl, dbr) and leave at the top (dtl, dtr); the left and right
// buses (dl, dr) are bidirectional.  All inputs and outputs pass a pad
// register, so a bus passing through the chip is delayed two clocks.
//
//   dtl  = Main bus, always driven.
//   dtr  = Aux bus when AUXEN=1, else zeros (saves power).
//   main = registered Main bus, the vertical-axis drive of the matrix.
//   center bus = one of Left, Main, Aux, Right (CENTERBUS code 0..3); it is
//          the horizontal-axis drive of the matrix and the data sent out on
//          dl and dr.
//   dl is an output when LTOR-IN is 0, dr when LTOR is 1; LTOR is copied to
//          LTOR-OUT, so neighbouring chips never drive the same wires.
//   hiz  turns every output enable off.
//
// The CENTERBUS decoder is break-before-make: its one-hot enables are
// registered, and when the code changes they are all zero for one clock
// before the new source is enabled (the center bus then carries zeros).
// Tri-state pads are modelled as a value plus an output enable.
module alma1_mode
  import alma1_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] dbl,        // Main bus in
  input  logic [15:0] dbr,        // Aux bus in
  input  logic [15:0] dl_in,
  input  logic [15:0] dr_in,
  input  logic        ltor_in,
  input  logic        ltor,
  input  logic [1:0]  centerbus,
  input  logic        auxen,
  input  logic        hiz,
  output logic [15:0] main_bus,   // registered Main bus (vertical axis)
  output logic [15:0] center,     // center bus (horizontal axis)
  output logic [15:0] dtl,
  output logic [15:0] dtr,
  output logic        dt_oe,
  output logic [15:0] dl_out,
  output logic        dl_oe,
  output logic [15:0] dr_out,
  output logic        dr_oe,
  output logic        ltor_out
);

  logic [15:0] dbl_q, dbr_q, dl_q, dr_q;
  logic [1:0]  cb_q;
  logic [3:0]  cb_en;

  always_ff @(posedge clk) begin
    dbl_q <= dbl;
    dbr_q <= dbr;
    dl_q  <= dl_in;
    dr_q  <= dr_in;
  end

  // break-before-make decoder
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cb_q  <= '0;
      cb_en <= '0;
    end else begin
      cb_q <= centerbus;
      if (centerbus != cb_q) cb_en <= '0;
      else                   cb_en <= 4'b0001 << centerbus;
    end
  end

  always_comb begin
    center = '0;
    if (cb_en[CB_LEFT])  center |= dl_q;
    if (cb_en[CB_MAIN])  center |= dbl_q;
    if (cb_en[CB_AUX])   center |= dbr_q;
    if (cb_en[CB_RIGHT]) center |= dr_q;
  end

  always_ff @(posedge clk) begin
    dtl    <= dbl_q;
    dtr    <= auxen ? dbr_q : '0;
    dl_out <= center;
    dr_out <= center;
  end

  assign main_bus = dbl_q;
  assign dt_oe    = ~hiz;
  assign dl_oe    = ~ltor_in & ~hiz;
  assign dr_oe    = ltor & ~hiz;
  assign ltor_out = ltor;

endmodule
