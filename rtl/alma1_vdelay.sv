// alma1_vdelay -- adjustable delay line of the vertical matrix input.
//
// Delays a W-bit bus by 0 to DEPTH clocks, selected by dly (SELDLY[4:0] of
// the program word).  dly=0 passes the input straight through; dly=n takes
// the output of the n-th register of a DEPTH-stage shift register.  In the
// chip it carries the 16 vertical data bits and the BLANKING bit, so the
// blanking stays aligned with the delayed data; it compensates the chip's
// position in the card-level chip matrix.
module alma1_vdelay #(
  parameter int unsigned W     = 17,
  parameter int unsigned DEPTH = 31
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH+1)-1:0] dly,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout
);

  logic [W-1:0] sr [DEPTH+1];

  assign sr[0] = din;
  for (genvar i = 1; i <= DEPTH; i++) begin : g_stage
    always_ff @(posedge clk) sr[i] <= sr[i-1];
  end

  assign dout = (int'(dly) <= DEPTH) ? sr[dly] : sr[DEPTH];

endmodule
