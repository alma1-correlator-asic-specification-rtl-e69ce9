// alma1_readout -- pin side of the results readout.
//
// SEL[5:0] and RDCLKENBL are registered once on entry (sel_p, rd_en); the
// matrix uses them to pick the 256-lag block and sub-block and to shift the
// selected sub-block's storage one lag per enabled clock.  The 16-bit
// results bus from the matrix passes the output pad register to OUT[15:0].
// OUT is driven only when both low-true chip enables XOE\ and YOE\ are low
// and HIZ is low, so many chips can share one card-level results bus.
//
// Timing, at chip level: OUT shows the word selected by SEL three clocks
// after SEL is applied (sel_p here, the sub-block select register in the
// 256-lag block, then the OUT pad register); a RDCLKENBL pulse moves OUT to
// the next lag three clocks later.
// The specification limits RDCLKENBL to every other clock (half rate).
module alma1_readout (
  input  logic        clk,
  input  logic [5:0]  sel,
  input  logic        rdclkenbl,
  input  logic        xoe_n,
  input  logic        yoe_n,
  input  logic        hiz,
  input  logic [15:0] rd_bus,
  output logic [5:0]  sel_p,
  output logic        rd_en,
  output logic [15:0] out,
  output logic        out_oe
);

  always_ff @(posedge clk) begin
    sel_p <= sel;
    rd_en <= rdclkenbl;
    out   <= rd_bus;
  end

  assign out_oe = ~xoe_n & ~yoe_n & ~hiz;

endmodule
