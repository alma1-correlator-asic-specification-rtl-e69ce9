// alma1_ctrl -- dump/reset sequencer of the control logic.
//
// On the rising edge of the (delayed) BLANKING this block starts a counter
// and issues two single-clock pulses: SEQ DUMP TO STORAGE DUMP_DLY clocks
// after the edge, then SEQ ACCUMULATOR RESET two clocks later, after the
// storage registers have been loaded.  The wait stands for the settling
// time of the ripple counters in the accumulators; its length is this
// design's choice (the specification only requires at least 17 clocks from
// the BLANKING pin to the reset, which DUMP_DLY=14 plus the pin, delay-line
// and matrix registers meets).  Both pulses are suppressed while the
// program-word bit resetenb is 1.  A new rising edge restarts the sequence.
// The per-row gating with DUMP ENABLE and FULLACCx is in alma1_block256.
module alma1_ctrl #(
  parameter int unsigned DUMP_DLY = 14
) (
  input  logic clk,
  input  logic rst_n,
  input  logic blank,
  input  logic resetenb,
  output logic seq_dump,
  output logic seq_reset
);

  localparam int unsigned CW = $clog2(DUMP_DLY + 3);

  logic          blank_d;
  logic          active;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blank_d <= 1'b0;
      active  <= 1'b0;
      cnt     <= '0;
    end else begin
      blank_d <= blank;
      if (blank && !blank_d) begin
        active <= 1'b1;
        cnt    <= CW'(1);
      end else if (active) begin
        cnt <= cnt + CW'(1);
        if (cnt == CW'(DUMP_DLY + 2)) active <= 1'b0;
      end
    end
  end

  assign seq_dump  = active && !resetenb && (cnt == CW'(DUMP_DLY));
  assign seq_reset = active && !resetenb && (cnt == CW'(DUMP_DLY + 2));

endmodule
