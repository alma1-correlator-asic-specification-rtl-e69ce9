// alma1_lag -- one correlator lag: biased multiplier, 25-bit accumulator and
// 16-bit secondary storage that doubles as one stage of the readout shift
// register.
//
// Every clock that blank is low, the biased product of the prompt sample p
// and the delayed sample d (0..9, see alma1_pkg::bprod) is added into a
// 5-bit synchronous stage.  Its carry (the 5-bit MSB falling from 1 to 0)
// advances the upper stages:
//   fullacc=1: 4-bit prescaler, whose carry advances the 16-bit counter
//              (25-bit accumulator);
//   fullacc=0: the prescaler is bypassed and held, the 5-bit carry advances
//              the 16-bit counter directly (21-bit accumulator).
// With rc_tste64=1 both bytes of the 16-bit counter advance on the same
// carry (fast production test); the low byte still counts normally.
// The upper stages are ripple counters in the specification; here they are
// synchronous counters with the same count sequence.
//
// acc_rst clears all 25 bits (in the specification an asynchronous clear;
// here synchronous, it wins over accumulation).  store_ld loads the 16
// counter bits (the 16 MSBs of the active accumulator) into the storage
// register; otherwise shift_en loads shift_in, the storage of the next
// higher lag, so a sub-block's 64 registers shift broadside toward lag 0.
module alma1_lag
  import alma1_pkg::*;
(
  input  logic        clk,
  input  logic [1:0]  p,          // prompt sample (registered in the sub-block)
  input  logic [1:0]  d,          // delayed sample from the lag generator
  input  logic        blank,      // 1: no accumulation this clock
  input  logic        acc_rst,    // ACCUMULATOR RESET
  input  logic        fullacc,    // 1: 25-bit, 0: 21-bit
  input  logic        rc_tste64,  // counter test mode
  input  logic        store_ld,   // DUMP TO STORAGE' : load storage
  input  logic        shift_en,   // readout shift enable
  input  logic [15:0] shift_in,   // storage of the next lag
  output logic [15:0] store       // secondary storage / readout stage
);

  logic [4:0]  acc5;
  logic [3:0]  pre;
  logic [15:0] cnt;

  logic [5:0]  sum6;
  logic        c5;       // carry of the 5-bit stage
  logic        cpre;     // carry into the 16-bit counter
  logic        clo;      // low byte wraps

  always_comb begin
    sum6 = {1'b0, acc5} + {2'b00, bprod(p, d)};
    c5   = sum6[5] & ~blank;
    cpre = fullacc ? (c5 & (pre == 4'hF)) : c5;
    clo  = cpre & (cnt[7:0] == 8'hFF);
  end

  always_ff @(posedge clk) begin
    if (acc_rst) begin
      acc5 <= '0;
      pre  <= '0;
      cnt  <= '0;
    end else begin
      if (!blank)          acc5 <= sum6[4:0];
      if (fullacc && c5)   pre  <= pre + 4'd1;
      if (cpre)            cnt[7:0] <= cnt[7:0] + 8'd1;
      if (rc_tste64 ? cpre : clo) cnt[15:8] <= cnt[15:8] + 8'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (store_ld)      store <= cnt;
    else if (shift_en) store <= shift_in;
  end

endmodule
