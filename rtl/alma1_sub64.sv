// alma1_sub64 -- 64-lag correlator sub-block.
//
// The prompt sample p_in is registered once (the prompt pipeline register)
// and fed in parallel to all lags, together with the blanking bit, which is
// registered alongside it.  The delayed sample d_in first passes a 1/2/3
// clock delay line and then a lag generator: lag 0 sees the delay-line
// output, and each following lag sees the previous lag's sample delayed by
// one register, or by two registers when oversamp=1 (twice-Nyquist data).
// The blanking is not applied to the delay chain.
//
// Delay-line length, with s = oversamp ? 2 : 1:
//   concat=1             s        (continues the chain of the previous
//                                  sub-block: its input is the value that
//                                  went into that sub-block's lag 63)
//   concat=0, lead=0     1        (matches the prompt pipeline register)
//   concat=0, lead=1     1 + s    (extra lag step for a LEAD block)
// This is the truth table of the specification; its two-bit M0/M1 encoding
// is replaced here by the delay value itself.
//
// chain_out is the sample going into lag 63, for the next sub-block.
// Readout: store_ld (DUMP TO STORAGE') loads every lag's storage from its
// accumulator; each shift_en clock moves the storage one lag toward lag 0,
// whose value is rd_data (lag 0 first, zeros shifted in behind lag 63).
module alma1_sub64
  import alma1_pkg::*;
#(
  parameter int unsigned N = NLAGS
) (
  input  logic        clk,
  input  logic [1:0]  p_in,
  input  logic [1:0]  d_in,
  input  logic        blank_in,
  input  logic        concat,
  input  logic        lead,
  input  logic        oversamp,
  input  logic        fullacc,
  input  logic        rc_tste64,
  input  logic        acc_rst,
  input  logic        store_ld,
  input  logic        shift_en,
  output logic [1:0]  chain_out,
  output logic [15:0] rd_data
);

  logic [1:0] p_q;
  logic       blank_q;
  logic [1:0] dl1, dl2, dl3;      // input delay line
  logic [1:0] d0;
  logic [1:0] dk   [N];           // D sample seen by lag k
  logic [1:0] st_a [1:N-1];       // first lag-generator stage of lag k
  logic [1:0] st_b [1:N-1];       // second stage, used when oversampled
  logic [15:0] store [N+1];

  always_ff @(posedge clk) begin
    p_q     <= p_in;
    blank_q <= blank_in;
    dl1     <= d_in;
    dl2     <= dl1;
    dl3     <= dl2;
  end

  always_comb begin
    if (concat)    d0 = oversamp ? dl2 : dl1;
    else if (lead) d0 = oversamp ? dl3 : dl2;
    else           d0 = dl1;
  end

  assign dk[0] = d0;
  for (genvar k = 1; k < N; k++) begin : g_gen
    always_ff @(posedge clk) begin
      st_a[k] <= dk[k-1];
      st_b[k] <= st_a[k];
    end
    assign dk[k] = oversamp ? st_b[k] : st_a[k];
  end

  assign store[N] = '0;
  for (genvar k = 0; k < N; k++) begin : g_lag
    alma1_lag u_lag (
      .clk      (clk),
      .p        (p_q),
      .d        (dk[k]),
      .blank    (blank_q),
      .acc_rst  (acc_rst),
      .fullacc  (fullacc),
      .rc_tste64(rc_tste64),
      .store_ld (store_ld),
      .shift_en (shift_en),
      .shift_in (store[k+1]),
      .store    (store[k])
    );
  end

  assign chain_out = dk[N-1];
  assign rd_data   = store[0];

endmodule
