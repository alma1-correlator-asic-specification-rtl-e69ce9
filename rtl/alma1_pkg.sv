// alma1_pkg -- shared types and constants of the ALMA1 correlator chip.
//
// The chip is a 4-by-4 matrix of 256-lag correlator blocks, each made of
// four 64-lag sub-blocks (4096 lags in all).  Every lag multiplies two 2-bit,
// 4-level samples with a biased table and integrates into a 25-bit
// accumulator whose 16 most significant bits are dumped to a secondary
// storage register and read out over a 16-bit bus.
//
// pgm_word_t is the serial program word.  Bit 0 of the packed struct (the
// last field, AUXEN) is the first bit shifted in.  The field names follow
// the specification; the bit positions are this design's own choice (the
// specification keeps the program-word list in a separate table).
//
// bprod() is the biased multiplication table.  The specification only says
// the table is biased (all entries positive) with a maximum of 9.  This
// design takes the 4-level sample codes 00,01,10,11 as the levels
// -3,-1,+1,+3 and uses (a*b + 9)/2, giving entries 0,3,4,5,6,9.
package alma1_pkg;

  localparam int unsigned NROWS      = 4;   // rows of 256-lag blocks
  localparam int unsigned NCOLS      = 4;   // columns of 256-lag blocks
  localparam int unsigned NBLOCKS    = NROWS * NCOLS;
  localparam int unsigned NLAGS      = 64;  // lags per sub-block
  localparam int unsigned SELDLY_MAX = 31;  // vertical delay line, clocks

  // Source codes of the 4-1 input multiplexers in front of every sub-block.
  typedef enum logic [1:0] {
    SRC_XM0 = 2'd0,
    SRC_XM1 = 2'd1,
    SRC_YM0 = 2'd2,
    SRC_YM1 = 2'd3
  } src_sel_e;

  // CENTERBUS codes: the source that drives the center (horizontal) bus.
  typedef enum logic [1:0] {
    CB_LEFT  = 2'd0,
    CB_MAIN  = 2'd1,
    CB_AUX   = 2'd2,
    CB_RIGHT = 2'd3
  } centerbus_e;

  typedef struct packed {
    logic [3:0][15:0] r_m;        // Rx-M: per row, sub-block k uses [4k+1:4k] prompt, [4k+3:4k+2] delayed
    logic [3:0][2:0]  r_w;        // Rx-W: per row, CONCAT of sub-blocks 1..3
    logic [15:0]      wrap_blk;   // WRAP-BLK: CONCAT of sub-block 0 of each 256-lag block
    logic [3:0]       fullacc;    // FULLACCx per row: 1 = 25-bit, 0 = 21-bit accumulation
    logic [3:0]       oversamp;   // OVERSAMPx per row: 2 lag-generator stages per lag
    logic             leadll;     // lower-left blocks are LEAD blocks
    logic             leadur;     // upper-right blocks are LEAD blocks
    logic [4:0]       seldly;     // vertical delay, 0..31 clocks
    logic             rc_tste64;  // test: both counter bytes count in parallel
    logic             resetenb;   // 1 = blanking causes no dump and no reset
    logic             ckpinen;    // enables the C125OUT clock output
    logic             ltor;       // drive the right I/O bus, copied to LTOR-OUT
    logic [1:0]       centerbus;  // center bus source, see centerbus_e
    logic             auxen;      // pass the Aux bus out of the top of the chip
  } pgm_word_t;

  localparam int unsigned PGM_BITS = $bits(pgm_word_t);

  function automatic logic [3:0] bprod(input logic [1:0] a, input logic [1:0] b);
    // Biased 4-level product: level(c) = 2c-3, result = (la*lb + 9) / 2.
    unique case ({a, b})
      4'b00_00, 4'b11_11: bprod = 4'd9;   // (+-3)(+-3) = +9
      4'b00_01, 4'b01_00,
      4'b11_10, 4'b10_11: bprod = 4'd6;   // +3
      4'b01_01, 4'b10_10: bprod = 4'd5;   // +1
      4'b01_10, 4'b10_01: bprod = 4'd4;   // -1
      4'b00_10, 4'b10_00,
      4'b11_01, 4'b01_11: bprod = 4'd3;   // -3
      default:            bprod = 4'd0;   // (+3)(-3) = -9
    endcase
  endfunction

endpackage
