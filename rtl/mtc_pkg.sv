// mtc_pkg: sizes and code constants shared by the Modified Turbo Code (MTC)
// encoder blocks.
//
// The encoder takes a 16-bit frame, passes it through a recursive
// systematic convolutional (RSC) encoder with trellis termination, and
// computes zig-zag parity over several interleaved copies of the
// terminated systematic word. The frame length (16), the terminated word
// length (20) and the zig-zag parity word length (20) are the published
// ones. The RSC memory (4) and its two tap masks are the ones that
// reproduce the published systematic and parity words of the reference
// frame bit for bit. The split of the zig-zag parity into 5 constituent
// encoders of 4 rows by 5 columns, and the interleaver tables below, are
// this design's own choice: the interleaver permutations are not
// published, so these were chosen to reproduce the published zig-zag
// parity word of the reference frame.
//
// Tap masks: bit k of a mask selects the RSC state bit delayed by k
// cycles (k = 1..MEM); bit 0 of the feed-forward mask selects the
// register input (the input XOR the feedback).
package mtc_pkg;

  // Frame and RSC.
  localparam int unsigned DATA_BITS = 16;        // information bits per frame
  localparam int unsigned RSC_MEM   = 4;         // delay elements, = tail bits
  localparam int unsigned SYS_BITS  = DATA_BITS + RSC_MEM;  // 20
  // Feedback 1 + D^3 + D^4, feed-forward 1 + D + D^3 + D^4.
  localparam logic [RSC_MEM:0] RSC_FB_TAPS = 5'b11000;
  localparam logic [RSC_MEM:0] RSC_FF_TAPS = 5'b11011;

  // Zig-zag code: ZZ_M constituent encoders, each over a ZZ_I x ZZ_J array.
  localparam int unsigned ZZ_I = 4;   // rows = parity bits per constituent
  localparam int unsigned ZZ_J = 5;   // columns = information bits per parity bit
  localparam int unsigned ZZ_M = 5;   // constituent zig-zag encoders
  localparam int unsigned ZIG_BITS = ZZ_I * ZZ_M;  // 20

  // Interleaver of branch m: output position i reads input position
  //   ROT[m] + i          (mod SYS_BITS)  when REV[m] = 0
  //   ROT[m] + SYS_BITS-1-i (mod SYS_BITS) when REV[m] = 1
  // Index m of each table is branch m (branch 0 gives zigparity[3:0]).
  localparam int unsigned MAX_BRANCHES = 16;
  typedef int unsigned rot_table_t [MAX_BRANCHES];
  typedef bit          rev_table_t [MAX_BRANCHES];
  localparam rot_table_t ZZ_ROT = '{0, 8, 0, 4, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam rev_table_t ZZ_REV = '{0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

endpackage
