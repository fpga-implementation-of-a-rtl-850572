// mtc_encoder: Modified Turbo Code (MTC) encoder, top level.
//
// A 16-bit frame is encoded by a recursive systematic convolutional (RSC)
// encoder with 4 tail bits, giving a 20-bit terminated systematic word d
// and a 20-bit RSC parity word r, both sent serially and collected in
// parallel. The systematic word is then interleaved into several branches,
// each protected by a zig-zag code, giving a 20-bit zig-zag parity word Z.
// The code word is C = {d, r, Z}: 60 bits per 16-bit frame.
//
// Ports:
//   data_clk, reset_n   clock and asynchronous active-low reset
//   start, frame        a start pulse while idle loads frame; bit 0 is sent first
//   sysbitout,          serial systematic and RSC parity bits, one pair per
//   paribitout          cycle, 20 cycles per frame
//   systematic_data,    parallel 20-bit words, bit i = bit sent in cycle i,
//   RSCparity           complete when framehead pulses
//   zigparity           20-bit zig-zag parity, loaded one cycle after framehead
//   codeword            {zigparity, RSCparity, systematic_data}: d in the low
//                       bits, then r, then Z
//   codeword_valid      one-cycle pulse when codeword holds a whole frame
//   busy                high while a frame is being sent
//
// Timing: start at edge t; serial bit i after edge t+1+i; framehead after
// edge t+20; zigparity and codeword_valid after edge t+21. A new start is
// accepted from edge t+21 on, so one frame takes 21 cycles back to back.
//
// From the source design: the two sub-blocks and their wiring, the port
// names, widths and the reference values the defaults reproduce. This
// design's choices: the codeword port and its bit order, codeword_valid,
// busy, and the cycle timing.
module mtc_encoder
  import mtc_pkg::*;
(
  input  logic                  data_clk,
  input  logic                  reset_n,
  input  logic                  start,
  input  logic [DATA_BITS-1:0]  frame,
  output logic                  sysbitout,
  output logic                  paribitout,
  output logic [SYS_BITS-1:0]   systematic_data,
  output logic [SYS_BITS-1:0]   RSCparity,
  output logic [ZIG_BITS-1:0]   zigparity,
  output logic [2*SYS_BITS+ZIG_BITS-1:0] codeword,
  output logic                  codeword_valid,
  output logic                  busy
);

  logic framehead;

  rsc_encoder #(
    .DATA_BITS (DATA_BITS),
    .MEM       (RSC_MEM),
    .FB_TAPS   (RSC_FB_TAPS),
    .FF_TAPS   (RSC_FF_TAPS)
  ) RSCencoder1 (
    .data_clk        (data_clk),
    .reset_n         (reset_n),
    .start           (start),
    .frame           (frame),
    .sysbitout       (sysbitout),
    .paribitout      (paribitout),
    .systematic_data (systematic_data),
    .parity_data     (RSCparity),
    .framehead       (framehead),
    .busy            (busy)
  );

  zigzag_encoder #(
    .I   (ZZ_I),
    .J   (ZZ_J),
    .M   (ZZ_M),
    .ROT (ZZ_ROT),
    .REV (ZZ_REV)
  ) ZigZagEncoder2 (
    .data_clk   (data_clk),
    .reset_n    (reset_n),
    .framehead  (framehead),
    .SYSTEMATIC (systematic_data),
    .zigparity  (zigparity)
  );

  // zigparity loads on the edge after framehead. The parallel RSC words
  // hold through that edge even if it also takes the next start, since the
  // first new bit is shifted in one edge later. So the code word is whole
  // in the cycle after framehead.
  always_ff @(posedge data_clk or negedge reset_n) begin
    if (!reset_n) codeword_valid <= 1'b0;
    else          codeword_valid <= framehead;
  end

  assign codeword = {zigparity, RSCparity, systematic_data};

  if (SYS_BITS != ZZ_I * ZZ_J) begin : g_bad_size
    $error("mtc_encoder: zig-zag array must hold the terminated frame");
  end

endmodule
