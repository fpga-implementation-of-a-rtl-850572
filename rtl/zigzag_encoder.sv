// zigzag_encoder: concatenated zig-zag parity generator (the
// "ZigZagEncoder" block).
//
// The terminated systematic word of SYS_BITS = I*J bits goes to M parallel
// branches. Branch m permutes it with its interleaver, reads the result as
// an I x J array and computes I zig-zag parity bits (zz_encoder). The M
// parity vectors are concatenated, branch 0 in the lowest I bits, to form
// the M*I-bit zig-zag parity word.
//
// Interleaver of branch m: output position i takes input position
// (ROT[m] + i) mod SYS_BITS, or (ROT[m] + SYS_BITS-1-i) mod SYS_BITS when
// REV[m] is set. These are fixed wirings and cost no logic.
//
// Timing: the parity word is registered. On a data_clk edge at which
// framehead is high, zigparity loads the parity of SYSTEMATIC; otherwise it
// holds. Reset (asynchronous, active low) clears it.
//
// From the source design: the parallel interleave / vector-to-matrix /
// zig-zag structure, the port names and the 20-bit widths. This design's
// choices: I = 4, J = 5, M = 5, the rotate/reverse interleavers with the
// default tables in mtc_pkg (chosen so that the published reference frame
// gives the published parity word), the branch order in the output word
// and loading on framehead.
module zigzag_encoder #(
  parameter int unsigned I   = mtc_pkg::ZZ_I,
  parameter int unsigned J   = mtc_pkg::ZZ_J,
  parameter int unsigned M   = mtc_pkg::ZZ_M,
  parameter mtc_pkg::rot_table_t ROT = mtc_pkg::ZZ_ROT,
  parameter mtc_pkg::rev_table_t REV = mtc_pkg::ZZ_REV,
  localparam int unsigned N  = I * J
) (
  input  logic           data_clk,
  input  logic           reset_n,
  input  logic           framehead,
  input  logic [N-1:0]   SYSTEMATIC,
  output logic [M*I-1:0] zigparity
);

  logic [M*I-1:0] parity_next;

  for (genvar m = 0; m < int'(M); m++) begin : g_branch
    logic [N-1:0] interleaved;

    for (genvar i = 0; i < int'(N); i++) begin : g_pi
      localparam int unsigned SRC =
        REV[m] ? (ROT[m] + N - 1 - i) % N : (ROT[m] + i) % N;
      assign interleaved[i] = SYSTEMATIC[SRC];
    end

    zz_encoder #(.I(I), .J(J)) u_zze (
      .data   (interleaved),
      .parity (parity_next[m*I +: I])
    );
  end

  always_ff @(posedge data_clk or negedge reset_n) begin
    if (!reset_n)       zigparity <= '0;
    else if (framehead) zigparity <= parity_next;
  end

  if (M > mtc_pkg::MAX_BRANCHES) begin : g_bad_m
    $error("zigzag_encoder: M exceeds the interleaver table size");
  end

endmodule
