// mtc_ref_pkg: bit-level reference model of the MTC encoder, used by the
// testbenches to work out expected values independently of the RTL.
//
// RSC: with register input w[n] = u[n] ^ (XOR of w[n-k] for each feedback
// tap k), parity c[n] = XOR of w[n-k] for each feed-forward tap k (k = 0 is
// w[n] itself). Tail bits are the inputs that make w[n] = 0. Zig-zag: the
// running XOR of the rows of each interleaved copy.
package mtc_ref_pkg;

  localparam int MAXN = 64;
  typedef bit bits_t [MAXN];

  // Terminated RSC encoding of the n-bit frame (frame bit 0 first).
  function automatic void rsc_ref(input bit [63:0] frame, input int n, input int mem,
                                  input bit [15:0] fb, input bit [15:0] ff,
                                  output bits_t sys, output bits_t par);
    bit w [MAXN + 16];          // w[t + 16] = register input at time t
    for (int t = 0; t < MAXN + 16; t++) w[t] = 0;
    for (int t = 0; t < n + mem; t++) begin
      bit f, u, c;
      f = 0;
      for (int k = 1; k <= mem; k++) if (fb[k]) f ^= w[t + 16 - k];
      u = (t < n) ? frame[t] : f;
      w[t + 16] = u ^ f;
      c = 0;
      for (int k = 0; k <= mem; k++) if (ff[k]) c ^= w[t + 16 - k];
      sys[t] = u;
      par[t] = c;
    end
  endfunction

  // Zig-zag parity word of the m-branch encoder over word d of ni*nj bits.
  function automatic bit [63:0] zig_ref(input bit [63:0] d, input int ni, input int nj,
                                        input int nm, input int rot [16], input bit rev [16]);
    bit [63:0] z;
    int nn;
    nn = ni * nj;
    z = '0;
    for (int m = 0; m < nm; m++) begin
      bit acc;
      acc = 0;
      for (int r = 0; r < ni; r++) begin
        for (int c = 0; c < nj; c++) begin
          int pos, src;
          pos = r * nj + c;
          src = rev[m] ? (rot[m] + nn - 1 - pos) % nn : (rot[m] + pos) % nn;
          acc ^= d[src];
        end
        z[m * ni + r] = acc;
      end
    end
    return z;
  endfunction

endpackage
