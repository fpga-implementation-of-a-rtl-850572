// zz_encoder: one constituent zig-zag encoder (a "ZZE"), together with the
// vector-to-matrix step ("V2M") that feeds it.
//
// The I*J input bits are read as an I x J array, row r holding bits
// r*J .. r*J+J-1 (the vector is cut into consecutive rows). Parity bit r is
// the XOR of the previous parity bit and the J bits of row r, with the
// parity before row 0 taken as 0:
//     p[0] = d[0][0] ^ ... ^ d[0][J-1]
//     p[r] = p[r-1] ^ d[r][0] ^ ... ^ d[r][J-1]
// so p[r] is the running parity of rows 0..r, the zig-zag path of the code
// graph. With I = 3, J = 2 the data 0,1,1,0,0,1 gives parity 1,0,1.
//
// Purely combinational: parity follows data within the cycle. The array
// layout and the recursion follow the source design; the bit numbering of
// the ports (row r at bit r) is this design's choice.
module zz_encoder #(
  parameter int unsigned I = 4,   // rows, = parity bits
  parameter int unsigned J = 5    // information bits per row
) (
  input  logic [I*J-1:0] data,
  output logic [I-1:0]   parity
);

  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int r = 0; r < int'(I); r++) begin
      acc       = acc ^ (^data[r*J +: J]);
      parity[r] = acc;
    end
  end

endmodule
