// bs_overflow_mask: overflow flag computed with the mask F.
//
// Only the amt bits just below the sign bit can pass onto or beyond the sign
// position in a left shift by amt. The unit
//   1. XORs the N-1 low-order data bits with the sign bit (which bits would
//      change the sign if they reached it),
//   2. ANDs that with the inverse of F's N-1 high-order bits, ~F[N-1:1]
//      (amt ones, left justified, aligned with data[N-2:0]),
//   3. ORs the result and ANDs it with "operation is a left shift".
// It works on the original data in parallel with the shift. F's lowest bit
// (always 1) is not needed and is left unused.
// Purely combinational.
module bs_overflow_mask #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] data,
  input  logic [N-1:0] f,
  input  logic         left_shift,
  output logic         ovf
);

  logic [N-2:0] diff;
  logic [N-2:0] hit;

  assign diff = data[N-2:0] ^ {(N-1){data[N-1]}};
  assign hit  = diff & ~f[N-1:1];
  assign ovf  = left_shift & (|hit);

endmodule
