// bs_zero_flag: zero flag unit.
//
// zero = NOT( OR over i of (din[i] AND zmask[i]) ).
// The mask Z clears the bits that are known not to reach the result, so the
// flag can be computed from data that has not yet been shifted, in parallel
// with the shifter. A design that computes the flag from the finished
// (but still reversed) result ties zmask to all ones. The OR tree is written
// as a reduction; synthesis builds it as a log2(N)-deep tree.
// Purely combinational.
module bs_zero_flag #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] din,
  input  logic [N-1:0] zmask,
  output logic         zero
);

  assign zero = ~|(din & zmask);

endmodule
