// bs_fill_calc: the S calculation, i.e. the fill bit for shifts.
//
// S is the value shifted into the vacated end of the word. It is 0 for
// logical shifts and equals the data's sign bit for an arithmetic right
// shift, so it is 1 only for an arithmetic right shift of a negative number.
// The design writes this as S = arithmetic * data[n-1]; this implementation
// also gates it with right and shift so that the unsupported left-arithmetic
// code acts as a logical left shift (rotates never use S).
// Purely combinational; one AND gate.
module bs_fill_calc
  import bs_pkg::*;
(
  input  logic sign,
  input  op_t  op,
  output logic s
);

  assign s = sign & op.arith & op.right & ~op.rotate;

endmodule
