// bs_mask_merge: applies the mask P to the rotate result.
//
// T = (R AND P) OR (S AND NOT P), bit by bit. Where P is 1 the rotated bit is
// kept; where P is 0 the position was vacated by a shift and receives the fill
// bit S (0, or the sign bit for an arithmetic right shift). For a rotate P is
// all ones and R passes unchanged. Purely combinational; two gate levels.
module bs_mask_merge #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] r,
  input  logic [N-1:0] p,
  input  logic         s,
  output logic [N-1:0] t
);

  assign t = (r & p) | ({N{s}} & ~p);

endmodule
