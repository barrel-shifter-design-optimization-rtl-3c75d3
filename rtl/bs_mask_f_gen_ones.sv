// bs_mask_f_gen_ones: mask F generator for the one's complement shifter.
//
// Generates F from the selected amount (bs_mask_f_gen) and, when the
// operation is left oriented, shifts it right by one with a zero fill. A
// left operation uses the one's complement ~amt = N-1-amt, which gives one
// leading zero too few; the shift adds it back, so that ~F has exactly amt
// ones at the bottom. This removes the need for an "amount is zero" signal.
// Purely combinational: the mask generator plus one mux level.
module bs_mask_f_gen_ones #(
  parameter int unsigned N   = 32,
  parameter int unsigned LGN = $clog2(N)
) (
  input  logic [LGN-1:0] amt,
  input  logic           left,
  output logic [N-1:0]   f
);

  logic [N-1:0] f_raw;

  bs_mask_f_gen #(.N(N), .LGN(LGN)) u_fgen (
    .amt (amt),
    .f   (f_raw)
  );

  assign f = left ? {1'b0, f_raw[N-1:1]} : f_raw;

endmodule
