// bs_mask_twos: Mask-based Two's Complement barrel shifter with zero flag.
//
// Instead of reversing the data for left operations, this design changes
// the amount: a left rotate by amt equals a right rotate by N - amt, the two's
// complement of amt. bs_amount_select computes that with a ripple chain of
// half adders and picks it for left operations; bs_mask_twos_core then
// rotates and masks (see there). No data reversal rows are needed, at the
// price of the carry chain sitting on the critical path. There is no
// overflow flag in this design.
// Interface: data, amt, op in; result, zero out. Timing: purely
// combinational.
module bs_mask_twos
  import bs_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned LGN      = $clog2(N),
  parameter bit          HAS_ZERO = 1'b1
) (
  input  logic [N-1:0]   data,
  input  logic [LGN-1:0] amt,
  input  op_t            op,
  output logic [N-1:0]   result,
  output logic           zero
);

  logic [LGN-1:0] amt_sel;
  logic           amt_zero;

  bs_amount_select #(.LGN(LGN), .ONES_COMP(1'b0)) u_amt (
    .amt      (amt),
    .left     (~op.right),
    .amt_sel  (amt_sel),
    .amt_zero (amt_zero)
  );

  bs_mask_twos_core #(.N(N), .LGN(LGN), .HAS_ZERO(HAS_ZERO)) u_core (
    .data     (data),
    .amt_sel  (amt_sel),
    .amt_zero (amt_zero),
    .op       (op),
    .result   (result),
    .zero     (zero)
  );

endmodule
