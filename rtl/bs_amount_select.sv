// bs_amount_select: amount preparation for the amount-manipulating shifters.
//
// A right-only rotator can do a left rotate by amt if it rotates right by
// N - amt instead. This unit returns
//   amt_sel = left ? comp(amt) : amt
// where comp is the two's complement (ONES_COMP = 0, ripple unit
// bs_twos_complement) or the one's complement, a plain inversion that is one
// too small and is corrected elsewhere (ONES_COMP = 1).
// amt_zero = (amt == 0), an OR tree and an inverter; the two's complement
// shifter needs it because the two's complement of 0 is 0. The one's
// complement shifter does not use it.
// Purely combinational.
module bs_amount_select #(
  parameter int unsigned LGN       = 5,
  parameter bit          ONES_COMP = 1'b0
) (
  input  logic [LGN-1:0] amt,
  input  logic           left,
  output logic [LGN-1:0] amt_sel,
  output logic           amt_zero
);

  logic [LGN-1:0] comp;

  if (ONES_COMP) begin : g_ones
    assign comp = ~amt;
  end else begin : g_twos
    bs_twos_complement #(.LGN(LGN)) u_twos (
      .a (amt),
      .y (comp)
    );
  end

  assign amt_sel  = left ? comp : amt;
  assign amt_zero = ~|amt;

endmodule
