// bs_mask_ones: Mask-based One's Complement barrel shifter with zero flag.
//
// A variant of bs_mask_twos that avoids the slow two's complement. For a
// left operation the amount is simply inverted (~amt = N-1-amt, one short of
// N-amt) and two corrections restore the missing one:
//   - the rotator gets an extra leading row that rotates right by one for
//     left operations (bs_right_rotator with PRE_ROT1 = 1), and
//   - the mask F is shifted right by one for left operations
//     (bs_mask_f_gen_ones), which also makes the amount-is-zero signal of
//     the two's complement design unnecessary.
// Then P = (right ? F : ~F) | rotate, T = R&P | S&~P = result, and the zero
// flag is data ANDed with P bit-reversed, OR tree, inverter.
// There is no overflow flag in this design.
// Interface: data, amt, op in; result, zero out. Timing: purely
// combinational.
module bs_mask_ones
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
  logic           amt_zero_unused;
  logic [N-1:0]   r;
  logic [N-1:0]   f;
  logic [N-1:0]   p;
  logic           s;

  bs_amount_select #(.LGN(LGN), .ONES_COMP(1'b1)) u_amt (
    .amt      (amt),
    .left     (~op.right),
    .amt_sel  (amt_sel),
    .amt_zero (amt_zero_unused)
  );

  bs_right_rotator #(.N(N), .LGN(LGN), .PRE_ROT1(1'b1)) u_rot (
    .din  (data),
    .amt  (amt_sel),
    .rot1 (~op.right),
    .dout (r)
  );

  bs_mask_f_gen_ones #(.N(N), .LGN(LGN)) u_fgen (
    .amt  (amt_sel),
    .left (~op.right),
    .f    (f)
  );

  assign p = (op.right ? f : ~f) | {N{op.rotate}};

  bs_fill_calc u_fill (
    .sign (data[N-1]),
    .op   (op),
    .s    (s)
  );

  bs_mask_merge #(.N(N)) u_merge (
    .r (r),
    .p (p),
    .s (s),
    .t (result)
  );

  if (HAS_ZERO) begin : g_zero
    logic [N-1:0] z;
    always_comb begin
      for (int i = 0; i < N; i++) z[i] = p[N-1-i];
    end
    bs_zero_flag #(.N(N)) u_zero (
      .din   (data),
      .zmask (z),
      .zero  (zero)
    );
  end else begin : g_no_zero
    assign zero = 1'b0;
  end

endmodule
