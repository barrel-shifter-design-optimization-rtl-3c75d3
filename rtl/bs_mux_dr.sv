// bs_mux_dr: Mux-based Data Reversal barrel shifter.
//
// Performs rotate right/left, shift right/left logical and shift right
// arithmetic of an N-bit word by 0..N-1 places, with zero and overflow flags.
// This is the cost-minimising reference design: only one, right-oriented,
// shifter is built.
//
//   data -> [mux data reversal] -> [right shifter/rotator] -> [mux data reversal] -> result
//                                        |  (pad per row, fill bit S)
//                                        +-> overflow levels -> ovf
//
// For a left-oriented operation the first reversal flips the bit order, the
// right shifter/rotator does the work and the second reversal flips it back.
// The fill bit S (bs_fill_calc) is the sign bit for an arithmetic right shift
// and 0 otherwise. The zero flag is taken from the shifter output, before the
// second reversal, because reversal does not change whether a word is zero.
// The overflow flag is built inside the shifter (bs_right_shift_rotate) and
// is only reported for left shifts.
//
// HAS_ZERO / HAS_OVF select the three configurations the design was sized
// in (no flags, zero flag, both flags); a flag that is left out reads 0.
// Interface: data, amt (0..N-1), op (bs_pkg::op_t) in; result, zero, ovf out.
// Timing: purely combinational.
module bs_mux_dr
  import bs_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned LGN      = $clog2(N),
  parameter bit          HAS_ZERO = 1'b1,
  parameter bit          HAS_OVF  = 1'b1
) (
  input  logic [N-1:0]   data,
  input  logic [LGN-1:0] amt,
  input  op_t            op,
  output logic [N-1:0]   result,
  output logic           zero,
  output logic           ovf
);

  logic [N-1:0] d_rev;
  logic [N-1:0] r;
  logic         s;
  logic         ovf_raw;

  bs_mux_reversal #(.N(N)) u_rev_in (
    .rev  (~op.right),
    .din  (data),
    .dout (d_rev)
  );

  bs_fill_calc u_fill (
    .sign (data[N-1]),
    .op   (op),
    .s    (s)
  );

  bs_right_shift_rotate #(.N(N), .LGN(LGN)) u_shift (
    .din     (d_rev),
    .amt     (amt),
    .rotate  (op.rotate),
    .s       (s),
    .dout    (r),
    .ovf_raw (ovf_raw)
  );

  bs_mux_reversal #(.N(N)) u_rev_out (
    .rev  (~op.right),
    .din  (r),
    .dout (result)
  );

  if (HAS_ZERO) begin : g_zero
    bs_zero_flag #(.N(N)) u_zero (
      .din   (r),
      .zmask ('1),
      .zero  (zero)
    );
  end else begin : g_no_zero
    assign zero = 1'b0;
  end

  if (HAS_OVF) begin : g_ovf
    assign ovf = ovf_raw & ~op.right & ~op.rotate;
  end else begin : g_no_ovf
    assign ovf = 1'b0;
  end

endmodule
