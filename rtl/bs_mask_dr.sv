// bs_mask_dr: Mask-based Data Reversal barrel shifter.
//
// Same operations and flags as bs_mux_dr, but every operation is derived
// from a rotate: shifts are made by masking the rotate result.
//
//   data -> [reversal] -> [right rotator] = R --+
//   amt  -> [mask F generator] = F -> P = F | rotate -> T = R&P | S&~P -> [reversal] -> result
//
// F has amt zeros at the top and ones below, which is exactly the set of
// positions a right shift keeps. P = F OR rotate turns the mask off for
// rotates. T keeps the rotated bits where P is 1 and writes the fill bit S
// where P is 0. Left operations are handled by the two reversals, as in
// bs_mux_dr, so the same F serves both directions.
//
// Zero flag (in parallel with the rotate): the reversed data ANDed with
// Z = P bit-reversed (the bits that will survive, found before rotation),
// then OR tree and inverter.
// Overflow flag (in parallel): bs_overflow_mask on the original data and F,
// gated by "left shift".
//
// HAS_ZERO / HAS_OVF as in bs_mux_dr. Timing: purely combinational.
module bs_mask_dr
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
  logic [N-1:0] f;
  logic [N-1:0] p;
  logic [N-1:0] t;
  logic         s;

  bs_mux_reversal #(.N(N)) u_rev_in (
    .rev  (~op.right),
    .din  (data),
    .dout (d_rev)
  );

  bs_right_rotator #(.N(N), .LGN(LGN), .PRE_ROT1(1'b0)) u_rot (
    .din  (d_rev),
    .amt  (amt),
    .rot1 (1'b0),
    .dout (r)
  );

  bs_mask_f_gen #(.N(N), .LGN(LGN)) u_fgen (
    .amt (amt),
    .f   (f)
  );

  assign p = f | {N{op.rotate}};

  bs_fill_calc u_fill (
    .sign (data[N-1]),
    .op   (op),
    .s    (s)
  );

  bs_mask_merge #(.N(N)) u_merge (
    .r (r),
    .p (p),
    .s (s),
    .t (t)
  );

  bs_mux_reversal #(.N(N)) u_rev_out (
    .rev  (~op.right),
    .din  (t),
    .dout (result)
  );

  if (HAS_ZERO) begin : g_zero
    logic [N-1:0] z;
    always_comb begin
      for (int i = 0; i < N; i++) z[i] = p[N-1-i];
    end
    bs_zero_flag #(.N(N)) u_zero (
      .din   (d_rev),
      .zmask (z),
      .zero  (zero)
    );
  end else begin : g_no_zero
    assign zero = 1'b0;
  end

  if (HAS_OVF) begin : g_ovf
    bs_overflow_mask #(.N(N)) u_ovf (
      .data       (data),
      .f          (f),
      .left_shift (~op.right & ~op.rotate),
      .ovf        (ovf)
    );
  end else begin : g_no_ovf
    assign ovf = 1'b0;
  end

endmodule
