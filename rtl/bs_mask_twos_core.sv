// bs_mask_twos_core: datapath of the Mask-based Two's Complement shifter,
// from the selected amount onwards.
//
// Takes the amount already prepared by bs_amount_select (amt_sel = amt for
// right operations, N - amt for left ones, plus amt_zero) and
//   R = data rotated right by amt_sel (bs_right_rotator)
//   F = mask of amt_sel leading zeros (bs_mask_f_gen)
//   P = (right ? F : ~F) | rotate | amt_zero
//   T = R&P | S&~P   (bs_mask_merge) = result
// A right shift keeps the low N-amt rotated bits (F); a left shift, done as
// a right rotate by N-amt, keeps the high N-amt bits (~F). amt_zero repairs
// a left shift by 0, whose two's complement amount is 0 and whose ~F would
// be all zeros. Zero flag: data ANDed with P bit-reversed, OR tree, inverter.
//
// It is a separate module so that the register-load-optimized variant can
// place a register between the amount preparation and this datapath.
// Timing: purely combinational.
module bs_mask_twos_core
  import bs_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned LGN      = $clog2(N),
  parameter bit          HAS_ZERO = 1'b1
) (
  input  logic [N-1:0]   data,
  input  logic [LGN-1:0] amt_sel,
  input  logic           amt_zero,
  input  op_t            op,
  output logic [N-1:0]   result,
  output logic           zero
);

  logic [N-1:0] r;
  logic [N-1:0] f;
  logic [N-1:0] p;
  logic         s;

  bs_right_rotator #(.N(N), .LGN(LGN), .PRE_ROT1(1'b0)) u_rot (
    .din  (data),
    .amt  (amt_sel),
    .rot1 (1'b0),
    .dout (r)
  );

  bs_mask_f_gen #(.N(N), .LGN(LGN)) u_fgen (
    .amt (amt_sel),
    .f   (f)
  );

  assign p = (op.right ? f : ~f) | {N{op.rotate | amt_zero}};

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
