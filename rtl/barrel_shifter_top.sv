// barrel_shifter_top: the four barrel shifter organisations side by side.
//
// Each design performs rotate right/left, shift right/left logical and
// shift right arithmetic of an N-bit word by 0..N-1 places. They differ in
// how they build it from right-only hardware:
//   mux_dr  - Mux-based Data Reversal (bs_mux_dr): reverse, shift with a
//             per-row pad, reverse back; zero and overflow flags.
//   mask_dr - Mask-based Data Reversal (bs_mask_dr): reverse, rotate, mask,
//             reverse back; zero and overflow flags.
//   twos    - Mask-based Two's Complement (bs_mask_twos): rotate right by
//             N-amt for left operations, then mask; zero flag.
//   ones    - Mask-based One's Complement (bs_mask_ones): rotate by ~amt plus
//             a rotate-by-one correction, then mask; zero flag.
//   rlo     - Register Load Optimized two's complement (bs_mask_twos_rlo):
//             amount prepared and registered one cycle before the data.
// The designs are alternatives and share nothing; each has its own ports,
// prefixed with its name. All are combinational except rlo, which is
// clocked by clk with asynchronous active-low reset rst_n.
module barrel_shifter_top
  import bs_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter int unsigned LGN = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,

  input  logic [N-1:0]   mux_dr_data,
  input  logic [LGN-1:0] mux_dr_amt,
  input  op_t            mux_dr_op,
  output logic [N-1:0]   mux_dr_result,
  output logic           mux_dr_zero,
  output logic           mux_dr_ovf,

  input  logic [N-1:0]   mask_dr_data,
  input  logic [LGN-1:0] mask_dr_amt,
  input  op_t            mask_dr_op,
  output logic [N-1:0]   mask_dr_result,
  output logic           mask_dr_zero,
  output logic           mask_dr_ovf,

  input  logic [N-1:0]   twos_data,
  input  logic [LGN-1:0] twos_amt,
  input  op_t            twos_op,
  output logic [N-1:0]   twos_result,
  output logic           twos_zero,

  input  logic [N-1:0]   ones_data,
  input  logic [LGN-1:0] ones_amt,
  input  op_t            ones_op,
  output logic [N-1:0]   ones_result,
  output logic           ones_zero,

  input  logic [LGN-1:0] rlo_amt,
  input  op_t            rlo_op,
  input  logic [N-1:0]   rlo_data,
  output logic [N-1:0]   rlo_result,
  output logic           rlo_zero
);

  bs_mux_dr #(.N(N), .LGN(LGN)) u_mux_dr (
    .data   (mux_dr_data),
    .amt    (mux_dr_amt),
    .op     (mux_dr_op),
    .result (mux_dr_result),
    .zero   (mux_dr_zero),
    .ovf    (mux_dr_ovf)
  );

  bs_mask_dr #(.N(N), .LGN(LGN)) u_mask_dr (
    .data   (mask_dr_data),
    .amt    (mask_dr_amt),
    .op     (mask_dr_op),
    .result (mask_dr_result),
    .zero   (mask_dr_zero),
    .ovf    (mask_dr_ovf)
  );

  bs_mask_twos #(.N(N), .LGN(LGN)) u_twos (
    .data   (twos_data),
    .amt    (twos_amt),
    .op     (twos_op),
    .result (twos_result),
    .zero   (twos_zero)
  );

  bs_mask_ones #(.N(N), .LGN(LGN)) u_ones (
    .data   (ones_data),
    .amt    (ones_amt),
    .op     (ones_op),
    .result (ones_result),
    .zero   (ones_zero)
  );

  bs_mask_twos_rlo #(.N(N), .LGN(LGN)) u_rlo (
    .clk    (clk),
    .rst_n  (rst_n),
    .amt    (rlo_amt),
    .op     (rlo_op),
    .data   (rlo_data),
    .result (rlo_result),
    .zero   (rlo_zero)
  );

endmodule
