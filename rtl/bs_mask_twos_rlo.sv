// bs_mask_twos_rlo: Register Load Optimized Mask-based Two's Complement
// barrel shifter.
//
// When the amount is an immediate and the data comes from a register file,
// the amount is known before the data. This variant uses that gap: the slow
// two's complement and the amount selection (bs_amount_select) run while the
// register is being read, so only the rotate/mask datapath
// (bs_mask_twos_core) remains once the data arrives.
//
// The gap is modelled here as one clock cycle:
//   cycle t   : amt and op are presented; on the rising edge the selected
//               amount, the amount-is-zero bit and the opcode are registered.
//   cycle t+1 : data is presented; result and zero follow combinationally.
// rst_n (asynchronous, active low) clears the register to a right rotate by
// zero, so the unit passes data through unchanged after reset. The one-cycle
// split and the reset value are this implementation's choices.
module bs_mask_twos_rlo
  import bs_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter int unsigned LGN = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [LGN-1:0] amt,
  input  op_t            op,
  input  logic [N-1:0]   data,
  output logic [N-1:0]   result,
  output logic           zero
);

  logic [LGN-1:0] amt_sel_d, amt_sel_q;
  logic           amt_zero_d, amt_zero_q;
  op_t            op_q;

  bs_amount_select #(.LGN(LGN), .ONES_COMP(1'b0)) u_amt (
    .amt      (amt),
    .left     (~op.right),
    .amt_sel  (amt_sel_d),
    .amt_zero (amt_zero_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      amt_sel_q  <= '0;
      amt_zero_q <= 1'b1;
      op_q       <= OP_ROR;
    end else begin
      amt_sel_q  <= amt_sel_d;
      amt_zero_q <= amt_zero_d;
      op_q       <= op;
    end
  end

  bs_mask_twos_core #(.N(N), .LGN(LGN), .HAS_ZERO(1'b1)) u_core (
    .data     (data),
    .amt_sel  (amt_sel_q),
    .amt_zero (amt_zero_q),
    .op       (op_q),
    .result   (result),
    .zero     (zero)
  );

endmodule
