// bs_width_checker: testbench helper that runs one width of every barrel
// shifter design. It instantiates bs_mux_dr, bs_mask_dr, bs_mask_twos and
// bs_mask_ones at width N, drives them with OPS random operations (every
// operation, amounts 0..N-1, zero, single-bit and random data) and compares
// result, zero and overflow against bs_ref_pkg. A second set of the same
// designs is built without flags (HAS_ZERO = HAS_OVF = 0); their results must
// match and their flag outputs must read 0. It raises done when finished
// and reports its check and failure counts on its outputs.
module bs_width_checker
  import bs_pkg::*;
  import bs_ref_pkg::*;
#(
  parameter int N   = 8,
  parameter int OPS = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LGN = $clog2(N);

  logic [N-1:0]   data;
  logic [LGN-1:0] amt;
  op_t            op;
  logic [N-1:0]   r_mux, r_mask, r_twos, r_ones;
  logic           z_mux, z_mask, z_twos, z_ones, v_mux, v_mask;

  bs_mux_dr    #(.N(N)) u_mux  (.data(data), .amt(amt), .op(op), .result(r_mux),  .zero(z_mux),  .ovf(v_mux));
  bs_mask_dr   #(.N(N)) u_mask (.data(data), .amt(amt), .op(op), .result(r_mask), .zero(z_mask), .ovf(v_mask));
  bs_mask_twos #(.N(N)) u_twos (.data(data), .amt(amt), .op(op), .result(r_twos), .zero(z_twos));
  bs_mask_ones #(.N(N)) u_ones (.data(data), .amt(amt), .op(op), .result(r_ones), .zero(z_ones));

  // the same designs built without flags: same results, flags read 0
  logic [N-1:0] r_mux_nf, r_mask_nf, r_twos_nf, r_ones_nf;
  logic         z_mux_nf, z_mask_nf, z_twos_nf, z_ones_nf, v_mux_nf, v_mask_nf;
  bs_mux_dr    #(.N(N), .HAS_ZERO(1'b0), .HAS_OVF(1'b0)) u_mux_nf  (.data(data), .amt(amt), .op(op), .result(r_mux_nf),  .zero(z_mux_nf),  .ovf(v_mux_nf));
  bs_mask_dr   #(.N(N), .HAS_ZERO(1'b0), .HAS_OVF(1'b0)) u_mask_nf (.data(data), .amt(amt), .op(op), .result(r_mask_nf), .zero(z_mask_nf), .ovf(v_mask_nf));
  bs_mask_twos #(.N(N), .HAS_ZERO(1'b0))                 u_twos_nf (.data(data), .amt(amt), .op(op), .result(r_twos_nf), .zero(z_twos_nf));
  bs_mask_ones #(.N(N), .HAS_ZERO(1'b0))                 u_ones_nf (.data(data), .amt(amt), .op(op), .result(r_ones_nf), .zero(z_ones_nf));

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w;
    for (int i = 0; i < N; i += 32) w = (w << 32) | N'($urandom);
    return w;
  endfunction

  task automatic expect_eq(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL N=%0d %s %s d=%h a=%0d got %h expected %h", N, what, op_name(op), data, amt, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] exp_r;
    checks = 0; failures = 0; done = 1'b0;
    for (int i = 0; i < OPS; i++) begin
      case (i % 4)
        0:       data = '0;
        1:       data = N'(1) << ($urandom % N);
        default: data = rand_word();
      endcase
      amt = LGN'($urandom % N);
      op  = op_by_index(i);
      #1;
      exp_r = ref_result(word_t'(data), N, int'(amt), op)[N-1:0];
      expect_eq("mux_dr", r_mux, exp_r);
      expect_eq("mask_dr", r_mask, exp_r);
      expect_eq("twos", r_twos, exp_r);
      expect_eq("ones", r_ones, exp_r);
      expect_eq("zero", N'({z_mux, z_mask, z_twos, z_ones}), N'({4{ref_zero(word_t'(data), N, int'(amt), op)}}));
      expect_eq("ovf", N'({v_mux, v_mask}), N'({2{ref_ovf(word_t'(data), N, int'(amt), op)}}));
      expect_eq("mux_dr no flags", r_mux_nf, exp_r);
      expect_eq("mask_dr no flags", r_mask_nf, exp_r);
      expect_eq("twos no flags", r_twos_nf, exp_r);
      expect_eq("ones no flags", r_ones_nf, exp_r);
      expect_eq("flags tied off", N'({z_mux_nf, z_mask_nf, z_twos_nf, z_ones_nf, v_mux_nf, v_mask_nf}), '0);
    end
    done = 1'b1;
  end
endmodule
