// tb_barrel_shifter_top: end-to-end test of barrel_shifter_top at its
// default size (N = 32), with no parameter overrides.
//
// Every cycle the same random operation (data, amount, opcode) is sent to
// all five shifters; the register-load-optimized one gets its amount and
// opcode a cycle before its data, as it expects. Every result, zero flag
// and overflow flag is compared with the bit-level model in bs_ref_pkg.
//
// The operand mix forces each mechanism the designs have, and the test
// counts how often each occurred and fails if one never did:
//   rotate right/left, shift right/left logical, shift right arithmetic with
//   sign fill, a left shift by zero (the two's complement special case), a
//   rotate through the extra rotate-by-one row (one's complement, left),
//   a set zero flag, a set overflow flag, and the left-arithmetic code
//   that is treated as a logical left shift.
// Watchdog: 100000 cycles.
module tb_barrel_shifter_top;
  import bs_pkg::*;
  import bs_ref_pkg::*;

  localparam int N = 32;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  typedef enum int {
    M_ROR, M_ROL, M_SRL, M_SLL, M_SRA_FILL, M_SLL_ZERO_AMT, M_LEFT_ROT1,
    M_ZERO_FLAG, M_OVF_FLAG, M_SLA_AS_SLL, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  logic clk = 1'b0;
  logic rst_n;

  logic [N-1:0] data, rlo_data;
  logic [4:0]   amt;
  op_t          op;
  logic [N-1:0] mux_dr_result, mask_dr_result, twos_result, ones_result, rlo_result;
  logic         mux_dr_zero, mask_dr_zero, twos_zero, ones_zero, rlo_zero;
  logic         mux_dr_ovf, mask_dr_ovf;

  barrel_shifter_top dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .mux_dr_data    (data),  .mux_dr_amt (amt),  .mux_dr_op (op),
    .mux_dr_result  (mux_dr_result), .mux_dr_zero (mux_dr_zero), .mux_dr_ovf (mux_dr_ovf),
    .mask_dr_data   (data),  .mask_dr_amt (amt), .mask_dr_op (op),
    .mask_dr_result (mask_dr_result), .mask_dr_zero (mask_dr_zero), .mask_dr_ovf (mask_dr_ovf),
    .twos_data      (data),  .twos_amt (amt),    .twos_op (op),
    .twos_result    (twos_result), .twos_zero (twos_zero),
    .ones_data      (data),  .ones_amt (amt),    .ones_op (op),
    .ones_result    (ones_result), .ones_zero (ones_zero),
    .rlo_amt        (amt),   .rlo_op (op),       .rlo_data (rlo_data),
    .rlo_result     (rlo_result), .rlo_zero (rlo_zero)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %s d=%h a=%0d got %b expected %b", what, op_name(op), data, amt, got, exp);
    end
  endtask

  task automatic chkw(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %s d=%h a=%0d got %h expected %h", what, op_name(op), data, amt, got, exp);
    end
  endtask

  // One operation: amount/opcode before the edge, data of the clocked
  // variant after it; the combinational designs see everything at once.
  task automatic run_op(logic [N-1:0] d, int a, op_t o);
    logic [N-1:0] exp_r;
    logic         exp_z, exp_v;
    op_t          eff;
    data = d; amt = 5'(a); op = o;
    @(posedge clk); #1;
    rlo_data = d; #1;
    // the unsupported left-arithmetic code is defined to act as SLL
    eff = (!o.right && !o.rotate) ? OP_SLL : o;
    exp_r = ref_result(word_t'(d), N, a, eff)[N-1:0];
    exp_z = ref_zero(word_t'(d), N, a, eff);
    exp_v = ref_ovf(word_t'(d), N, a, eff);
    chkw("mux_dr result", mux_dr_result, exp_r);
    chkw("mask_dr result", mask_dr_result, exp_r);
    chkw("twos result", twos_result, exp_r);
    chkw("ones result", ones_result, exp_r);
    chkw("rlo result", rlo_result, exp_r);
    chk("mux_dr zero", mux_dr_zero, exp_z);
    chk("mask_dr zero", mask_dr_zero, exp_z);
    chk("twos zero", twos_zero, exp_z);
    chk("ones zero", ones_zero, exp_z);
    chk("rlo zero", rlo_zero, exp_z);
    chk("mux_dr ovf", mux_dr_ovf, exp_v);
    chk("mask_dr ovf", mask_dr_ovf, exp_v);
    if (o.rotate && o.right) seen[M_ROR]++;
    if (o.rotate && !o.right) seen[M_ROL]++;
    if (o.rotate && !o.right && a != 0) seen[M_LEFT_ROT1]++;
    if (!o.rotate && o.right && !o.arith) seen[M_SRL]++;
    if (!o.rotate && !o.right) seen[M_SLL]++;
    if (!o.rotate && !o.right && a == 0) seen[M_SLL_ZERO_AMT]++;
    if (!o.rotate && !o.right && o.arith) seen[M_SLA_AS_SLL]++;
    if (o == OP_SRA && d[N-1] && a != 0) seen[M_SRA_FILL]++;
    if (exp_z) seen[M_ZERO_FLAG]++;
    if (exp_v) seen[M_OVF_FLAG]++;
  endtask

  initial begin
    rst_n = 1'b0;
    data = '0; rlo_data = '0; amt = '0; op = OP_ROR;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 20_000; i++) begin
      logic [N-1:0] d;
      op_t          o;
      int           a;
      case (i % 8)
        0:       d = '0;
        1:       d = 32'(1) << ($urandom % N);
        2:       d = ~(32'(1) << ($urandom % N));
        default: d = $urandom;
      endcase
      a = (i % 16 == 3) ? 0 : $urandom % N;
      o = (i % 97 == 5) ? op_t'(3'b001) : op_by_index($urandom % 5);
      run_op(d, a, o);
    end
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %s: %0d", mech_e'(m), seen[m]);
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", mech_e'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
