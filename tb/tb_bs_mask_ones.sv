// tb_bs_mask_ones: self-checking testbench for bs_mask_ones (Mask-based One's Complement barrel shifter).
//
// Three parts:
//   1. the worked examples of the design (8-bit data 10100110 shifted or
//      rotated by 2 with each of the five operations), checked against
//      hand-computed results, including the intermediate signals of the
//      datapath (masks, rotate result, selected amount);
//   2. an exhaustive sweep of an 8-bit instance: every data value, amount
//      and operation, against the bit-level model in bs_ref_pkg;
//   3. random operands on an instance at the default width (32 bits),
//      including all-zero and single-bit data to exercise the zero flag.
// The design is combinational; each check waits 1 time unit after the
// inputs change. A watchdog ends the run as a failure if it stalls.
module tb_bs_mask_ones;
  import bs_pkg::*;
  import bs_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]  d8;  logic [2:0] a8;  op_t o8;  logic [7:0]  r8;  logic z8;
  logic [31:0] d32; logic [4:0] a32; op_t o32; logic [31:0] r32; logic z32;
  

  bs_mask_ones #(.N(8)) dut8 (.data(d8), .amt(a8), .op(o8), .result(r8), .zero(z8));
  bs_mask_ones dut32 (.data(d32), .amt(a32), .op(o32), .result(r32), .zero(z32));

  task automatic check8();
    #1;
    if (r8 !== ref_result(word_t'(d8), 8, a8, o8)[7:0]) begin
      failures++; $display("FAIL result8 %s d=%b a=%0d got %b", op_name(o8), d8, a8, r8);
    end
    checks++;
    if (z8 !== ref_zero(word_t'(d8), 8, a8, o8)) begin
      failures++; $display("FAIL zero8 %s d=%b a=%0d", op_name(o8), d8, a8);
    end
    checks++;

  endtask

  task automatic check32();
    #1;
    if (r32 !== ref_result(word_t'(d32), 32, a32, o32)[31:0]) begin
      failures++; $display("FAIL result32 %s d=%h a=%0d got %h", op_name(o32), d32, a32, r32);
    end
    checks++;
    if (z32 !== ref_zero(word_t'(d32), 32, a32, o32)) begin
      failures++; $display("FAIL zero32 %s d=%h a=%0d", op_name(o32), d32, a32);
    end
    checks++;

  endtask

  task automatic example(op_t op, logic [7:0] expected);
    d8 = 8'b1010_0110; a8 = 3'd2; o8 = op;
    #1;
    if (r8 !== expected) begin
      failures++; $display("FAIL example %s got %b expected %b", op_name(op), r8, expected);
    end
    checks++;
  endtask

  task automatic internal(string what, logic [7:0] got, logic [7:0] expected);
    checks++;
    if (got !== expected) begin
      failures++; $display("FAIL worked example %s got %b expected %b", what, got, expected);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d32 = '0; a32 = '0; o32 = OP_ROR;
    // 1. worked examples
    example(OP_ROR, 8'b1010_1001);
    example(OP_ROL, 8'b1001_1010);
    example(OP_SRL, 8'b0010_1001);
    example(OP_SLL, 8'b1001_1000);
    example(OP_SRA, 8'b1110_1001);
    // 1b. intermediate values of the worked examples
    d8 = 8'b1010_0110; a8 = 3'd2; o8 = OP_ROR; #1;
    internal("OP_ROR amt_sel", 8'(dut8.amt_sel), 8'(8'b010));
    internal("OP_ROR f", 8'(dut8.f), 8'(8'b00111111));
    internal("OP_ROR p", 8'(dut8.p), 8'(8'b11111111));
    internal("OP_ROR u_rot.stage[0]", 8'(dut8.u_rot.stage[0]), 8'(8'b10100110));
    internal("OP_ROR r", 8'(dut8.r), 8'(8'b10101001));
    d8 = 8'b1010_0110; a8 = 3'd2; o8 = OP_ROL; #1;
    internal("OP_ROL amt_sel", 8'(dut8.amt_sel), 8'(8'b101));
    internal("OP_ROL f", 8'(dut8.f), 8'(8'b00000011));
    internal("OP_ROL p", 8'(dut8.p), 8'(8'b11111111));
    internal("OP_ROL u_rot.stage[0]", 8'(dut8.u_rot.stage[0]), 8'(8'b01010011));
    internal("OP_ROL r", 8'(dut8.r), 8'(8'b10011010));
    d8 = 8'b1010_0110; a8 = 3'd2; o8 = OP_SRL; #1;
    internal("OP_SRL amt_sel", 8'(dut8.amt_sel), 8'(8'b010));
    internal("OP_SRL p", 8'(dut8.p), 8'(8'b00111111));
    internal("OP_SRL g_zero.z", 8'(dut8.g_zero.z), 8'(8'b11111100));
    d8 = 8'b1010_0110; a8 = 3'd2; o8 = OP_SLL; #1;
    internal("OP_SLL amt_sel", 8'(dut8.amt_sel), 8'(8'b101));
    internal("OP_SLL u_fgen.f_raw", 8'(dut8.u_fgen.f_raw), 8'(8'b00000111));
    internal("OP_SLL f", 8'(dut8.f), 8'(8'b00000011));
    internal("OP_SLL p", 8'(dut8.p), 8'(8'b11111100));
    internal("OP_SLL r", 8'(dut8.r), 8'(8'b10011010));
    internal("OP_SLL g_zero.z", 8'(dut8.g_zero.z), 8'(8'b00111111));
    d8 = 8'b1010_0110; a8 = 3'd2; o8 = OP_SRA; #1;
    internal("OP_SRA s", 8'(dut8.s), 8'(8'b1));
    internal("OP_SRA p", 8'(dut8.p), 8'(8'b00111111));
    internal("OP_SRA result", 8'(dut8.result), 8'(8'b11101001));
    // 2. exhaustive 8-bit sweep
    for (int k = 0; k < 5; k++)
      for (int a = 0; a < 8; a++)
        for (int d = 0; d < 256; d++) begin
          d8 = 8'(d); a8 = 3'(a); o8 = op_by_index(k);
          check8();
        end
    // 3. random 32-bit operands
    for (int i = 0; i < 4000; i++) begin
      case (i % 4)
        0:       d32 = '0;
        1:       d32 = 32'(1) << ($urandom % 32);
        default: d32 = $urandom;
      endcase
      a32 = 5'($urandom);
      o32 = op_by_index($urandom % 5);
      check32();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
