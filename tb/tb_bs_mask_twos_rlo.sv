// tb_bs_mask_twos_rlo: checks the register-load-optimized two's complement
// shifter and its one-cycle split.
//
// Each cycle the testbench presents the amount and opcode of operation i
// and, one cycle later, the data of operation i. After the clock edge it
// checks result and zero against bs_ref_pkg for operation i. It also checks
//   - the reset state (right rotate by zero: result equals data),
//   - latency: changing amt/op between edges must not change the result,
//     and the new amount takes effect exactly one edge later,
//   - the left shift by zero, the special case of the two's complement.
// Runs an 8-bit instance exhaustively over amount and operation with random
// data, and the default 32-bit instance randomly. Watchdog: 200000 cycles.
module tb_bs_mask_twos_rlo;
  import bs_pkg::*;
  import bs_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [2:0]  a8;  op_t o8;  logic [7:0]  d8;  logic [7:0]  r8;  logic z8;
  logic [4:0]  a32; op_t o32; logic [31:0] d32; logic [31:0] r32; logic z32;

  bs_mask_twos_rlo #(.N(8)) dut8 (.clk(clk), .rst_n(rst_n), .amt(a8), .op(o8), .data(d8), .result(r8), .zero(z8));
  bs_mask_twos_rlo          dut32 (.clk(clk), .rst_n(rst_n), .amt(a32), .op(o32), .data(d32), .result(r32), .zero(z32));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present amt/op before an edge, then data after it, then check.
  task automatic op8(int amt, op_t op, logic [7:0] data);
    a8 = 3'(amt); o8 = op;
    @(posedge clk); #1;
    a8 = 3'($urandom); o8 = op_by_index($urandom % 5);  // next operation's amount may already change
    d8 = data; #1;
    checks += 2;
    if (r8 !== ref_result(word_t'(data), 8, amt, op)[7:0]) begin
      failures++; $display("FAIL8 %s d=%b a=%0d got %b", op_name(op), data, amt, r8);
    end
    if (z8 !== ref_zero(word_t'(data), 8, amt, op)) begin
      failures++; $display("FAIL8 zero %s d=%b a=%0d", op_name(op), data, amt);
    end
  endtask

  task automatic op32(int amt, op_t op, logic [31:0] data);
    a32 = 5'(amt); o32 = op;
    @(posedge clk); #1;
    d32 = data; #1;
    checks += 2;
    if (r32 !== ref_result(word_t'(data), 32, amt, op)[31:0]) begin
      failures++; $display("FAIL32 %s d=%h a=%0d got %h", op_name(op), data, amt, r32);
    end
    if (z32 !== ref_zero(word_t'(data), 32, amt, op)) begin
      failures++; $display("FAIL32 zero %s d=%h a=%0d", op_name(op), data, amt);
    end
  endtask

  initial begin
    rst_n = 1'b1;
    a8 = 3'd5; o8 = OP_SLL; d8 = 8'b1010_0110;
    a32 = '0; o32 = OP_ROR; d32 = 32'hDEAD_BEEF;
    #1 rst_n = 1'b0;
    #1;
    // reset state: rotate right by zero
    checks += 2;
    if (r8 !== 8'b1010_0110) begin failures++; $display("FAIL reset8 got %b", r8); end
    if (r32 !== 32'hDEAD_BEEF) begin failures++; $display("FAIL reset32 got %h", r32); end
    @(negedge clk); rst_n = 1'b1;

    // latency: after an edge with SLL 5 registered, change amt/op: no effect
    @(posedge clk); #1;
    a8 = 3'd1; o8 = OP_ROR; d8 = 8'b1010_0110; #1;
    checks++;
    if (r8 !== 8'b1100_0000) begin failures++; $display("FAIL latency hold got %b", r8); end
    @(posedge clk); #1;
    checks++;
    if (r8 !== 8'b0101_0011) begin failures++; $display("FAIL latency update got %b", r8); end

    // worked examples, including the left shift by zero
    op8(2, OP_ROR, 8'b1010_0110);
    op8(2, OP_ROL, 8'b1010_0110);
    op8(2, OP_SRL, 8'b1010_0110);
    op8(2, OP_SLL, 8'b1010_0110);
    op8(2, OP_SRA, 8'b1010_0110);
    op8(0, OP_SLL, 8'b1010_0110);

    for (int rep = 0; rep < 20; rep++)
      for (int k = 0; k < 5; k++)
        for (int a = 0; a < 8; a++)
          op8(a, op_by_index(k), (rep == 0) ? 8'(1 << (a % 8)) : 8'($urandom));

    for (int i = 0; i < 2000; i++)
      op32($urandom % 32, op_by_index($urandom % 5), (i % 5 == 0) ? 32'(0) : $urandom);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
