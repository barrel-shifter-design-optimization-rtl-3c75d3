// tb_bs_fill_calc: exhaustive check of the fill bit S over the sign bit and
// all eight opcode values. S must equal the sign bit for an arithmetic right
// shift and be 0 for every other code. Watchdog included.
module tb_bs_fill_calc;
  import bs_pkg::*;
  int checks = 0;
  int failures = 0;

  logic sign, s, exp_s;
  op_t  op;

  bs_fill_calc dut (.sign(sign), .op(op), .s(s));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {sign, op} = 4'(i);
      exp_s = (op == OP_SRA) ? sign : 1'b0;
      #1;
      checks++;
      if (s !== exp_s) begin failures++; $display("FAIL sign=%b op=%b got %b", sign, op, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
