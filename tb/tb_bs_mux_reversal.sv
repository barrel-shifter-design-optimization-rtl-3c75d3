// tb_bs_mux_reversal: checks the mux data reversal row at N = 32 (random
// words, both control values) and N = 8 (every byte). Expected values come
// from a bit-by-bit loop in the testbench. Combinational; 1 time unit per
// check; watchdog ends a stalled run as a failure.
module tb_bs_mux_reversal;
  int checks = 0;
  int failures = 0;

  logic        rev32, rev8;
  logic [31:0] din32, dout32, exp32;
  logic [7:0]  din8, dout8, exp8;

  bs_mux_reversal           dut32 (.rev(rev32), .din(din32), .dout(dout32));
  bs_mux_reversal #(.N(8))  dut8  (.rev(rev8),  .din(din8),  .dout(dout8));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rev8 = 1'b0; din8 = '0;
    for (int i = 0; i < 2000; i++) begin
      rev32 = 1'(i); din32 = $urandom;
      for (int b = 0; b < 32; b++) exp32[b] = rev32 ? din32[31-b] : din32[b];
      #1;
      checks++;
      if (dout32 !== exp32) begin failures++; $display("FAIL rev=%b din=%h got %h", rev32, din32, dout32); end
    end
    for (int d = 0; d < 512; d++) begin
      rev8 = d[8]; din8 = 8'(d);
      for (int b = 0; b < 8; b++) exp8[b] = rev8 ? din8[7-b] : din8[b];
      #1;
      checks++;
      if (dout8 !== exp8) begin failures++; $display("FAIL8 rev=%b din=%b got %b", rev8, din8, dout8); end
    end
    // worked example: 10100110 reversed is 01100101
    rev8 = 1'b1; din8 = 8'b1010_0110; #1;
    checks++;
    if (dout8 !== 8'b0110_0101) begin failures++; $display("FAIL example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
