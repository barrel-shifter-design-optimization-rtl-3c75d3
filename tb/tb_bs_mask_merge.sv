// tb_bs_mask_merge: checks T = R AND P OR S AND NOT P bit by bit at N = 32
// with random R, P and S, and the worked example of an arithmetic right
// shift (R = 10101001, P = 00111111, S = 1 gives 11101001) at N = 8.
// Watchdog included.
module tb_bs_mask_merge;
  int checks = 0;
  int failures = 0;

  logic [31:0] r, p, t, exp_t;
  logic        s;
  logic [7:0]  r8, p8, t8;
  logic        s8;

  bs_mask_merge          dut   (.r(r), .p(p), .s(s), .t(t));
  bs_mask_merge #(.N(8)) dut8  (.r(r8), .p(p8), .s(s8), .t(t8));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r8 = 8'b1010_1001; p8 = 8'b0011_1111; s8 = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      r = $urandom; p = $urandom; s = 1'($urandom);
      for (int b = 0; b < 32; b++) exp_t[b] = p[b] ? r[b] : s;
      #1;
      checks++;
      if (t !== exp_t) begin failures++; $display("FAIL r=%h p=%h s=%b got %h", r, p, s, t); end
    end
    checks++;
    if (t8 !== 8'b1110_1001) begin failures++; $display("FAIL example got %b", t8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
