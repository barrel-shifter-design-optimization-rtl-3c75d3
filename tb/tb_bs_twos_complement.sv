// tb_bs_twos_complement: exhaustive check of the two's complement unit for
// LGN = 5 (default) and LGN = 3: y must equal (2^LGN - a) mod 2^LGN,
// e.g. 2 -> 6 for LGN = 3 as in the worked example. Watchdog included.
module tb_bs_twos_complement;
  int checks = 0;
  int failures = 0;

  logic [4:0] a5, y5;
  logic [2:0] a3, y3;

  bs_twos_complement            dut5 (.a(a5), .y(y5));
  bs_twos_complement #(.LGN(3)) dut3 (.a(a3), .y(y3));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      a5 = 5'(a); a3 = 3'(a);
      #1;
      checks++;
      if (y5 !== 5'((32 - a) % 32)) begin failures++; $display("FAIL5 a=%0d got %0d", a, y5); end
      checks++;
      if (y3 !== 3'((8 - (a % 8)) % 8)) begin failures++; $display("FAIL3 a=%0d got %0d", a % 8, y3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
