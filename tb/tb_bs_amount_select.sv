// tb_bs_amount_select: exhaustive check of the amount selection for both
// complement modes at LGN = 5: right operations pass amt, left operations
// get 32 - amt (two's complement, mod 32) or 31 - amt (one's complement);
// amt_zero must flag amt == 0. Watchdog included.
module tb_bs_amount_select;
  int checks = 0;
  int failures = 0;

  logic [4:0] amt;
  logic       left;
  logic [4:0] sel2, sel1;
  logic       z2, z1;

  bs_amount_select #(.LGN(5), .ONES_COMP(1'b0)) dut2 (.amt(amt), .left(left), .amt_sel(sel2), .amt_zero(z2));
  bs_amount_select #(.LGN(5), .ONES_COMP(1'b1)) dut1 (.amt(amt), .left(left), .amt_sel(sel1), .amt_zero(z1));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      amt = 5'(i); left = i[5];
      #1;
      checks += 4;
      if (sel2 !== (left ? 5'((32 - int'(amt)) % 32) : amt)) begin failures++; $display("FAIL twos amt=%0d left=%b got %0d", amt, left, sel2); end
      if (sel1 !== (left ? 5'(31 - int'(amt)) : amt))         begin failures++; $display("FAIL ones amt=%0d left=%b got %0d", amt, left, sel1); end
      if (z2 !== (amt == 0)) begin failures++; $display("FAIL zero2 amt=%0d", amt); end
      if (z1 !== (amt == 0)) begin failures++; $display("FAIL zero1 amt=%0d", amt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
