// tb_bs_zero_flag: checks zero = NOT OR(din AND zmask) at N = 32 with random
// data and masks, with all-ones masks, and with data that is nonzero only
// where the mask is 0 (the flag must then be set). Watchdog included.
module tb_bs_zero_flag;
  int checks = 0;
  int failures = 0;

  logic [31:0] din, zmask;
  logic        zero, exp_z;

  bs_zero_flag dut (.din(din), .zmask(zmask), .zero(zero));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      case (i % 3)
        0: begin din = $urandom; zmask = $urandom; end
        1: begin din = (i % 6 == 1) ? '0 : 32'(1) << ($urandom % 32); zmask = '1; end
        default: begin zmask = $urandom; din = ~zmask & $urandom; end
      endcase
      exp_z = 1'b1;
      for (int b = 0; b < 32; b++) if (din[b] && zmask[b]) exp_z = 1'b0;
      #1;
      checks++;
      if (zero !== exp_z) begin failures++; $display("FAIL din=%h mask=%h got %b", din, zmask, zero); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
