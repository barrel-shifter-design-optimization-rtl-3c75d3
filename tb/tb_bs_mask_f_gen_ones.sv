// tb_bs_mask_f_gen_ones: exhaustive check at N = 8 and 32 of the one's
// complement mask generator: F = all-ones >> amt for right operations and
// all-ones >> (amt + 1) for left ones (8 bits, left, amt = 5: 00000011, as
// in the worked left-shift example). Watchdog included.
module tb_bs_mask_f_gen_ones;
  int checks = 0;
  int failures = 0;

  logic [2:0] a8;  logic [7:0]  f8;
  logic [4:0] a32; logic [31:0] f32;
  logic       left;

  bs_mask_f_gen_ones #(.N(8)) dut8  (.amt(a8),  .left(left), .f(f8));
  bs_mask_f_gen_ones          dut32 (.amt(a32), .left(left), .f(f32));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a8 = 3'(i); a32 = 5'(i); left = i[5];
      #1;
      checks += 2;
      if (f8  !== ((8'hFF >> a8) >> left))          begin failures++; $display("FAIL8 amt=%0d left=%b got %b", a8, left, f8); end
      if (f32 !== ((32'hFFFF_FFFF >> a32) >> left)) begin failures++; $display("FAIL32 amt=%0d left=%b got %b", a32, left, f32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
