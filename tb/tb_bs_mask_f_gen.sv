// tb_bs_mask_f_gen: exhaustive check of the recursive mask F generator at
// N = 8, 16 (the size of the design's worked structure), 32 and 2: F must
// have amt zeros at the top and ones below, i.e. all-ones shifted right by
// amt (8 bits, amt = 2: 00111111). Watchdog included.
module tb_bs_mask_f_gen;
  int checks = 0;
  int failures = 0;

  logic [2:0] a8;  logic [7:0]  f8;
  logic [3:0] a16; logic [15:0] f16;
  logic [4:0] a32; logic [31:0] f32;
  logic [0:0] a2;  logic [1:0]  f2;

  bs_mask_f_gen #(.N(8))  dut8  (.amt(a8),  .f(f8));
  bs_mask_f_gen #(.N(16)) dut16 (.amt(a16), .f(f16));
  bs_mask_f_gen           dut32 (.amt(a32), .f(f32));
  bs_mask_f_gen #(.N(2))  dut2  (.amt(a2),  .f(f2));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      a8 = 3'(a); a16 = 4'(a); a32 = 5'(a); a2 = 1'(a);
      #1;
      checks += 4;
      if (f8  !== (8'hFF >> a8))          begin failures++; $display("FAIL8 amt=%0d got %b", a8, f8); end
      if (f16 !== (16'hFFFF >> a16))      begin failures++; $display("FAIL16 amt=%0d got %b", a16, f16); end
      if (f32 !== (32'hFFFF_FFFF >> a32)) begin failures++; $display("FAIL32 amt=%0d got %b", a32, f32); end
      if (f2  !== (2'b11 >> a2))          begin failures++; $display("FAIL2 amt=%0d got %b", a2, f2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
