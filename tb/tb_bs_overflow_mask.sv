// tb_bs_overflow_mask: checks the mask-based overflow flag. N = 8: every
// data value and amount, both values of left_shift, with F = all-ones >> amt
// as the mask generator produces it. N = 32: random. The expectation replays
// the left shift one place at a time (bs_ref_pkg::ref_ovf). Also the worked
// example: 10100110 shifted left by 2 overflows. Watchdog included.
module tb_bs_overflow_mask;
  import bs_pkg::*;
  import bs_ref_pkg::*;
  int checks = 0;
  int failures = 0;

  logic [7:0]  d8, f8;
  logic        ls8, v8, ev8;
  logic [31:0] d32, f32;
  logic        ls32, v32, ev32;
  int          a;

  bs_overflow_mask #(.N(8)) dut8  (.data(d8),  .f(f8),  .left_shift(ls8),  .ovf(v8));
  bs_overflow_mask          dut32 (.data(d32), .f(f32), .left_shift(ls32), .ovf(v32));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d32 = '0; f32 = '1; ls32 = 1'b0;
    for (int i = 0; i < 4096; i++) begin
      d8 = 8'(i); a = (i >> 8) & 7; ls8 = i[11]; f8 = 8'hFF >> a;
      #1;
      ev8 = ls8 && ref_ovf(word_t'(d8), 8, a, OP_SLL);
      checks++;
      if (v8 !== ev8) begin failures++; $display("FAIL8 d=%b a=%0d ls=%b got %b", d8, a, ls8, v8); end
    end
    for (int i = 0; i < 3000; i++) begin
      a = $urandom % 32; ls32 = 1'($urandom); f32 = 32'hFFFF_FFFF >> a;
      d32 = (i % 2) ? $urandom : ({32{1'(i >> 1)}} ^ (32'(1) << ($urandom % 32)));
      #1;
      ev32 = ls32 && ref_ovf(word_t'(d32), 32, a, OP_SLL);
      checks++;
      if (v32 !== ev32) begin failures++; $display("FAIL32 d=%h a=%0d ls=%b got %b", d32, a, ls32, v32); end
    end
    d8 = 8'b1010_0110; f8 = 8'b0011_1111; ls8 = 1'b1; #1;
    checks++;
    if (v8 !== 1'b1) begin failures++; $display("FAIL example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
