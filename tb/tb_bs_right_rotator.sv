// tb_bs_right_rotator: checks the right rotator with and without the
// leading rotate-by-one row. N = 8: every data value and amount, and for
// PRE_ROT1 = 1 both values of rot1 (total rotation amt + rot1). N = 32:
// random words and amounts. Expected values from an index loop. Watchdog
// included.
module tb_bs_right_rotator;
  int checks = 0;
  int failures = 0;

  logic [7:0]  d8, r8a, r8b, e8;
  logic [2:0]  a8;
  logic        rot1;
  logic [31:0] d32, r32, e32;
  logic [4:0]  a32;

  bs_right_rotator #(.N(8))                  dut8a (.din(d8), .amt(a8), .rot1(1'b0), .dout(r8a));
  bs_right_rotator #(.N(8), .PRE_ROT1(1'b1)) dut8b (.din(d8), .amt(a8), .rot1(rot1), .dout(r8b));
  bs_right_rotator                           dut32 (.din(d32), .amt(a32), .rot1(1'b0), .dout(r32));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d32 = '0; a32 = '0;
    for (int i = 0; i < 4096; i++) begin
      d8 = 8'(i); a8 = 3'(i >> 8); rot1 = i[11];
      #1;
      for (int b = 0; b < 8; b++) e8[b] = d8[(b + int'(a8)) % 8];
      checks++;
      if (r8a !== e8) begin failures++; $display("FAIL8 d=%b a=%0d got %b", d8, a8, r8a); end
      for (int b = 0; b < 8; b++) e8[b] = d8[(b + int'(a8) + int'(rot1)) % 8];
      checks++;
      if (r8b !== e8) begin failures++; $display("FAIL8 rot1 d=%b a=%0d r1=%b got %b", d8, a8, rot1, r8b); end
    end
    for (int i = 0; i < 2000; i++) begin
      d32 = $urandom; a32 = 5'($urandom);
      #1;
      for (int b = 0; b < 32; b++) e32[b] = d32[(b + int'(a32)) % 32];
      checks++;
      if (r32 !== e32) begin failures++; $display("FAIL32 d=%h a=%0d got %h", d32, a32, r32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
