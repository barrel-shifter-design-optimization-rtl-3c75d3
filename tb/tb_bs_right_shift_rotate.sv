// tb_bs_right_shift_rotate: checks the right shifter/rotator with pad
// calculation and overflow levels. N = 8: every data value, amount, rotate
// and fill bit. N = 32: random. Expected dout: bit i takes din[i+amt], or
// din[i+amt-N] for a rotate, or the fill bit. Expected ovf_raw: some bit
// din[1..amt] (the bits that land on or pass position 0) differs from
// din[0]. Watchdog included.
module tb_bs_right_shift_rotate;
  int checks = 0;
  int failures = 0;

  logic [7:0]  d8, r8, e8;
  logic [2:0]  a8;
  logic        rot8, s8, v8, ev8;
  logic [31:0] d32, r32, e32;
  logic [4:0]  a32;
  logic        rot32, s32, v32, ev32;

  bs_right_shift_rotate #(.N(8)) dut8  (.din(d8), .amt(a8), .rotate(rot8), .s(s8), .dout(r8), .ovf_raw(v8));
  bs_right_shift_rotate          dut32 (.din(d32), .amt(a32), .rotate(rot32), .s(s32), .dout(r32), .ovf_raw(v32));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d32 = '0; a32 = '0; rot32 = 1'b0; s32 = 1'b0;
    for (int i = 0; i < 8192; i++) begin
      d8 = 8'(i); a8 = 3'(i >> 8); rot8 = i[11]; s8 = i[12];
      #1;
      ev8 = 1'b0;
      for (int b = 0; b < 8; b++) begin
        automatic int src = b + int'(a8);
        e8[b] = src < 8 ? d8[src] : (rot8 ? d8[src-8] : s8);
      end
      for (int b = 1; b <= int'(a8); b++) if (d8[b] != d8[0]) ev8 = 1'b1;
      checks += 2;
      if (r8 !== e8)  begin failures++; $display("FAIL8 d=%b a=%0d rot=%b s=%b got %b", d8, a8, rot8, s8, r8); end
      if (v8 !== ev8) begin failures++; $display("FAIL8 ovf d=%b a=%0d", d8, a8); end
    end
    for (int i = 0; i < 3000; i++) begin
      d32 = (i % 3 == 0) ? {31'(0), 1'(i)} - 32'(i[1]) : $urandom;
      a32 = 5'($urandom); rot32 = 1'($urandom); s32 = 1'($urandom);
      #1;
      ev32 = 1'b0;
      for (int b = 0; b < 32; b++) begin
        automatic int src = b + int'(a32);
        e32[b] = src < 32 ? d32[src] : (rot32 ? d32[src-32] : s32);
      end
      for (int b = 1; b <= int'(a32); b++) if (d32[b] != d32[0]) ev32 = 1'b1;
      checks += 2;
      if (r32 !== e32)  begin failures++; $display("FAIL32 d=%h a=%0d got %h", d32, a32, r32); end
      if (v32 !== ev32) begin failures++; $display("FAIL32 ovf d=%h a=%0d", d32, a32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
