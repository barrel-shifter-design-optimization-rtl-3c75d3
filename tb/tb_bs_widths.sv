// tb_bs_widths: runs every combinational barrel shifter design at each data
// width the designs were sized for, 8, 16, 32, 64 and 128 bits, through
// bs_width_checker (random operations against the bit-level model).
// Watchdog: 1000000 time units.
module tb_bs_widths;
  int   c8, c16, c32, c64, c128;
  int   f8, f16, f32, f64, f128;
  logic d8, d16, d32, d64, d128;
  int   checks, failures;

  bs_width_checker #(.N(8))   w8   (.checks(c8),   .failures(f8),   .done(d8));
  bs_width_checker #(.N(16))  w16  (.checks(c16),  .failures(f16),  .done(d16));
  bs_width_checker #(.N(32))  w32  (.checks(c32),  .failures(f32),  .done(d32));
  bs_width_checker #(.N(64))  w64  (.checks(c64),  .failures(f64),  .done(d64));
  bs_width_checker #(.N(128)) w128 (.checks(c128), .failures(f128), .done(d128));

  initial begin
    #1_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32 + c64 + c128, f8 + f16 + f32 + f64 + f128 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d8 && d16 && d32 && d64 && d128);
    checks   = c8 + c16 + c32 + c64 + c128;
    failures = f8 + f16 + f32 + f64 + f128;
    $display("width 8: %0d checks, 16: %0d, 32: %0d, 64: %0d, 128: %0d", c8, c16, c32, c64, c128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
