// tb_riq_sizes: the reuse-capable issue queue at 32, 128 and 256 entries.
//
// Runs the end-to-end program of tb_riq_core with the issue queue at the
// other sizes of the size sweep the design was evaluated with (64 entries
// is covered by tb_riq_top). Each instance checks every committed
// instruction against a sequential reference; this testbench also requires
// that each size enters Code_Reuse and gates the front end, and reports the
// share of gated cycles per size.
module tb_riq_sizes;
  logic d32, d128, d256;
  int c32, c128, c256, f32, f128, f256, y32, y128, y256, g32, g128, g256, r32, r128, r256;
  int checks, failures;

  tb_riq_core #(.IQ(32))  u32  (.done(d32),  .checks_o(c32),  .failures_o(f32),  .cycles_o(y32),  .gated_o(g32),  .reuse_o(r32));
  tb_riq_core #(.IQ(128)) u128 (.done(d128), .checks_o(c128), .failures_o(f128), .cycles_o(y128), .gated_o(g128), .reuse_o(r128));
  tb_riq_core #(.IQ(256)) u256 (.done(d256), .checks_o(c256), .failures_o(f256), .cycles_o(y256), .gated_o(g256), .reuse_o(r256));

  initial begin
    wait (d32 === 1'b1 && d128 === 1'b1 && d256 === 1'b1);
    checks   = c32 + c128 + c256 + 6;
    failures = f32 + f128 + f256;
    if (r32 == 0 || g32 == 0)   failures++;
    if (r128 == 0 || g128 == 0) failures++;
    if (r256 == 0 || g256 == 0) failures++;
    $display("gated cycles: 32 entries %0d%%, 128 entries %0d%%, 256 entries %0d%%",
             100 * g32 / y32, 100 * g128 / y128, 100 * g256 / y256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c32 + c128 + c256, f32 + f128 + f256 + 1);
    $finish;
  end
endmodule
