// tb_xcancel_misr_small: end-to-end test of a reduced X-canceling MISR: 32 scan chains into a
// 64-bit MISR (fewer chains than MISR inputs), q = 7, 16 tester channels, 16-bit X-free MISR,
// X densities 0.5% and 1%, with more intermediate signatures than the full-size test.
module tb_xcancel_misr_small;
  xc_e2e_bench #(.USE_DEFAULTS(1'b0), .N(32), .M(64), .Q(7), .B(16), .XF_M(16), .TAPS(3),
                 .PPM_A(5000), .PPM_B(10000), .GOOD_SIGS(20), .BAD_SIGS(20)) bench ();

  initial begin
    wait (bench.done);
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (3000000) @(posedge bench.clk);
    bench.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures);
    $finish;
  end
endmodule
