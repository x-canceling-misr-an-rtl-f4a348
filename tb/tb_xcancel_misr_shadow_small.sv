// tb_xcancel_misr_shadow_small: end-to-end test of the continuous-shifting variant at reduced
// size: 32 scan chains, 64-bit MISR, q = 7, 16 channels, 16-bit X-free MISR.
module tb_xcancel_misr_shadow_small;
  xc_e2e_bench #(.USE_DEFAULTS(1'b0), .SHADOW(1'b1), .N(32), .M(64), .Q(7), .B(16), .XF_M(16),
                 .TAPS(3), .PPM_A(5000), .PPM_B(10000), .GOOD_SIGS(20), .BAD_SIGS(20)) bench ();

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
