// tb_xcancel_misr_top: end-to-end test of the X-canceling MISR at its default size
// (512 scan chains, 256-bit MISR, q = 12, 16 tester channels, 32-bit X-free MISR), halting
// scheme. See xc_e2e_bench for what is generated and checked.
module tb_xcancel_misr_top;
  xc_e2e_bench #(.USE_DEFAULTS(1'b1), .GOOD_SIGS(12), .BAD_SIGS(12)) bench ();

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
