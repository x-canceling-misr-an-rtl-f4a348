// tb_xcancel_misr_e2e: end-to-end test of both control schemes of the X-canceling MISR at the
// default sizes (512 scan chains, 256-bit MISR, q = 12, 16 tester channels, 32-bit X-free
// MISR), each with its own instance of the design and of xc_e2e_bench, run side by side:
//   halt   - scan shifting halts while each intermediate signature is read out
//   shadow - continuous shifting with a shadow register, including a session whose stretches
//            are too short for the processing, which must raise the overrun flag
// See xc_e2e_bench for what is generated and checked.
module tb_xcancel_misr_e2e;
  xc_e2e_bench #(.USE_DEFAULTS(1'b1), .GOOD_SIGS(12), .BAD_SIGS(12)) halt ();
  xc_e2e_bench #(.USE_DEFAULTS(1'b0), .SHADOW(1'b1), .GOOD_SIGS(6), .BAD_SIGS(6)) shadow ();

  initial begin
    wait (halt.done && shadow.done);
    $display("TB_RESULT checks=%0d failures=%0d", halt.checks + shadow.checks,
             halt.failures + shadow.failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (3000000) @(posedge halt.clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", halt.checks + shadow.checks,
             1 + halt.failures + shadow.failures);
    $finish;
  end
endmodule
