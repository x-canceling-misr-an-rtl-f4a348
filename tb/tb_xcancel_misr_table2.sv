// tb_xcancel_misr_table2: runs the X-canceling MISR (256-bit MISR, 16 channels, halting
// scheme) on four of the evaluated configurations of X density, scan chain count and q at
// once, each with its own instance of the design and of xc_e2e_bench:
//   2048 chains at 0.001% X's, q = 12     128 chains at 0.05% X's, q = 9
//     64 chains at 0.1%   X's, q = 7       16 chains at 0.5%  X's, q = 12
// Each runs a fault-free session and a session with injected errors; all must pass.
module tb_xcancel_misr_table2;
  xc_e2e_bench #(.USE_DEFAULTS(1'b0), .N(2048), .M(256), .Q(12), .B(16), .PPM_A(10),
                 .PPM_B(10), .GOOD_SIGS(3), .BAD_SIGS(3)) b0 ();
  xc_e2e_bench #(.USE_DEFAULTS(1'b0), .N(128), .M(256), .Q(9), .B(16), .PPM_A(500),
                 .PPM_B(500), .GOOD_SIGS(3), .BAD_SIGS(3)) b1 ();
  xc_e2e_bench #(.USE_DEFAULTS(1'b0), .N(64), .M(256), .Q(7), .B(16), .PPM_A(1000),
                 .PPM_B(1000), .GOOD_SIGS(3), .BAD_SIGS(3)) b2 ();
  xc_e2e_bench #(.USE_DEFAULTS(1'b0), .N(16), .M(256), .Q(12), .B(16), .PPM_A(5000),
                 .PPM_B(5000), .GOOD_SIGS(3), .BAD_SIGS(3)) b3 ();

  initial begin
    wait (b0.done && b1.done && b2.done && b3.done);
    $display("TB_RESULT checks=%0d failures=%0d", b0.checks + b1.checks + b2.checks + b3.checks,
             b0.failures + b1.failures + b2.failures + b3.failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (3000000) @(posedge b0.clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", b0.checks + b1.checks + b2.checks + b3.checks,
             1 + b0.failures + b1.failures + b2.failures + b3.failures);
    $finish;
  end
endmodule
