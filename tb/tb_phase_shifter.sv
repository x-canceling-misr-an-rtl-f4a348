// tb_phase_shifter: self-checking test of the linear phase shifter.
//
// For every scan chain alone set to 1 the output must have exactly TAPS ones, one of them on
// MISR input (chain mod M), and the chain's ones must sit exactly where the wiring table of
// xc_pkg::ps_tap puts them. Random words then check linearity: out(a ^ b) = out(a) ^ out(b),
// and out(a) equals the XOR of the single-chain responses of the chains set in a.
module tb_phase_shifter;
  import xc_pkg::*;
  localparam int unsigned N = 512, M = 256, TAPS = 3;
  logic [N-1:0] ch;
  logic [M-1:0] out;
  logic [M-1:0] col [N];
  int checks = 0, failures = 0;

  phase_shifter #(.N(N), .M(M), .TAPS(TAPS)) dut (.chains_i(ch), .misr_d_o(out));

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int w = 0; w < N / 32; w++) r[w*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic expect_eq(logic [M-1:0] got, logic [M-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] e, oa, ob;
    logic [N-1:0] a, b;
    ch = '0;
    #1 expect_eq(out, '0, "zero in");
    for (int i = 0; i < N; i++) begin
      ch = '0; ch[i] = 1'b1;
      #1 col[i] = out;
      checks++;
      if ($countones(out) != TAPS || out[i % M] !== 1'b1) begin
        failures++;
        $display("FAIL chain %0d: %0d taps, own input %b", i, $countones(out), out[i % M]);
      end
      e = '0;
      for (int t = 0; t < TAPS; t++) e[ps_tap(M, TAPS, i, t)] = 1'b1;
      expect_eq(out, e, "wiring");
    end
    for (int k = 0; k < 300; k++) begin
      a = rnd(); b = rnd();
      ch = a;     #1 oa = out;
      ch = b;     #1 ob = out;
      ch = a ^ b; #1 expect_eq(out, oa ^ ob, "linearity");
      e = '0;
      for (int i = 0; i < N; i++) if (a[i]) e ^= col[i];
      expect_eq(oa, e, "superposition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
