// tb_misr: self-checking test of the m-bit MISR.
//
// Drives random input words with random enable and clear, and compares the signature every
// clock with a reference model written independently here: the MISR as a matrix over GF(2),
// next = (shift-up with feedback of the top bit into every polynomial term) XOR input, using the
// polynomial terms listed below. Also checks linearity: the signature of (a XOR b) equals the
// XOR of the signatures of a and b, which is the property X cancellation relies on.
module tb_misr;
  localparam int unsigned M = 256;
  // Terms of x^256 + x^254 + x^251 + x^246 + 1.
  localparam int unsigned TAPS [3] = '{254, 251, 246};

  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [M-1:0] d = '0, sig;
  logic [M-1:0] ref_sig;
  int checks = 0, failures = 0;

  misr #(.M(M)) dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .clr_i(clr), .d_i(d), .sig_o(sig));

  always #5 clk = ~clk;

  function automatic logic [M-1:0] step(logic [M-1:0] s, logic [M-1:0] din);
    logic [M-1:0] n;
    logic fb;
    fb = s[M-1];
    for (int k = M - 1; k >= 1; k--) n[k] = s[k-1];
    n[0] = fb;
    foreach (TAPS[t]) n[TAPS[t]] ^= fb;
    return n ^ din;
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int w = 0; w < M / 32; w++) r[w*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic check(string what);
    checks++;
    if (sig !== ref_sig) begin
      failures++;
      $display("FAIL %s: sig=%h exp=%h", what, sig, ref_sig);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] a [40], b [40], sa, sb, sab;
    ref_sig = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 check("after reset");
    // Random operation.
    for (int i = 0; i < 2000; i++) begin
      d   = rnd();
      en  = ($urandom % 8) != 0;
      clr = ($urandom % 97) == 0;
      @(posedge clk);
      if (clr) ref_sig = '0;
      else if (en) ref_sig = step(ref_sig, d);
      #1 check("random");
    end
    // Linearity: sig(a^b) == sig(a) ^ sig(b) over a 40-word sequence.
    for (int i = 0; i < 40; i++) begin a[i] = rnd(); b[i] = rnd(); end
    for (int pass = 0; pass < 3; pass++) begin
      clr = 1; en = 0; @(posedge clk); #1 clr = 0; en = 1;
      for (int i = 0; i < 40; i++) begin
        d = (pass == 0) ? a[i] : (pass == 1) ? b[i] : (a[i] ^ b[i]);
        @(posedge clk); #1;
      end
      en = 0;
      if (pass == 0) sa = sig; else if (pass == 1) sb = sig; else sab = sig;
    end
    checks++;
    if (sab !== (sa ^ sb)) begin failures++; $display("FAIL linearity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
