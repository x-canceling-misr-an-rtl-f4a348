// tb_prog_xor: self-checking test of the programmable XOR network.
//
// Applies random signatures and selection vectors, plus one-hot and all-ones selections, and
// compares the output with a parity computed bit by bit in the testbench. Also reproduces a
// small X-cancellation: three signature bits that depend on the same X combine to a value that
// does not change when the X flips.
module tb_prog_xor;
  localparam int unsigned M = 256;
  logic [M-1:0] sig, sel;
  logic y;
  int checks = 0, failures = 0;

  prog_xor #(.M(M)) dut (.sig_i(sig), .sel_i(sel), .x_free_o(y));

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int w = 0; w < M / 32; w++) r[w*32 +: 32] = $urandom;
    return r;
  endfunction

  function automatic logic parity(logic [M-1:0] s, logic [M-1:0] e);
    logic p = 0;
    for (int i = 0; i < M; i++) if (e[i]) p = p ^ s[i];
    return p;
  endfunction

  task automatic check(logic exp, string what);
    checks++;
    if (y !== exp) begin failures++; $display("FAIL %s: y=%b exp=%b", what, y, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      sig = rnd(); sel = rnd();
      #1 check(parity(sig, sel), "random");
    end
    for (int i = 0; i < M; i++) begin
      sig = rnd(); sel = '0; sel[i] = 1'b1;
      #1 check(sig[i], "one-hot");
    end
    sig = rnd(); sel = '1;
    #1 check(^sig, "all");
    // X cancellation: bits 1 and 5 both carry the same unknown x, bit 3 does not; selecting
    // bits 1, 3 and 5 gives 0 ^ 1 ^ 1 = 0 whichever value x takes.
    for (int x = 0; x < 2; x++) begin
      sig = rnd();
      sig[1] = 1'b0 ^ x[0]; sig[3] = 1'b1; sig[5] = 1'b1 ^ x[0];
      sel = '0; sel[1] = 1'b1; sel[3] = 1'b1; sel[5] = 1'b1;
      #1 check(1'b1 ^ 1'b1 ^ 1'b0, "x canceled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
