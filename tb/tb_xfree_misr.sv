// tb_xfree_misr: self-checking test of the single-input X-free signature register.
//
// Compacts random bit streams with random enables and clears and compares every clock with a
// reference model written here from the polynomial x^32 + x^22 + x^2 + x + 1. Also checks that
// a single flipped input bit always changes the final signature.
module tb_xfree_misr;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 0, en = 0, clr = 0, d = 0;
  logic [W-1:0] sig, ref_sig;
  int checks = 0, failures = 0;

  xfree_misr #(.W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .clr_i(clr), .d_i(d),
                           .sig_o(sig));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] step(logic [W-1:0] s, logic din);
    logic [W-1:0] n;
    n = s << 1;
    if (s[W-1]) n = n ^ 32'h0040_0007;   // terms x^22, x^2, x^1, x^0
    n[0] = n[0] ^ din;
    return n;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [99:0] stream;
    logic [W-1:0] good;
    ref_sig = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      d = $urandom; en = ($urandom % 4) != 0; clr = ($urandom % 200) == 0;
      @(posedge clk);
      if (clr) ref_sig = '0; else if (en) ref_sig = step(ref_sig, d);
      #1;
      checks++;
      if (sig !== ref_sig) begin failures++; $display("FAIL sig=%h exp=%h", sig, ref_sig); end
    end
    for (int w = 0; w < 4; w++) stream[w*32 +: 32] = $urandom;
    for (int flip = -1; flip < 100; flip++) begin
      clr = 1; en = 0; @(posedge clk); #1 clr = 0; en = 1;
      for (int i = 0; i < 100; i++) begin
        d = stream[i] ^ (i == flip);
        @(posedge clk); #1;
      end
      en = 0;
      if (flip < 0) good = sig;
      else begin
        checks++;
        if (sig === good) begin failures++; $display("FAIL error at bit %0d aliased", flip); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
