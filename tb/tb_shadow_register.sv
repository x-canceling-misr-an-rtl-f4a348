// tb_shadow_register: self-checking test of the shadow register: random load strobes and data;
// the held value must change only on a load and then equal the data of that clock.
module tb_shadow_register;
  localparam int unsigned M = 256;
  logic clk = 0, rst_n = 0, load = 0;
  logic [M-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  shadow_register #(.M(M)) dut (.clk_i(clk), .rst_ni(rst_n), .load_i(load), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      for (int w = 0; w < M / 32; w++) d[w*32 +: 32] = $urandom;
      load = ($urandom % 3) == 0;
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
