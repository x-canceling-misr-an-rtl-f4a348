// tb_sel_shift_reg: self-checking test of the selection-vector shift register.
//
// Sends random m-bit vectors as m/b chunks of b bits, first chunk first, and checks that on the
// clock of the last chunk the presented vector equals the whole vector, with the first chunk in
// bits [b-1:0]. Idle clocks between chunks must not disturb the register. Counts that each
// vector takes exactly m/b shifting clocks.
module tb_sel_shift_reg;
  localparam int unsigned M = 256, B = 16, CH = M / B;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [B-1:0] ch = '0;
  logic [M-1:0] sel;
  int checks = 0, failures = 0;

  sel_shift_reg #(.M(M), .B(B)) dut (.clk_i(clk), .rst_ni(rst_n), .shift_i(shift), .ch_i(ch),
                                     .sel_o(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] v;
    int shifts;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      for (int w = 0; w < M / 32; w++) v[w*32 +: 32] = $urandom;
      shifts = 0;
      for (int c = 0; c < CH; c++) begin
        while ($urandom % 4 == 0) begin   // idle clock
          shift = 0; ch = B'($urandom);
          @(posedge clk); #1;
        end
        shift = 1; ch = v[c*B +: B];
        shifts++;
        if (c == CH - 1) begin
          #1;
          checks++;
          if (sel !== v || shifts != CH) begin
            failures++;
            $display("FAIL vector %0d: %h vs %h (%0d shifts)", n, sel, v, shifts);
          end
        end
        @(posedge clk); #1;
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
