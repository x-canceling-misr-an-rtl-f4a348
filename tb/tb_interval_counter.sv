// tb_interval_counter: self-checking test of the interval counter.
//
// Loads random intervals and decrements with random gaps; checks the count against a model
// every clock, that last_o rises exactly on the final shift of an interval (count <= 1), that
// the counter stays at 0, and that zero_o flags a zero value on the load input.
module tb_interval_counter;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, load = 0, dec = 0;
  logic [W-1:0] val = '0, count;
  logic last, zero;
  int checks = 0, failures = 0;
  int model = 0;

  interval_counter #(.W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .load_i(load), .val_i(val),
                                 .dec_i(dec), .count_o(count), .last_o(last), .zero_o(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int shifts;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      load = 1; val = W'(($urandom % 3 == 0) ? $urandom % 4 : $urandom % 300); dec = 0;
      #1;
      checks++;
      if (zero !== (val == 0)) begin failures++; $display("FAIL zero flag"); end
      @(posedge clk); #1;
      model = val; load = 0;
      shifts = 0;
      // Shift until the counter says this is the last shift, then once more past zero.
      while (1) begin
        dec = ($urandom % 3) != 0;
        #1;
        checks++;
        if (count !== W'(model) || last !== (model <= 1)) begin
          failures++;
          $display("FAIL count=%0d model=%0d last=%b", count, model, last);
        end
        if (dec) begin
          shifts++;
          if (model > 0) model--;
          if (last) begin @(posedge clk); #1; break; end
        end
        @(posedge clk); #1;
      end
      checks++;
      if (shifts != ((val == 0) ? 1 : int'(val)) || count !== 0) begin
        failures++;
        $display("FAIL interval %0d gave %0d shifts, count %0d", val, shifts, count);
      end
      dec = 1; @(posedge clk); #1 dec = 0;
      checks++;
      if (count !== 0) begin failures++; $display("FAIL wrapped below zero"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
