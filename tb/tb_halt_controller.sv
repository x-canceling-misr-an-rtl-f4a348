// tb_halt_controller: self-checking test of the session sequencer.
//
// Plays the interval counter (a model in the testbench) and the tester. For random intervals
// it checks, clock by clock, that: scan shifting lasts exactly the loaded number of clocks;
// the halt then lasts q*m/b + 1 clocks (q*m/b selection clocks plus the load clock); an
// X-free bit is strobed on the last chunk of each of the q vectors and nowhere else; the MISR
// is reset and the counter loaded only in the load clock; and interval 0 ends the session.
module tb_halt_controller;
  import xc_pkg::*;
  localparam int unsigned M = 32, B = 8, Q = 3, CH = M / B;
  logic clk = 0, rst_n = 0, start = 0, cnt_last, cnt_zero;
  xc_state_e st;
  logic scan_en, cnt_load, cnt_dec, misr_clr, sel_shift, xf_en, xf_clr;
  logic [15:0] combo, chunk;
  int checks = 0, failures = 0;
  int cnt = 0, next_val = 0;
  int n_halts = 0;

  halt_controller #(.M(M), .B(B), .Q(Q)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .cnt_last_i(cnt_last),
    .cnt_zero_i(cnt_zero), .state_o(st), .scan_en_o(scan_en), .cnt_load_o(cnt_load),
    .cnt_dec_o(cnt_dec), .misr_clr_o(misr_clr), .sel_shift_o(sel_shift), .xfree_en_o(xf_en),
    .xfree_clr_o(xf_clr), .combo_o(combo), .chunk_o(chunk));

  assign cnt_last = (cnt <= 1);
  assign cnt_zero = (next_val == 0);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (cnt_load) cnt <= next_val;
    else if (cnt_dec && cnt > 0) cnt <= cnt - 1;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ivals [6] = '{5, 1, 17, 2, 40, 0};
    int shifts, halt_len, strobes;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) begin
      @(posedge clk); #1;
      expect_true(st == ST_IDLE && !scan_en && !sel_shift, "idle before start");
    end
    start = 1; #1 expect_true(xf_clr, "x-free clear on start");
    @(posedge clk); #1 start = 0;
    for (int k = 0; k < 6; k++) begin
      // Load clock: closes the previous halt (if any) and loads the next interval.
      next_val = ivals[k];
      #1 expect_true(st == ST_LOAD && cnt_load && misr_clr && !scan_en && !sel_shift,
                     "load clock");
      if (k > 0) begin
        halt_len++;
        n_halts++;
        expect_true(halt_len == Q * M / B + 1, $sformatf("halt length %0d", halt_len));
        expect_true(strobes == Q, "q X-free bits per halt");
      end
      @(posedge clk); #1;
      if (ivals[k] == 0) begin
        expect_true(st == ST_IDLE && !scan_en, "interval 0 ends the session");
        break;
      end
      shifts = 0;
      while (scan_en) begin
        shifts++;
        expect_true(!sel_shift && !xf_en && !misr_clr && cnt_dec, "shift clock");
        @(posedge clk); #1;
      end
      expect_true(shifts == ivals[k], $sformatf("shift count %0d vs %0d", shifts, ivals[k]));
      halt_len = 0; strobes = 0;
      while (st == ST_SEL) begin
        halt_len++;
        expect_true(sel_shift && !cnt_load && !scan_en, "selection clock");
        expect_true(xf_en == (halt_len % CH == 0), "x-free strobe placement");
        expect_true(chunk == 16'((halt_len - 1) % CH) && combo == 16'((halt_len - 1) / CH),
                    "chunk/combination position");
        strobes += int'(xf_en);
        @(posedge clk); #1;
      end
    end
    expect_true(n_halts >= 3, "several halts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
