// tb_shadow_controller: self-checking test of the continuous-shifting sequencer.
//
// Plays the interval counter (a model here) and the tester. Checks the start-up (first
// interval into the counter, second into the pending register, MISR reset), that shifting is
// continuous across signature boundaries, that at the last shift of each stretch the
// signature is copied, the MISR reset and the counter reloaded with the pending interval,
// that processing then takes q*m/b selection clocks with an X-free strobe on each last chunk
// plus one pending-interval clock, that interval 0 drains and returns to idle, and that a
// stretch shorter than the processing raises the overrun flag.
module tb_shadow_controller;
  import xc_pkg::*;
  localparam int unsigned M = 32, B = 8, Q = 2, CH = M / B, W = 16, PROC = Q * CH + 1;
  logic clk = 0, rst_n = 0, start = 0, cnt_last;
  logic [W-1:0] val = '0, cnt_val;
  sh_state_e st;
  logic scan_en, cnt_load, cnt_dec, misr_clr, sh_load, sel_shift, xf_en, xf_clr, busy, overrun;
  int checks = 0, failures = 0;
  int cnt = 0;

  shadow_controller #(.M(M), .B(B), .Q(Q), .CNT_W(W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .val_i(val), .cnt_last_i(cnt_last),
    .state_o(st), .scan_en_o(scan_en), .cnt_load_o(cnt_load), .cnt_val_o(cnt_val),
    .cnt_dec_o(cnt_dec), .misr_clr_o(misr_clr), .shadow_load_o(sh_load),
    .sel_shift_o(sel_shift), .xfree_en_o(xf_en), .xfree_clr_o(xf_clr), .busy_o(busy),
    .overrun_o(overrun));

  assign cnt_last = (cnt <= 1);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (cnt_load) cnt <= int'(cnt_val);
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

  // Runs a session with the given intervals (0 appended) and checks it clock by clock.
  task automatic run(int unsigned iv [$]);
    int unsigned n, clk_in_proc, proc_sig, strobes;
    bit proc;
    n = iv.size();
    iv.push_back(0);
    start = 1;
    #1 expect_true(xf_clr, "X-free clear on start");
    @(posedge clk); #1 start = 0;
    val = W'(iv[0]);
    #1 expect_true(st == SH_LOAD && cnt_load && misr_clr && !scan_en, "first interval");
    @(posedge clk); #1;
    val = W'(iv[1]);
    #1 expect_true(st == SH_LOADP && !cnt_load && misr_clr && !scan_en, "second interval");
    @(posedge clk); #1;
    proc = 0; clk_in_proc = 0; strobes = 0; proc_sig = 0;
    for (int unsigned s = 0; s < n; s++) begin
      for (int unsigned c = 0; c < iv[s]; c++) begin
        // Tester: during processing of signature s-1 the pending clock carries iv[s+1].
        val = (proc && clk_in_proc == PROC - 1) ? W'(iv[s+1]) : W'($urandom % 7 + 50);
        #1;
        expect_true(scan_en && st == SH_RUN, "continuous shifting");
        expect_true(sh_load == (c == iv[s] - 1), "copy only on the last shift");
        if (c == iv[s] - 1) begin
          expect_true(misr_clr && cnt_load && cnt_val == W'(iv[s+1]), "reset and reload");
        end
        if (proc) begin
          expect_true(busy, "busy while processing");
          if (clk_in_proc < PROC - 1) begin
            expect_true(sel_shift && xf_en == ((clk_in_proc % CH) == CH - 1), "selection");
            strobes += int'(xf_en);
          end else begin
            expect_true(!sel_shift && !xf_en, "pending clock");
          end
          clk_in_proc++;
          if (clk_in_proc == PROC) proc = 0;
        end else begin
          expect_true(!sel_shift && !xf_en, "no selection when idle");
        end
        @(posedge clk); #1;
      end
      // Processing of signature s starts now.
      proc = 1; clk_in_proc = 0;
      proc_sig++;
    end
    // Drain: the last signature is processed without shifting and without a pending clock.
    for (int unsigned c = 0; c < Q * CH; c++) begin
      #1 expect_true(!scan_en && st == SH_DRAIN && sel_shift &&
                     xf_en == ((c % CH) == CH - 1), "drain");
      strobes += int'(xf_en);
      @(posedge clk); #1;
    end
    expect_true(st == SH_IDLE && !busy && !scan_en, "idle after drain");
    expect_true(strobes == int'(Q * n), $sformatf("X-free strobes %0d", strobes));
    expect_true(!overrun, "no overrun");
  endtask

  initial begin
    int unsigned iv [$];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    expect_true(st == SH_IDLE && !scan_en, "idle after reset");
    run('{3, PROC, 20, PROC + 3, 12});
    run('{5});
    run('{PROC, PROC, PROC});
    // Too short: the second signature arrives while the first is being processed.
    start = 1; @(posedge clk); #1 start = 0;
    val = 4; @(posedge clk); #1;
    val = 4; @(posedge clk); #1;
    val = 9;
    repeat (10) @(posedge clk);
    #1 expect_true(overrun, "overrun flagged");
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    expect_true(!overrun && st == SH_IDLE, "reset clears overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
