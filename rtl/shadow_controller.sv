// shadow_controller: sequences the continuous-shifting variant of the X-canceling MISR.
//
// Scan shifting never halts. When the interval counter reaches the last shift of a stretch,
// the MISR's signature (last slice included) is copied to the shadow register and the MISR is
// reset in the same clock, and the counter reloads from a pending-interval register. During
// the next stretch the controller takes, over the dedicated control channels, q selection
// vectors of m/b chunks each (one X-canceled bit compacted per vector) and then, in one more
// clock, the interval of the stretch after next into the pending register. Processing thus
// takes q*m/b + 1 clocks, and every stretch after the first must last at least that long;
// a signature that completes while the previous one is still being processed is an overrun,
// reported on overrun_o (sticky until the next start). Copy-and-reset and the need for enough
// dedicated channels follow the design; the pending register, the two-clock start-up and the
// interval value 0 that ends the session are this implementation's choices.
//
//   SH_IDLE --start_i--> SH_LOAD (counter <= 1st interval; 0 goes back to idle)
//   SH_LOADP : pending <= 2nd interval, reset MISR -> SH_RUN
//   SH_RUN   : shift; on the last shift copy/reset/reload; pending 0 -> SH_DRAIN
//   SH_DRAIN : no shifting; finish processing the last signature -> SH_IDLE
//
// Interface: val_i = tester channels (interval values), cnt_last_i from the interval counter;
// cnt_val_o is the value to load into the counter. Timing: one clock per state; asynchronous
// active-low reset to SH_IDLE.
module shadow_controller
  import xc_pkg::*;
#(
  parameter int unsigned M     = M_DEFAULT,
  parameter int unsigned B     = B_DEFAULT,
  parameter int unsigned Q     = Q_DEFAULT,
  parameter int unsigned CNT_W = CNT_W_DEFAULT
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             start_i,
  input  logic [CNT_W-1:0] val_i,
  input  logic             cnt_last_i,
  output sh_state_e        state_o,
  output logic             scan_en_o,     // scan chains shift, MISR compacts
  output logic             cnt_load_o,
  output logic [CNT_W-1:0] cnt_val_o,
  output logic             cnt_dec_o,
  output logic             misr_clr_o,
  output logic             shadow_load_o, // copy the MISR's next state to the shadow register
  output logic             sel_shift_o,
  output logic             xfree_en_o,
  output logic             xfree_clr_o,
  output logic             busy_o,        // a copied signature is being processed
  output logic             overrun_o
);

  localparam int unsigned CHUNKS = M / B;

  sh_state_e        state_q, state_d;
  logic [CNT_W-1:0] pend_q;
  logic             pend_load;
  logic             busy_q, pint_q, overrun_q;
  logic [15:0]      chunk_q, combo_q;
  logic             last_chunk, last_combo, capture, proc_done;
  logic [CNT_W-1:0] pend_now;

  assign last_chunk = (chunk_q == 16'(CHUNKS - 1));
  assign last_combo = (combo_q == 16'(Q - 1));
  assign capture    = (state_q == SH_RUN) && cnt_last_i;
  // Pending interval, bypassed from the channels when it arrives in the very clock it is needed.
  assign pend_now   = (busy_q && pint_q) ? val_i : pend_q;
  // Processing ends after the last vector when draining, else after the pending-load clock.
  assign proc_done  = busy_q && ((state_q == SH_DRAIN) ? (!pint_q && last_chunk && last_combo)
                                                       : pint_q);

  always_comb begin
    state_d       = state_q;
    scan_en_o     = 1'b0;
    cnt_load_o    = 1'b0;
    cnt_val_o     = val_i;
    cnt_dec_o     = 1'b0;
    misr_clr_o    = 1'b0;
    shadow_load_o = 1'b0;
    xfree_clr_o   = 1'b0;
    pend_load     = 1'b0;
    unique case (state_q)
      SH_IDLE: if (start_i) begin
        xfree_clr_o = 1'b1;
        state_d     = SH_LOAD;
      end
      SH_LOAD: begin
        cnt_load_o = 1'b1;
        misr_clr_o = 1'b1;
        state_d    = (val_i == '0) ? SH_IDLE : SH_LOADP;
      end
      SH_LOADP: begin
        pend_load  = 1'b1;
        misr_clr_o = 1'b1;
        state_d    = SH_RUN;
      end
      SH_RUN: begin
        scan_en_o = 1'b1;
        cnt_dec_o = 1'b1;
        if (capture) begin
          shadow_load_o = 1'b1;
          misr_clr_o    = 1'b1;
          cnt_load_o    = 1'b1;
          cnt_val_o     = pend_now;
          if (pend_now == '0) state_d = SH_DRAIN;
        end
      end
      SH_DRAIN: if (proc_done) state_d = SH_IDLE;
      default: state_d = SH_IDLE;
    endcase
    // The pending-load clock of the processing sequence.
    if (busy_q && pint_q && state_q == SH_RUN) pend_load = 1'b1;
  end

  assign sel_shift_o = busy_q && !pint_q;
  assign xfree_en_o  = busy_q && !pint_q && last_chunk;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= SH_IDLE;
      pend_q    <= '0;
      busy_q    <= 1'b0;
      pint_q    <= 1'b0;
      overrun_q <= 1'b0;
      chunk_q   <= '0;
      combo_q   <= '0;
    end else begin
      state_q <= state_d;
      if (pend_load) pend_q <= val_i;
      if (xfree_clr_o) overrun_q <= 1'b0;
      else if (capture && busy_q && !proc_done) overrun_q <= 1'b1;
      if (capture) begin
        // A new signature starts being processed (an unfinished one is abandoned).
        busy_q  <= 1'b1;
        pint_q  <= 1'b0;
        chunk_q <= '0;
        combo_q <= '0;
      end else if (busy_q) begin
        if (proc_done) begin
          busy_q <= 1'b0;
          pint_q <= 1'b0;
        end else if (!pint_q) begin
          chunk_q <= last_chunk ? '0 : chunk_q + 1'b1;
          if (last_chunk) begin
            combo_q <= last_combo ? '0 : combo_q + 1'b1;
            if (last_combo) pint_q <= 1'b1;
          end
        end
      end
    end
  end

  assign state_o   = state_q;
  assign busy_o    = busy_q;
  assign overrun_o = overrun_q;

  initial begin
    assert (B >= 1 && M % B == 0) else $error("shadow_controller: M must be a multiple of B");
    assert (Q >= 1) else $error("shadow_controller: q must be at least 1");
  end

endmodule
