// halt_controller: sequences a test session of the X-canceling MISR with halted scan shifting.
//
// The MISR compacts scan data until it holds its budget of X's, known off line and expressed
// as a number of shift cycles in the interval counter. Scan shifting then halts, and the
// tester channels carry q selection vectors of m bits, b bits per clock; each completed vector
// yields one X-canceled bit that is compacted in the X-free MISR. One more halted clock loads
// the interval counter for the next stretch and resets the MISR, and shifting resumes. A halt
// therefore lasts q*m/b + 1 clocks, as the design states. The state machine, the start input
// and the use of interval value 0 to end the session are this implementation's choices.
//
//   ST_IDLE  --start_i-->  ST_LOAD (clears the X-free MISR on the way)
//   ST_LOAD  : load interval counter, reset MISR; -> ST_SHIFT, or ST_IDLE if the value is 0
//   ST_SHIFT : scan_en_o, MISR compacts, counter counts; after the last shift -> ST_SEL
//   ST_SEL   : m/b chunks per vector, q vectors; after the last chunk of the last -> ST_LOAD
//
// Interface: cnt_last_i / cnt_zero_i from the interval counter; strobes for every datapath
// block; combo_o and chunk_o give the position inside a halt. Timing: one state per clock;
// asynchronous active-low reset to ST_IDLE.
module halt_controller
  import xc_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT,
  parameter int unsigned B = B_DEFAULT,
  parameter int unsigned Q = Q_DEFAULT
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  input  logic        cnt_last_i,
  input  logic        cnt_zero_i,
  output xc_state_e   state_o,
  output logic        scan_en_o,    // scan chains shift, MISR compacts
  output logic        cnt_load_o,   // interval counter loads from the channels
  output logic        cnt_dec_o,    // interval counter counts one shift
  output logic        misr_clr_o,   // MISR reset after an intermediate signature
  output logic        sel_shift_o,  // selection register takes a chunk from the channels
  output logic        xfree_en_o,   // a selection vector is complete: compact its X-free bit
  output logic        xfree_clr_o,  // new session: clear the X-free MISR
  output logic [15:0] combo_o,      // X-canceled combination within the halt
  output logic [15:0] chunk_o       // chunk within the selection vector
);

  localparam int unsigned CHUNKS = M / B;

  xc_state_e   state_q, state_d;
  logic [15:0] chunk_q, combo_q;
  logic        last_chunk, last_combo;

  assign last_chunk = (chunk_q == 16'(CHUNKS - 1));
  assign last_combo = (combo_q == 16'(Q - 1));

  always_comb begin
    state_d     = state_q;
    scan_en_o   = 1'b0;
    cnt_load_o  = 1'b0;
    cnt_dec_o   = 1'b0;
    misr_clr_o  = 1'b0;
    sel_shift_o = 1'b0;
    xfree_en_o  = 1'b0;
    xfree_clr_o = 1'b0;
    unique case (state_q)
      ST_IDLE: if (start_i) begin
        xfree_clr_o = 1'b1;
        state_d     = ST_LOAD;
      end
      ST_LOAD: begin
        cnt_load_o = 1'b1;
        misr_clr_o = 1'b1;
        state_d    = cnt_zero_i ? ST_IDLE : ST_SHIFT;
      end
      ST_SHIFT: begin
        scan_en_o = 1'b1;
        cnt_dec_o = 1'b1;
        if (cnt_last_i) state_d = (Q == 0) ? ST_LOAD : ST_SEL;
      end
      ST_SEL: begin
        sel_shift_o = 1'b1;
        xfree_en_o  = last_chunk;
        if (last_chunk && last_combo) state_d = ST_LOAD;
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= ST_IDLE;
      chunk_q <= '0;
      combo_q <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == ST_SEL) begin
        chunk_q <= last_chunk ? '0 : chunk_q + 1'b1;
        if (last_chunk) combo_q <= last_combo ? '0 : combo_q + 1'b1;
      end else begin
        chunk_q <= '0;
        combo_q <= '0;
      end
    end
  end

  assign state_o = state_q;
  assign combo_o = combo_q;
  assign chunk_o = chunk_q;

  initial begin
    assert (B >= 1 && M % B == 0) else $error("halt_controller: M must be a multiple of B");
    assert (M / B <= 65536 && Q <= 65536) else $error("halt_controller: counters too narrow");
  end

  // Scan data is never compacted while control data is on the channels.
  a_no_shift_in_halt: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                       !(scan_en_o && sel_shift_o));

endmodule
