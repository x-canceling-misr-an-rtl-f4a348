// xcancel_misr_top: X-canceling MISR, an X-tolerant output response compactor.
//
// Scan outputs that may hold unknown (X) values pass through a linear phase shifter into an
// m-bit MISR. No X is masked at the MISR input. Off line, symbolic simulation expresses every
// signature bit as an XOR of the X's, and Gauss-Jordan elimination finds combinations of
// signature bits in which all X's cancel. After each stretch of shifting that brings at most
// m-q X's into the MISR, scan shifting halts; the tester sends q selection vectors of m bits
// over its b stimulus channels; a programmable XOR turns each vector into one deterministic
// bit, which the X-free MISR compacts. The interval counter is then reloaded, the MISR reset,
// and shifting resumes. At the end of the test the X-free signature is compared with its
// fault-free value; each X-canceled bit is also brought out (xc_bit_o/xc_valid_o) for a design
// that sends it to the tester instead of keeping the X-free MISR.
//
// Interface:
//   chains_i[N]  scan chain outputs of the circuit under test, sampled on shift clocks
//   scan_en_o    shift enable for the scan chains (low while halted)
//   ch_i[B]      tester channels: control data while halted (the stimulus they carry while
//                shifting goes to the scan inputs, outside this block)
//   start_i      begins a session; the interval for the first stretch is on ch_i next clock
//   xfree_sig_o  X-free signature; sig_o the intermediate signature the programmable XOR
//                reads (the MISR, or its shadow copy), for observation
// Timing: one scan slice per shift clock; each halt lasts q*m/b + 1 clocks. Interval value 0
// ends the session. Defaults: m = 256, q = 12 (the design's example); N, b, the X-free width
// and the phase shifter wiring are this implementation's choices.
//
// SHADOW = 1 selects the continuous-shifting variant instead: a shadow register takes each
// completed signature while the MISR restarts, scan shifting never halts, and ch_i become
// channels dedicated to control data (see shadow_controller). busy_o shows that a copied
// signature is being processed; overrun_o that one arrived before the last was finished. With
// SHADOW = 0 overrun_o is tied low: a halted scan cannot overrun the readout.
module xcancel_misr_top
  import xc_pkg::*;
#(
  parameter int unsigned N       = N_DEFAULT,
  parameter int unsigned M       = M_DEFAULT,
  parameter int unsigned Q       = Q_DEFAULT,
  parameter int unsigned B       = B_DEFAULT,
  parameter int unsigned CNT_W   = CNT_W_DEFAULT,
  parameter int unsigned XF_M    = XF_M_DEFAULT,
  parameter int unsigned PS_TAPS = PS_TAPS_DEFAULT,
  parameter bit          SHADOW  = 1'b0
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            start_i,
  input  logic [N-1:0]    chains_i,
  input  logic [B-1:0]    ch_i,
  output logic            scan_en_o,
  output xc_state_e       state_o,
  output logic            xc_bit_o,
  output logic            xc_valid_o,
  output logic            busy_o,
  output logic            overrun_o,
  output logic [M-1:0]    sig_o,
  output logic [XF_M-1:0] xfree_sig_o
);

  logic [M-1:0]     misr_d, misr_sig, misr_nxt, xor_src, sel;
  logic             x_free, scan_en;
  logic             cnt_load, cnt_dec, cnt_last, cnt_zero;
  logic             misr_clr, sel_shift, xfree_en, xfree_clr;
  logic [CNT_W-1:0] count, cnt_val;

  phase_shifter #(.N(N), .M(M), .TAPS(PS_TAPS)) u_ps (
    .chains_i (chains_i),
    .misr_d_o (misr_d)
  );

  misr #(.M(M)) u_misr (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .en_i   (scan_en),
    .clr_i  (misr_clr),
    .d_i    (misr_d),
    .sig_o  (misr_sig),
    .nxt_o  (misr_nxt)
  );

  sel_shift_reg #(.M(M), .B(B)) u_sel (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .shift_i (sel_shift),
    .ch_i    (ch_i),
    .sel_o   (sel)
  );

  prog_xor #(.M(M)) u_pxor (
    .sig_i    (xor_src),
    .sel_i    (sel),
    .x_free_o (x_free)
  );

  xfree_misr #(.W(XF_M)) u_xfree (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .en_i   (xfree_en),
    .clr_i  (xfree_clr),
    .d_i    (x_free),
    .sig_o  (xfree_sig_o)
  );

  interval_counter #(.W(CNT_W)) u_cnt (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .load_i  (cnt_load),
    .val_i   (cnt_val),
    .dec_i   (cnt_dec),
    .count_o (count),
    .last_o  (cnt_last),
    .zero_o  (cnt_zero)
  );

  if (!SHADOW) begin : g_halt
    // Scan shifting halts while the MISR itself is read out.
    logic [15:0] combo, chunk;

    halt_controller #(.M(M), .B(B), .Q(Q)) u_ctrl (
      .clk_i       (clk_i),
      .rst_ni      (rst_ni),
      .start_i     (start_i),
      .cnt_last_i  (cnt_last),
      .cnt_zero_i  (cnt_zero),
      .state_o     (state_o),
      .scan_en_o   (scan_en),
      .cnt_load_o  (cnt_load),
      .cnt_dec_o   (cnt_dec),
      .misr_clr_o  (misr_clr),
      .sel_shift_o (sel_shift),
      .xfree_en_o  (xfree_en),
      .xfree_clr_o (xfree_clr),
      .combo_o     (combo),
      .chunk_o     (chunk)
    );

    assign cnt_val   = ch_i[CNT_W-1:0];
    assign xor_src   = misr_sig;
    assign busy_o    = (state_o == ST_SEL);
    assign overrun_o = 1'b0;
  end else begin : g_shadow
    // Scan shifting continues; the signature is read out of a shadow copy.
    sh_state_e    sh_state;
    logic         shadow_load;
    logic [M-1:0] shadow_q;

    shadow_controller #(.M(M), .B(B), .Q(Q), .CNT_W(CNT_W)) u_ctrl (
      .clk_i         (clk_i),
      .rst_ni        (rst_ni),
      .start_i       (start_i),
      .val_i         (ch_i[CNT_W-1:0]),
      .cnt_last_i    (cnt_last),
      .state_o       (sh_state),
      .scan_en_o     (scan_en),
      .cnt_load_o    (cnt_load),
      .cnt_val_o     (cnt_val),
      .cnt_dec_o     (cnt_dec),
      .misr_clr_o    (misr_clr),
      .shadow_load_o (shadow_load),
      .sel_shift_o   (sel_shift),
      .xfree_en_o    (xfree_en),
      .xfree_clr_o   (xfree_clr),
      .busy_o        (busy_o),
      .overrun_o     (overrun_o)
    );

    shadow_register #(.M(M)) u_shadow (
      .clk_i  (clk_i),
      .rst_ni (rst_ni),
      .load_i (shadow_load),
      .d_i    (misr_nxt),
      .q_o    (shadow_q)
    );

    assign xor_src = shadow_q;
    always_comb begin
      unique case (sh_state)
        SH_IDLE:           state_o = ST_IDLE;
        SH_LOAD, SH_LOADP: state_o = ST_LOAD;
        SH_RUN:            state_o = ST_SHIFT;
        default:           state_o = ST_SEL;
      endcase
    end
  end

  assign scan_en_o   = scan_en;
  assign xc_bit_o    = x_free;
  assign xc_valid_o  = xfree_en;
  assign sig_o       = xor_src;

  initial begin
    assert (CNT_W <= B) else $error("xcancel_misr_top: interval counter wider than channels");
  end

endmodule
