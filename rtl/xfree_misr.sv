// xfree_misr: signature register for the X-canceled bits.
//
// Every X-canceled bit is deterministic, so compacting them all in a second signature register
// yields one final signature that can be compared with its fault-free value at the end of the
// test, with no response data sent to the tester during the session. Single-input internal-XOR
// LFSR: on each enabled clock the state shifts up by one, the input enters stage 0 and the
// last stage is fed back through the polynomial of xc_pkg::misr_poly_bit. A single input
// matches the design's case of one programmable XOR; width and polynomial are this
// implementation's choice.
//
// Interface: en_i compacts d_i, clr_i clears (priority), sig_o the signature.
// Timing: one bit per clock; asynchronous active-low reset to 0.
module xfree_misr
  import xc_pkg::*;
#(
  parameter int unsigned W = XF_M_DEFAULT
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         en_i,
  input  logic         clr_i,
  input  logic         d_i,
  output logic [W-1:0] sig_o
);

  function automatic logic [W-1:0] poly_mask();
    logic [W-1:0] p;
    for (int unsigned k = 0; k < W; k++) p[k] = (k == 0) ? 1'b1 : misr_poly_bit(W, k);
    return p;
  endfunction

  localparam logic [W-1:0] POLY = poly_mask();

  logic [W-1:0] sig_q, sig_d;

  always_comb begin
    sig_d    = {sig_q[W-2:0], 1'b0};
    sig_d[0] = d_i;
    if (sig_q[W-1]) sig_d = sig_d ^ POLY;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)    sig_q <= '0;
    else if (clr_i) sig_q <= '0;
    else if (en_i)  sig_q <= sig_d;
  end

  assign sig_o = sig_q;

endmodule
