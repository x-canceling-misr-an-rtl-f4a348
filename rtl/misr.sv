// misr: m-bit multiple-input signature register (MISR) that compacts the output stream,
// unknown values included, into an intermediate signature.
//
// Internal-XOR (Galois) form: on every enabled clock, stage 0 takes d[0] XOR the last stage,
// and stage k takes stage k-1 XOR d[k], plus the last stage where the characteristic
// polynomial has a term x^k (xc_pkg::misr_poly_bit). Every signature bit is therefore a linear
// (XOR) function of the compacted bits, which is what lets combinations of signature bits be
// found in which all X's cancel. The design allows any MISR; the polynomial is this
// implementation's choice (a primitive one for the listed widths).
//
// Interface: en_i compacts d_i, clr_i resets the signature to all zeros (the design resets the
// MISR after each intermediate signature; clr_i has priority over en_i). sig_o is the state;
// nxt_o is the signature after compacting the present d_i, which the shadow-register scheme
// copies away in the same clock as it resets the MISR.
// Timing: one clock per compacted word; asynchronous active-low reset rst_ni.
module misr
  import xc_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         en_i,
  input  logic         clr_i,
  input  logic [M-1:0] d_i,
  output logic [M-1:0] sig_o,
  output logic [M-1:0] nxt_o
);

  function automatic logic [M-1:0] poly_mask();
    logic [M-1:0] p;
    for (int unsigned k = 0; k < M; k++) p[k] = (k == 0) ? 1'b1 : misr_poly_bit(M, k);
    return p;
  endfunction

  localparam logic [M-1:0] POLY = poly_mask();

  logic [M-1:0] state_q, state_d;

  always_comb begin
    state_d = {state_q[M-2:0], 1'b0} ^ d_i;
    if (state_q[M-1]) state_d = state_d ^ POLY;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)     state_q <= '0;
    else if (clr_i)  state_q <= '0;
    else if (en_i)   state_q <= state_d;
  end

  assign sig_o = state_q;
  assign nxt_o = state_d;

endmodule
