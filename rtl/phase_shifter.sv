// phase_shifter: linear XOR network between the scan chain outputs and the MISR inputs.
//
// Feeding each scan chain straight into one MISR stage lets an X and a non-X value from
// neighbouring chains enter the same MISR stage in lock step ("shift correlation"); the two
// then appear together in every signature bit and the X cannot be canceled without also
// canceling the good value. A linear phase shifter in front of the MISR breaks that pairing,
// and when there are more scan chains than MISR inputs it also compacts in space.
//
// Structure: scan chain i drives TAPS distinct MISR inputs given by xc_pkg::ps_tap(); MISR
// input j is the XOR of every chain that has a tap on j. The design admits any linear network;
// this particular wiring (TAPS = 3, hashed offsets) is this implementation's choice, and the
// off-line symbolic simulation must use the same wiring.
//
// Interface: chains_i[N] scan outputs of one shift cycle, misr_d_o[M] MISR input word.
// Timing: purely combinational.
module phase_shifter
  import xc_pkg::*;
#(
  parameter int unsigned N    = N_DEFAULT,       // scan chains
  parameter int unsigned M    = M_DEFAULT,       // MISR inputs
  parameter int unsigned TAPS = PS_TAPS_DEFAULT  // MISR inputs per scan chain
) (
  input  logic [N-1:0] chains_i,
  output logic [M-1:0] misr_d_o
);

  // Chains that MISR input j depends on.
  function automatic logic [N-1:0] column_mask(int unsigned j);
    logic [N-1:0] mask;
    mask = '0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned t = 0; t < TAPS; t++)
        if (ps_tap(M, TAPS, i, t) == j) mask[i] = 1'b1;
    return mask;
  endfunction

  for (genvar j = 0; j < M; j++) begin : g_out
    localparam logic [N-1:0] MASK = column_mask(j);
    assign misr_d_o[j] = ^(chains_i & MASK);
  end

  initial begin
    assert (TAPS >= 1 && TAPS <= M) else $error("phase_shifter: TAPS must be 1..M");
  end

endmodule
