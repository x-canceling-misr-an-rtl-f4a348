// xc_e2e_bench: end-to-end bench for xcancel_misr_top, shared by the full-size and the
// reduced-size testbenches.
//
// The bench plays both the off-line tool and the tester:
//   1. For each intermediate signature it generates scan data with unknowns at a chosen density
//      and stops the stretch just before the MISR would receive more than m-q X's; that length
//      is the interval sent to the interval counter.
//   2. Symbolic simulation: each X gets its own symbol; the phase shifter and the MISR are
//      simulated over GF(2) with one bit vector (over the symbols) per MISR stage, alongside
//      the concrete signature the MISR would hold if every X were 0.
//   3. Gauss-Jordan elimination on the stage-by-symbol matrix, tracking which stages were
//      XORed into each row, gives the combinations of signature bits in which every X cancels;
//      q of them, picked at random, become the selection vectors.
//   4. The design is then run with every X replaced by a random value. Each X-canceled bit
//      must equal its prediction, the final X-free signature must equal the model's, and scan
//      shifting and halts must last exactly the interval and q*m/b + 1 clocks.
// A second session injects one error per intermediate signature into a non-X scan bit and
// counts how often the X-canceled bits catch it (expected: all but about 2^-q of the time).
// With SHADOW = 1 the same is done for the continuous-shifting variant: scan data and control
// data then flow at the same time, every stretch after the first must outlast the
// q*m/b + 1 clocks of processing, and a last session with too-short stretches must raise
// the overrun flag.
// Every mechanism of the design is counted and must occur: halts, MISR resets, interval loads,
// X's compacted, signatures corrupted by X's, combinations generated, end and restart of a
// session, and error detection. The bench sets done when finished; the instantiating
// testbench prints the result line, ends the simulation and keeps a watchdog.
module xc_e2e_bench
  import xc_pkg::*;
#(
  parameter bit          USE_DEFAULTS = 1'b1,  // instantiate the top with no parameter list
  parameter int unsigned N    = N_DEFAULT,
  parameter int unsigned M    = M_DEFAULT,
  parameter int unsigned Q    = Q_DEFAULT,
  parameter int unsigned B    = B_DEFAULT,
  parameter int unsigned XF_M = XF_M_DEFAULT,
  parameter int unsigned CNT_W = CNT_W_DEFAULT,
  parameter int unsigned TAPS = PS_TAPS_DEFAULT,
  parameter bit          SHADOW = 1'b0,        // continuous-shifting variant
  parameter int unsigned PPM_A = 100,          // X densities (parts per million)
  parameter int unsigned PPM_B = 500,
  parameter int unsigned GOOD_SIGS = 6,        // intermediate signatures, fault-free session
  parameter int unsigned BAD_SIGS  = 6         // intermediate signatures, session with errors
) ();
  localparam int unsigned CH  = M / B;
  localparam int unsigned KMX = M;             // symbol vector width (k <= m - q < m)

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] chains = '0;
  logic [B-1:0] ch = '0;
  logic scan_en, xc_bit, xc_valid, busy, overrun;
  xc_state_e st;
  logic [M-1:0] misr_sig;   // signature read by the programmable XOR
  logic [XF_M-1:0] xfree_sig;

  if (USE_DEFAULTS) begin : g_dut_default
    xcancel_misr_top dut (
      .clk_i(clk), .rst_ni(rst_n), .start_i(start), .chains_i(chains), .ch_i(ch),
      .scan_en_o(scan_en), .state_o(st), .xc_bit_o(xc_bit), .xc_valid_o(xc_valid),
      .busy_o(busy), .overrun_o(overrun), .sig_o(misr_sig), .xfree_sig_o(xfree_sig));
  end else begin : g_dut_sized
    xcancel_misr_top #(.N(N), .M(M), .Q(Q), .B(B), .CNT_W(CNT_W), .XF_M(XF_M),
                       .PS_TAPS(TAPS), .SHADOW(SHADOW)) dut (
      .clk_i(clk), .rst_ni(rst_n), .start_i(start), .chains_i(chains), .ch_i(ch),
      .scan_en_o(scan_en), .state_o(st), .xc_bit_o(xc_bit), .xc_valid_o(xc_valid),
      .busy_o(busy), .overrun_o(overrun), .sig_o(misr_sig), .xfree_sig_o(xfree_sig));
  end

  always #5 clk = ~clk;

  // Results, read by the testbench that instantiates the bench (it reports and finishes).
  int checks = 0, failures = 0;
  bit done = 1'b0;
  // Mechanism counters.
  int n_halts = 0, n_resets = 0, n_loads = 0, n_xs = 0, n_xcorrupt = 0, n_combos = 0;
  int n_ends = 0, n_restarts = 0, n_detect = 0, n_inject = 0, max_xs = 0;
  int n_overlap = 0, n_overrun = 0;

  // Session data of one intermediate signature.
  logic [N-1:0] gdat [$];   // good values (X positions hold 0)
  logic [N-1:0] xmsk [$];   // 1 where the scan cell captures an X
  logic [KMX-1:0] dep [M];  // symbolic MISR: X dependence of each stage
  logic [M-1:0] comb [M];   // stages XORed into each row during elimination
  logic [M-1:0] gsig;       // MISR signature with every X taken as 0
  logic [M-1:0] selv [$];   // chosen selection vectors
  logic [XF_M-1:0] xf_model;

  // A whole session, flattened: stretch s occupies slices start[s] .. start[s]+lens[s]-1.
  logic [N-1:0] gall [$], xall [$];
  int unsigned lens [$], starts [$], kx [$], err_cyc [$], err_bit [$];
  logic [M-1:0] sel_all [$], gsig_all [$];
  logic exp_all [$];

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [M-1:0] poly_m();
    logic [M-1:0] p;
    for (int unsigned k = 0; k < M; k++) p[k] = (k == 0) || misr_poly_bit(M, k);
    return p;
  endfunction

  function automatic logic [XF_M-1:0] poly_xf();
    logic [XF_M-1:0] p;
    for (int unsigned k = 0; k < XF_M; k++) p[k] = (k == 0) || misr_poly_bit(XF_M, k);
    return p;
  endfunction

  // X density, in parts per million of scan cells, of the i-th intermediate signature. The
  // session alternates PPM_A and PPM_B, the densities the design is evaluated at for this
  // number of scan chains; the fault-free session of the halting scheme also has every fifth
  // stretch at 5%, far denser, to show that X's still cancel in stretches of a few clocks
  // (error detection is not claimed there: the MISR has too few clocks to mix).
  function automatic int unsigned density_ppm(int unsigned i, bit dense_ok);
    if (dense_ok && !SHADOW && i % 5 == 4) return 50000;
    return (i % 2 == 0) ? PPM_A : PPM_B;
  endfunction

  // Step 1 and 2: generate one stretch and simulate it symbolically.
  task automatic make_stretch(int unsigned ppm, output int unsigned len, output int unsigned k);
    logic [N-1:0] g, x;
    logic [KMX-1:0] in_dep [M];
    logic [M-1:0] in_good, P;
    logic [KMX-1:0] fb;
    int unsigned cx;
    P = poly_m();
    gdat.delete(); xmsk.delete();
    for (int j = 0; j < M; j++) dep[j] = '0;
    gsig = '0;
    k = 0;
    forever begin
      for (int w = 0; w < (N + 31) / 32; w++) begin
        for (int b = 0; b < 32 && w * 32 + b < N; b++) begin
          g[w*32+b] = $urandom_range(1, 0);
          x[w*32+b] = ($urandom % 1000000) < ppm;
        end
      end
      g &= ~x;
      cx = $countones(x);
      if (k + cx > M - Q || gdat.size() >= (1 << CNT_W) - 1) break;
      // Symbolic phase shifter: each X chain adds its symbol to its MISR inputs.
      for (int j = 0; j < M; j++) in_dep[j] = '0;
      in_good = '0;
      for (int unsigned i = 0; i < N; i++) begin
        for (int unsigned t = 0; t < TAPS; t++) begin
          if (x[i]) in_dep[ps_tap(M, TAPS, i, t)][k] ^= 1'b1;
          else      in_good[ps_tap(M, TAPS, i, t)] ^= g[i];
        end
        if (x[i]) k++;
      end
      // Symbolic and concrete MISR step (internal-XOR form).
      fb = dep[M-1];
      for (int j = M - 1; j >= 1; j--) dep[j] = dep[j-1] ^ (P[j] ? fb : '0) ^ in_dep[j];
      dep[0] = fb ^ in_dep[0];
      gsig = ({gsig[M-2:0], 1'b0} ^ (gsig[M-1] ? P : '0)) ^ in_good;
      gdat.push_back(g);
      xmsk.push_back(x);
    end
    len = gdat.size();
  endtask

  // Step 3: Gauss-Jordan elimination and choice of q X-canceled combinations.
  task automatic choose_combos(int unsigned k);
    logic [KMX-1:0] r_dep;
    logic [M-1:0] r_comb;
    int prow = 0;
    int zero_rows [$];
    for (int j = 0; j < M; j++) begin comb[j] = '0; comb[j][j] = 1'b1; end
    for (int unsigned c = 0; c < k; c++) begin
      int piv = -1;
      for (int r = prow; r < M; r++) if (dep[r][c]) begin piv = r; break; end
      if (piv < 0) continue;
      r_dep = dep[piv]; dep[piv] = dep[prow]; dep[prow] = r_dep;
      r_comb = comb[piv]; comb[piv] = comb[prow]; comb[prow] = r_comb;
      for (int r = 0; r < M; r++)
        if (r != prow && dep[r][c]) begin
          dep[r]  ^= dep[prow];
          comb[r] ^= comb[prow];
        end
      prow++;
    end
    for (int r = prow; r < M; r++) begin
      expect_true(dep[r] == '0, "elimination leaves X-free rows");
      zero_rows.push_back(r);
    end
    expect_true(zero_rows.size() >= Q, $sformatf("only %0d X-free rows", zero_rows.size()));
    zero_rows.shuffle();
    selv.delete();
    for (int i = 0; i < Q && i < zero_rows.size(); i++) selv.push_back(comb[zero_rows[i]]);
  endtask

  // One scan slice of stretch s as the circuit delivers it: every X takes a random value.
  function automatic logic [N-1:0] slice(int unsigned s, int unsigned c, bit inject);
    logic [N-1:0] v;
    int unsigned a;
    a = starts[s] + c;
    v = gall[a];
    for (int unsigned i = 0; i < N; i++) if (xall[a][i]) v[i] = 1'($urandom);
    if (inject && c == err_cyc[s]) v[err_bit[s]] = ~v[err_bit[s]];
    return v;
  endfunction

  // Generate a session of nsig intermediate signatures (steps 1 to 3 for each).
  task automatic prepare(int unsigned nsig, bit inject, int unsigned ppm_force);
    int unsigned len, k, e;
    gall.delete(); xall.delete(); lens.delete(); starts.delete(); kx.delete();
    err_cyc.delete(); err_bit.delete(); sel_all.delete(); gsig_all.delete(); exp_all.delete();
    for (int unsigned s = 0; s < nsig; s++) begin
      make_stretch(ppm_force != 0 ? ppm_force : density_ppm(s, !inject), len, k);
      choose_combos(k);
      starts.push_back(gall.size());
      lens.push_back(len);
      kx.push_back(k);
      gsig_all.push_back(gsig);
      for (int unsigned c = 0; c < len; c++) begin
        gall.push_back(gdat[c]);
        xall.push_back(xmsk[c]);
      end
      for (int q = 0; q < Q; q++) begin
        sel_all.push_back(selv[q]);
        exp_all.push_back(^(gsig & selv[q]));
      end
      err_cyc.push_back($urandom % len);
      do e = $urandom % N; while (xmsk[err_cyc[s]][e]);
      err_bit.push_back(e);
    end
  endtask

  // Compacts one X-canceled bit into the model of the X-free MISR.
  task automatic xf_step(logic bit_in);
    xf_model = {xf_model[XF_M-2:0], 1'b0} ^ (xf_model[XF_M-1] ? poly_xf() : '0);
    xf_model[0] ^= bit_in;
  endtask

  // Presents q selection vectors of signature s, one chunk per clock, and checks the bits.
  task automatic select_and_check(int unsigned s, bit inject, inout bit detected);
    logic [M-1:0] sel;
    for (int q = 0; q < Q; q++) begin
      sel = sel_all[s*Q+q];
      for (int c = 0; c < CH; c++) begin
        ch = sel[c*B +: B];
        #1;
        expect_true(xc_valid == (c == CH - 1) && busy, "x-canceled bit strobe");
        if (SHADOW) n_overlap += int'(scan_en);
        if (c == CH - 1) begin
          n_combos++;
          if (inject) begin
            if (xc_bit != exp_all[s*Q+q]) detected = 1;
          end else begin
            expect_true(xc_bit == exp_all[s*Q+q], "X-canceled bit equals its fault-free value");
          end
          xf_step(xc_bit);
        end
        @(posedge clk); #1;
      end
    end
  endtask

  task automatic note_signature(int unsigned s, logic [M-1:0] sig);
    if (kx[s] > 0 && sig != gsig_all[s]) n_xcorrupt++;
    n_xs += kx[s];
    if (int'(kx[s]) > max_xs) max_xs = kx[s];
  endtask

  // Step 4, halting scheme: shift a stretch, halt, select, reload.
  task automatic run_halting(int unsigned nsig, bit inject);
    bit det;
    int unsigned shifts, halt;
    for (int unsigned s = 0; s < nsig; s++) begin
      expect_true(st == ST_LOAD && !scan_en, "load clock");
      ch = '0; ch[CNT_W-1:0] = CNT_W'(lens[s]);
      n_loads++; n_resets++;
      @(posedge clk); #1;
      expect_true(misr_sig == '0, "MISR reset at load");
      shifts = 0;
      for (int unsigned c = 0; c < lens[s]; c++) begin
        expect_true(scan_en && st == ST_SHIFT, "scan shifting");
        chains = slice(s, c, inject);
        shifts++;
        @(posedge clk); #1;
      end
      chains = '0;
      expect_true(shifts == lens[s], "shift clocks equal the interval");
      expect_true(!scan_en && st == ST_SEL, "halt after the interval");
      note_signature(s, misr_sig);
      det = 0;
      select_and_check(s, inject, det);
      halt = Q * CH;
      expect_true(st == ST_LOAD && !scan_en, "halt ends with the load clock");
      halt++;
      n_halts++;
      expect_true(halt == Q * M / B + 1, $sformatf("halt of %0d clocks", halt));
      if (inject) begin
        n_inject++; n_detect += int'(det);
        if (!det) $display("note: error in signature %0d (%0d X's, %0d shifts) aliased",
                           s, kx[s], lens[s]);
      end
    end
    // Interval 0 ends the session.
    ch = '0;
    @(posedge clk); #1;
  endtask

  // Step 4, shadow-register scheme: scan data and control data at the same time.
  task automatic run_shadow(int unsigned nsig, bit inject);
    expect_true(st == ST_LOAD, "first interval clock");
    ch = '0; ch[CNT_W-1:0] = CNT_W'(lens[0]);
    n_loads++;
    @(posedge clk); #1;
    expect_true(st == ST_LOAD, "second interval clock");
    ch = '0; ch[CNT_W-1:0] = CNT_W'(nsig > 1 ? lens[1] : 0);
    n_resets++;
    @(posedge clk); #1;
    fork
      begin : scan_side
        for (int unsigned s = 0; s < nsig; s++) begin
          for (int unsigned c = 0; c < lens[s]; c++) begin
            expect_true(scan_en && st == ST_SHIFT, "continuous shifting");
            chains = slice(s, c, inject);
            @(posedge clk); #1;
            if (c == lens[s] - 1) note_signature(s, misr_sig);
          end
          if (s > 0) begin n_loads++; n_resets++; end
        end
        chains = '0;
        expect_true(!scan_en, "shifting stops after the last interval");
      end
      begin : control_side
        bit det;
        int unsigned wait_clk;
        ch = '0;
        repeat (lens[0]) @(posedge clk);
        #1;
        for (int unsigned s = 0; s < nsig; s++) begin
          det = 0;
          select_and_check(s, inject, det);
          n_halts++;   // one intermediate signature processed
          if (s + 1 < nsig) begin
            // The interval of the stretch after next.
            ch = '0; ch[CNT_W-1:0] = CNT_W'(s + 2 < nsig ? lens[s+2] : 0);
            expect_true(busy, "pending-interval clock");
            @(posedge clk); #1;
            ch = '0;
            wait_clk = lens[s+1] - (Q * CH + 1);
            expect_true(lens[s+1] >= Q * CH + 1, "stretch outlasts processing");
            repeat (wait_clk) @(posedge clk);
            #1;
          end
          if (inject) begin
            n_inject++; n_detect += int'(det);
            if (!det) $display("note: error in signature %0d (%0d X's, %0d shifts) aliased",
                               s, kx[s], lens[s]);
          end
        end
      end
    join
    expect_true(st == ST_IDLE && !busy && !overrun, "session drained without overrun");
  endtask

  task automatic session(int unsigned nsig, bit inject, output logic [XF_M-1:0] fault_free);
    logic [XF_M-1:0] ff_model;
    prepare(nsig, inject, 0);
    ff_model = '0;
    foreach (exp_all[i]) begin
      ff_model = {ff_model[XF_M-2:0], 1'b0} ^ (ff_model[XF_M-1] ? poly_xf() : '0);
      ff_model[0] ^= exp_all[i];
    end
    start = 1;
    @(posedge clk); #1 start = 0;
    xf_model = '0;
    expect_true(xfree_sig == '0, "X-free MISR cleared at start");
    if (SHADOW) run_shadow(nsig, inject);
    else        run_halting(nsig, inject);
    expect_true(st == ST_IDLE && !scan_en, "session ended");
    n_ends++;
    expect_true(xfree_sig == xf_model, "X-free signature matches the compacted bits");
    fault_free = ff_model;
  endtask

  // Continuous shifting with stretches shorter than the processing must flag an overrun.
  task automatic overrun_session();
    int unsigned short_len;
    short_len = (Q * CH + 1) / 2;
    start = 1;
    @(posedge clk); #1 start = 0;
    ch = '0; ch[CNT_W-1:0] = CNT_W'(short_len);
    @(posedge clk); #1;
    @(posedge clk); #1;
    repeat (3 * short_len) begin
      chains = '0;
      for (int w = 0; w < (N + 31) / 32; w++)
        for (int b = 0; b < 32 && w * 32 + b < N; b++) chains[w*32+b] = 1'($urandom);
      @(posedge clk); #1;
    end
    expect_true(overrun, "overrun flagged");
    n_overrun += int'(overrun);
    // Recover by reset.
    rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    expect_true(!overrun && st == ST_IDLE, "reset clears the overrun");
  endtask

  initial begin
    logic [XF_M-1:0] ff;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    expect_true(st == ST_IDLE && !scan_en, "idle after reset");
    // Fault-free session: the X-free signature must be deterministic.
    session(GOOD_SIGS, 1'b0, ff);
    expect_true(xfree_sig == ff, "final X-free signature equals the fault-free signature");
    // Session with one error per intermediate signature.
    n_restarts++;
    session(BAD_SIGS, 1'b1, ff);
    expect_true(n_detect + 1 >= n_inject, $sformatf("errors detected %0d of %0d",
                                                      n_detect, n_inject));
    expect_true((n_detect > 0) == (xfree_sig != ff), "final signature flags the errors");
    if (SHADOW) begin
      overrun_session();
      $display("%m mechanisms: selection_clocks_overlapping_shift=%0d overruns=%0d",
               n_overlap, n_overrun);
      expect_true(n_overlap > 0 && n_overrun > 0, "shadow mechanisms occurred");
    end
    $display("%m mechanisms: %0s=%0d misr_resets=%0d interval_loads=%0d xs_compacted=%0d",
             SHADOW ? "signatures_copied" : "halts", n_halts, n_resets, n_loads, n_xs);
    $display("%m mechanisms: max_xs_per_signature=%0d x_corrupted_signatures=%0d combos=%0d",
             max_xs, n_xcorrupt, n_combos);
    $display("%m mechanisms: session_ends=%0d restarts=%0d errors_detected=%0d of %0d",
             n_ends, n_restarts, n_detect, n_inject);
    expect_true(n_halts > 0 && n_resets > 0 && n_loads > 0 && n_xs > 0 && n_xcorrupt > 0 &&
                n_combos > 0 && n_ends > 1 && n_restarts > 0 && n_detect > 0,
                "every mechanism occurred");
    expect_true(max_xs > int'(M - Q) - 64 || M < 128, "an X budget of about m-q was used");
    done = 1'b1;
  end
endmodule
