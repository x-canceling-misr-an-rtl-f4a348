// xc_pkg: shared constants, types and structural functions of the X-canceling MISR.
//
// The X-canceling MISR compacts a scan output stream that contains unknown (X) values into an
// m-bit MISR, then XORs together combinations of MISR bits in which every X cancels out, and
// compacts those X-free bits in a second, X-free MISR. This package holds what the modules and
// the testbenches must agree on:
//   * the default sizes: a 256-bit MISR and q = 12 X-canceled combinations per intermediate
//     signature follow the main example of the design; the number of scan chains, tester
//     channels, X-free MISR width and interval counter width are choices of this implementation;
//   * misr_poly_bit(): the feedback polynomial of a signature register of a given width (the
//     design allows any MISR; primitive trinomials/pentanomials from the well-known maximal
//     length LFSR tap table are used here);
//   * ps_tap(): the wiring of the linear phase shifter (any linear network is allowed; this one
//     sends each scan chain to PS_TAPS distinct MISR inputs chosen by a multiplicative hash);
//   * the controller state encoding.
package xc_pkg;

  // Default sizes of the design.
  localparam int unsigned M_DEFAULT       = 256;  // MISR width m
  localparam int unsigned Q_DEFAULT       = 12;   // X-canceled combinations per signature
  localparam int unsigned N_DEFAULT       = 512;  // scan chains feeding the phase shifter
  localparam int unsigned B_DEFAULT       = 16;   // tester channels b
  localparam int unsigned CNT_W_DEFAULT   = 16;   // interval counter width (<= b)
  localparam int unsigned XF_M_DEFAULT    = 32;   // X-free MISR width
  localparam int unsigned PS_TAPS_DEFAULT = 3;    // MISR inputs each scan chain feeds

  // Halt controller states.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,  // no test session: nothing shifts, signatures hold
    ST_LOAD  = 2'd1,  // one halted cycle: load interval counter, reset the MISR
    ST_SHIFT = 2'd2,  // scan shifting, MISR compacting the output stream
    ST_SEL   = 2'd3   // scan halted: q selection vectors arrive, X-free bits are compacted
  } xc_state_e;

  // Shadow-register controller states (continuous shifting).
  typedef enum logic [2:0] {
    SH_IDLE  = 3'd0,  // no test session
    SH_LOAD  = 3'd1,  // load the interval counter with the first interval
    SH_LOADP = 3'd2,  // load the pending register with the second interval, reset the MISR
    SH_RUN   = 3'd3,  // continuous shifting; signatures are copied out and processed
    SH_DRAIN = 3'd4   // shifting over; the last copied signature is being processed
  } sh_state_e;

  // Coefficient of x^k (0 < k < width) in the characteristic polynomial
  // x^width + ... + 1 of a signature register of the given width.
  function automatic bit misr_poly_bit(int unsigned width, int unsigned k);
    int unsigned t0, t1, t2;
    case (width)
      4:       begin t0 = 3;   t1 = 0;   t2 = 0;   end
      5:       begin t0 = 3;   t1 = 0;   t2 = 0;   end
      6:       begin t0 = 5;   t1 = 0;   t2 = 0;   end
      7:       begin t0 = 6;   t1 = 0;   t2 = 0;   end
      8:       begin t0 = 6;   t1 = 5;   t2 = 4;   end
      12:      begin t0 = 6;   t1 = 4;   t2 = 1;   end
      16:      begin t0 = 15;  t1 = 13;  t2 = 4;   end
      24:      begin t0 = 23;  t1 = 22;  t2 = 17;  end
      32:      begin t0 = 22;  t1 = 2;   t2 = 1;   end
      64:      begin t0 = 63;  t1 = 61;  t2 = 60;  end
      128:     begin t0 = 126; t1 = 101; t2 = 99;  end
      256:     begin t0 = 254; t1 = 251; t2 = 246; end
      default: begin t0 = width - 1; t1 = 0; t2 = 0; end
    endcase
    return (k != 0) && (k == t0 || k == t1 || k == t2);
  endfunction

  // MISR input driven by tap t (0 <= t < taps, taps <= m) of scan chain i. Tap 0 of chain i
  // is input i mod m, so every chain reaches the MISR and, when there are more chains than
  // MISR inputs, the network also compacts in space. Tap t > 0 adds an offset drawn by a
  // multiplicative hash from the t-th of taps-1 disjoint ranges of [1, m-1], so the taps of one
  // chain are always distinct and neighbouring chains land far apart (no shift correlation).
  function automatic int unsigned ps_tap(int unsigned m, int unsigned taps, int unsigned i,
                                         int unsigned t);
    int unsigned w, off;
    if (t == 0 || taps < 2) return i % m;
    w   = (m - 1) / (taps - 1);
    off = 1 + (t - 1) * w + (i * (2 * t + 35) + 7 * t * t + 11 + i / m) % w;
    return (i + off) % m;
  endfunction

endpackage
