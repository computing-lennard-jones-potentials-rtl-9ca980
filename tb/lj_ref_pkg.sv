// lj_ref_pkg: real-number reference for the Lennard-Jones testbenches.
// Cutoff rc = 2.5 (normalised units); Uc is the potential at rc and dUc its
// derivative there, so the shifted potential and the force factor computed
// by the pipeline both vanish at r = rc. The reference evaluates the same
// formulas in the simulator's double arithmetic; the pipeline's multipliers
// truncate, so results are compared with a tolerance relative to the size
// of the terms being summed.
package lj_ref_pkg;

  localparam real RC  = 2.5;
  localparam real UC  = 4.0 * (RC ** -12 - RC ** -6);
  localparam real DUC = -48.0 * RC ** -13 + 24.0 * RC ** -7;
  localparam real USHIFT = DUC * RC - UC;
  localparam real REL_TOL = 1.0e-12;

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // F = 48 x x6 (x6 - 1/2) + dUc / r,  x = 1/r^2
  function automatic real ref_force(real r2);
    real x, x6, r;
    x  = 1.0 / r2;  x6 = x * x * x;  r = $sqrt(r2);
    return 48.0 * x * x6 * (x6 - 0.5) + DUC / r;
  endfunction

  // u = 4 x6 (x6 - 1) + (dUc rc - Uc) - dUc r
  function automatic real ref_pot(real r2);
    real x, x6, r;
    x  = 1.0 / r2;  x6 = x * x * x;  r = $sqrt(r2);
    return 4.0 * x6 * (x6 - 1.0) + USHIFT - DUC * r;
  endfunction

  function automatic real scale_force(real r2);
    real x, x6;
    x  = 1.0 / r2;  x6 = x * x * x;
    return 48.0 * x * x6 * (x6 + 0.5) + absr(DUC) / $sqrt(r2);
  endfunction

  function automatic real scale_pot(real r2);
    real x, x6;
    x  = 1.0 / r2;  x6 = x * x * x;
    return 4.0 * x6 * (x6 + 1.0) + absr(USHIFT) + absr(DUC) * $sqrt(r2);
  endfunction

  // true when got agrees with want to REL_TOL of the term size
  function automatic bit close(real got, real want, real scale);
    return absr(got - want) <= REL_TOL * scale;
  endfunction

  // random squared distance 0.64 <= r^2 < rc^2
  function automatic real rand_r2();
    return 0.64 + (RC * RC - 0.64) * ($itor($urandom() % 1000000) / 1.0e6);
  endfunction

endpackage
