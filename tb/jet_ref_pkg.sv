// jet_ref_pkg - reference models for the jet and energy testbenches.
// q10cos/q10sin compute round(1024*cos/sin) of an angle in degrees with
// real arithmetic; crit_ok restates the jet-count criterion rule.
package jet_ref_pkg;
  import gct_pkg::*;

  localparam real PI = 3.14159265358979;

  function automatic int q10cos(input real deg);
    real v;
    v = $cos(deg * PI / 180.0) * 1024.0;
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int q10sin(input real deg);
    real v;
    v = $sin(deg * PI / 180.0) * 1024.0;
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic bit crit_ok(input int rank, input int eta, input int cls, input jc_crit_t k);
    if (rank == 0 || cls == 3) return 0;
    if (!k.class_mask[cls]) return 0;
    return rank >= k.rank_min && eta >= k.eta_min && eta <= k.eta_max;
  endfunction

  function automatic jc_crit_t rand_crit();
    jc_crit_t k;
    k.rank_min   = RANK_W'($urandom_range(8));
    k.eta_min    = ETA_W'($urandom_range(10));
    k.eta_max    = ETA_W'($urandom_range(10, 21));
    k.class_mask = 3'($urandom_range(1, 7));
    return k;
  endfunction
endpackage
