// tb_ref_pkg: reference models for the testbenches, written independently
// of the RTL encodings. Memberships, premises and levels are real numbers;
// first-of-max is found by scanning the output set numerically; the
// configuration and countermeasure tables are re-entered from the
// specification, and the performance factors of each configuration are
// recomputed from the countermeasure cost formulas.
package tb_ref_pkg;
  import sm_pkg::*;

  function automatic real deg_real(degree_t d);
    case (d)
      D_0:   return 0.0;
      D_1_4: return 0.25;
      D_1_3: return 1.0/3.0;
      D_1_2: return 0.5;
      D_2_3: return 2.0/3.0;
      D_3_4: return 0.75;
      D_1:   return 1.0;
      default: return -1.0;
    endcase
  endfunction

  function automatic real smax_of(int i);
    case (i)
      0: return 10.0;        // DS (assumed range)
      1: return 5.0;         // LS
      2, 3, 4, 5: return 10.0;
      6: return 1000.0;      // NE
      7: return 10000.0;     // ME
      default: return 1.0e7; // CO
    endcase
  endfunction

  // Membership of value s (range smax) in subset f, from the table of
  // staircase membership functions (columns L- L-- L--- L---- H++++ H+++ H++ H+).
  function automatic real ref_memb(int f, real s, real smax);
    real col [8][5];
    int  row;
    col[0] = '{1.0, 0.75, 0.5, 0.25, 0.0};
    col[1] = '{1.0, 2.0/3.0, 1.0/3.0, 0.0, 0.0};
    col[2] = '{1.0, 0.5, 0.0, 0.0, 0.0};
    col[3] = '{1.0, 0.0, 0.0, 0.0, 0.0};
    col[4] = '{0.0, 0.0, 0.0, 0.0, 1.0};
    col[5] = '{0.0, 0.0, 0.0, 0.5, 1.0};
    col[6] = '{0.0, 0.0, 1.0/3.0, 2.0/3.0, 1.0};
    col[7] = '{0.0, 0.25, 0.5, 0.75, 1.0};
    if      (s <= smax/5.0)       row = 0;
    else if (s <= 2.0*smax/5.0)   row = 1;
    else if (s <= 3.0*smax/5.0)   row = 2;
    else if (s <= 4.0*smax/5.0)   row = 3;
    else                          row = 4;
    return col[f][row];
  endfunction

  function automatic real rmin(real a, real b); return (a < b) ? a : b; endfunction
  function automatic real rmax(real a, real b); return (a > b) ? a : b; endfunction

  // Output sets
  function automatic real mu_low(real y);
    if (y <= 0.2) return 1.0;
    if (y <= 0.8) return -5.0/3.0*y + 2.0/3.0;
    return 0.0;
  endfunction
  function automatic real mu_high(real y);
    if (y <= 0.2) return 0.0;
    if (y <= 0.8) return 5.0/3.0*y - 1.0/3.0;
    return 1.0;
  endfunction

  // First of max of max(min(pl,LOW), min(ph,HIGH)) by scanning [0,1].
  function automatic real ref_fom(real pl, real ph);
    real best, y, mu, ybest;
    best = -1.0; ybest = 0.0;
    for (int k = 0; k <= 10000; k++) begin
      y  = k / 10000.0;
      mu = rmax(rmin(pl, mu_low(y)), rmin(ph, mu_high(y)));
      if (mu > best + 1e-9) begin best = mu; ybest = y; end
    end
    return ybest;
  endfunction

  // Configuration table: rows AL from high to low, columns ML from low to high.
  // 0 Safe, 1 Unsafe, 2 Critical, 3 Fatal
  function automatic int ref_cfg(real ml, real al);
    int t [5][5];
    int r, c;
    t[0] = '{0, 0, 1, 2, 3};   // AL in [0.8, 1]
    t[1] = '{0, 1, 1, 2, 3};   // [0.6, 0.8[
    t[2] = '{1, 1, 1, 2, 3};   // [0.4, 0.6[
    t[3] = '{1, 1, 2, 2, 3};   // [0.2, 0.4[
    t[4] = '{1, 2, 2, 3, 3};   // [0, 0.2[
    if (ml <= 0.2 + 1e-9) c = 0; else if (ml <= 0.4 + 1e-9) c = 1;
    else if (ml <= 0.6 + 1e-9) c = 2; else if (ml <= 0.8 + 1e-9) c = 3; else c = 4;
    if (al >= 0.8 - 1e-9) r = 0; else if (al >= 0.6 - 1e-9) r = 1;
    else if (al >= 0.4 - 1e-9) r = 2; else if (al >= 0.2 - 1e-9) r = 3; else r = 4;
    return t[r][c];
  endfunction

  // Countermeasure settings of each configuration:
  // {rl, r, d, n, mute_reset, kill}
  function automatic void ref_cm(int cfg, output int rl, output int r, output int d,
                                 output int n, output int mute, output int kill);
    case (cfg)
      0:       begin rl = 1; r = 0;  d = 2; n = 0; mute = 0; kill = 0; end
      1:       begin rl = 2; r = 3;  d = 3; n = 4; mute = 0; kill = 0; end
      2:       begin rl = 3; r = 10; d = 4; n = 8; mute = 1; kill = 0; end
      default: begin rl = 3; r = 10; d = 4; n = 8; mute = 1; kill = 1; end
    endcase
  endfunction

  // Performance factors of a setting (m = 150 instructions, alpha = 10%).
  function automatic real f_sca(int rl, int r, int d, int n);
    real idi;
    idi = (n == 0) ? 1.0 : 2.0 * $sqrt(150.0 * n * (n + 2) / (6.0 * (d + 1)));
    return (1.0 + r * r) * idi / rl;
  endfunction
  function automatic real f_time(int rl, int d, int n);
    return rl * (1.0 + real'(n) / (d + 1));
  endfunction
  function automatic real f_nrj(int rl, int r, int d, int n);
    return (1.0 + 0.1 * r) * f_time(rl, d, n);
  endfunction

  function automatic bit near(real a, real b, real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  // Whole decision for input values v (indexed DS, LS, VS, EFE, CE, PE, NE,
  // ME, CO) with the rule sets rs_ml / rs_al.
  function automatic real ref_level(rule_set_t rs, real v [9]);
    real el = 0.0, eh = 0.0, a, b, p;
    for (int r = 0; r < N_RULES; r++) begin
      a = ref_memb(int'(rs[r].set_a), v[int'(rs[r].in_a)], smax_of(int'(rs[r].in_a)));
      b = ref_memb(int'(rs[r].set_b), v[int'(rs[r].in_b)], smax_of(int'(rs[r].in_b)));
      if (rs[r].neg_a) a = 1.0 - a;
      if (rs[r].neg_b) b = 1.0 - b;
      p = (rs[r].op == OP_AND) ? rmin(a, b) : (rs[r].op == OP_OR) ? rmax(a, b) : a;
      if (!rs[r].valid) p = 0.0;
      if (rs[r].concl_high) eh = rmax(eh, p); else el = rmax(el, p);
    end
    return ref_fom(el, eh);
  endfunction

endpackage
