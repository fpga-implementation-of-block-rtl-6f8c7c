// tb_ref_pkg: golden models used by the detector testbenches.
//
// Everything here is plain integer arithmetic on longint, written directly
// from the detector equations and independent of the RTL structure:
//   quant(v)      floor(v / 2^shift) saturated to a signed w-bit word
//   rake          y_k = conj(h_k) sum_i conj(c_k(i)) r(i)
//   corr          R_kj = conj(h_k) h_j sum_i conj(c_k(i)) c_j(i)
//   bp_df_mpic    stage-by-stage, user-by-user cancellation in which user k
//                 uses the current stage's decision of user j when j's block
//                 comes before k's block, and the previous stage's otherwise.
// Spreading chips are +-1 +-j; sizes up to KMAX users and NMAX chips.
package tb_ref_pkg;
  localparam int KMAX = 16;
  localparam int NMAX = 64;
  localparam int MMAX = 8;

  typedef longint vec_t [KMAX];
  typedef longint mat_t [KMAX][KMAX];

  function automatic longint quant(longint v, int shift, int w);
    longint s = v >>> shift;
    longint hi = (longint'(1) <<< (w - 1)) - 1;
    longint lo = -(longint'(1) <<< (w - 1));
    if (s > hi) return hi;
    if (s < lo) return lo;
    return s;
  endfunction

  // chip value: bit set = -1
  function automatic longint cv(logic neg);
    return neg ? -1 : 1;
  endfunction

  // Decisions of all stages: bs[m][k] in {+1,-1}; zs[m][k] soft values.
  // Stage 0 is sign(y). Users are grouped u per block.
  function automatic void bp_df_mpic(input vec_t y, input mat_t r, input int k_users,
                                     input int u, input int m_stages,
                                     output longint zs [MMAX+1][KMAX],
                                     output int bs [MMAX+1][KMAX]);
    for (int k = 0; k < k_users; k++) begin
      zs[0][k] = y[k];
      bs[0][k] = (y[k] < 0) ? -1 : 1;
    end
    for (int m = 1; m <= m_stages; m++) begin
      for (int k = 0; k < k_users; k++) begin
        longint z = y[k];
        for (int j = 0; j < k_users; j++) begin
          int bj;
          if (j == k) continue;
          bj = (j / u < k / u) ? bs[m][j] : bs[m-1][j];
          z -= r[k][j] * bj;
        end
        zs[m][k] = z;
        bs[m][k] = (z < 0) ? -1 : 1;
      end
    end
  endfunction
endpackage
