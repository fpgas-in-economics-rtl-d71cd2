// tb_rbc_pkg: reference model of the RBC value function iteration used by
// the top-level testbenches.
//   calibration  beta 0.984, eta 2, alpha 0.35, delta 0.01, rho 0.95,
//                sigma 0.005
//   z grid/Q     Rouwenhorst discretisation of ln z' = rho ln z + eps
//   k grid       NK evenly spaced points on [0.5, 1.5] x steady-state k
//   wealth       w(k,z) = z k^alpha + (1-delta) k
// All tables are rounded to the accelerator's fixed-point format first, so
// the reference starts from exactly the numbers the hardware holds. Arrays
// of two indexes are flattened as [z * NK + k].
package tb_rbc_pkg;
  import vfi_pkg::*;
  import tb_util_pkg::*;

  localparam real BETA = 0.984, ETA = 2.0, ALPHA = 0.35, DELTA = 0.01;
  localparam real RHO = 0.95, SIGMA = 0.005;

  int  nk, nz;
  real kg [];     // capital grid
  real zg [];     // productivity grid
  real wt [];     // wealth [z*nk + k]
  real bqr [];    // beta * Q(z'|z) [z*nz + z']

  function automatic void setup(input int nk_i, input int nz_i);
    real kss, sz, psi, p;
    real pm [][];
    nk = nk_i; nz = nz_i;
    kg = new[nk]; zg = new[nz]; wt = new[nk * nz]; bqr = new[nz * nz];
    // Rouwenhorst transition matrix
    p = (1.0 + RHO) / 2.0;
    pm = new[nz];
    foreach (pm[a]) pm[a] = new[nz];
    pm[0][0] = p; pm[0][1] = 1.0 - p; pm[1][0] = 1.0 - p; pm[1][1] = p;
    for (int n = 3; n <= nz; n++) begin
      real nm [][];
      nm = new[n];
      foreach (nm[a]) begin
        nm[a] = new[n];
        foreach (nm[a][b]) nm[a][b] = 0.0;
      end
      for (int a = 0; a < n - 1; a++)
        for (int b = 0; b < n - 1; b++) begin
          nm[a][b]         += p * pm[a][b];
          nm[a][b+1]       += (1.0 - p) * pm[a][b];
          nm[a+1][b]       += (1.0 - p) * pm[a][b];
          nm[a+1][b+1]     += p * pm[a][b];
        end
      for (int a = 1; a < n - 1; a++)
        for (int b = 0; b < n; b++) nm[a][b] /= 2.0;
      pm = nm;
    end
    sz  = SIGMA / $sqrt(1.0 - RHO * RHO);
    psi = $sqrt(nz - 1.0) * sz;
    for (int a = 0; a < nz; a++) begin
      zg[a] = $exp(-psi + 2.0 * psi * a / (nz - 1));
      for (int b = 0; b < nz; b++) bqr[a * nz + b] = fx2r(r2fx(BETA * pm[a][b]));
    end
    kss = $pow((1.0 / BETA - 1.0 + DELTA) / ALPHA, 1.0 / (ALPHA - 1.0));
    for (int i = 0; i < nk; i++)
      kg[i] = fx2r(r2fx(0.5 * kss + kss * i / (nk - 1)));
    for (int z = 0; z < nz; z++)
      for (int i = 0; i < nk; i++)
        wt[z * nk + i] = fx2r(r2fx(zg[z] * $pow(kg[i], ALPHA) + (1.0 - DELTA) * kg[i]));
  endfunction

  // Initial guess used by the tests: V0(k',z') = 10 ln k'.
  function automatic real v0_guess(input int i);
    return fx2r(r2fx(10.0 * $ln(kg[i])));
  endfunction

  // Objective of choosing grid index i at grid point (k,z) given V [z'*nk+k'].
  function automatic real obj(input int i, input int k, input int z, const ref real v []);
    real c, s;
    c = wt[z * nk + k] - kg[i];
    if (c <= 0.0) return -1.0e30;
    s = 0.0;
    for (int m = 0; m < nz; m++) s += v[m * nk + i] * bqr[z * nz + m];
    return -1.0 / c + s;
  endfunction

  // Exhaustive maximum over the grid; returns the value, sets the index.
  function automatic real best(input int k, input int z, const ref real v [], output int ib);
    real b, h;
    b = -1.0e30; ib = 0;
    for (int i = 0; i < nk; i++) begin
      h = obj(i, k, z, v);
      if (h > b) begin b = h; ib = i; end
    end
    return b;
  endfunction
endpackage
