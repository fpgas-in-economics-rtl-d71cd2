// tb_peak_finder: a 64-point capital grid (five search stages) and four
// productivity states with the RBC calibration (beta 0.984, eta 2, alpha
// 0.35, delta 0.01). Every grid point (k,z) is streamed through the pipeline
// once per value bank; the result is compared with an exhaustive search over
// all 64 candidates in real arithmetic: V(k,z) must match the true maximum,
// and the objective at the returned policy index must be within the
// fixed-point error of it. Bank 0 holds a concave guess V0 = 10 ln k',
// giving interior maxima; bank 1 holds V0 = 0, so the smallest k' (grid
// index 0, reached only through the last stage's extra index) is optimal.
// Also checks the pipeline latency of 5 * 60 cycles.
module tb_peak_finder;
  import vfi_pkg::*;
  import tb_util_pkg::*;

  localparam int NK = 64, NZ = 4, IDXW = 6, ZW = 2, NSTAGE = 5;
  localparam real BETA = 0.984, ETA = 2.0, ALPHA = 0.35, DELTA = 0.01;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0, n_zero = 0, n_interior = 0;

  logic            in_valid;
  logic [IDXW-1:0] in_k;
  logic [ZW-1:0]   in_z;
  fx_t             in_w;
  logic            rd_bank;
  fx_t             one_m_eta, inv_one_m_eta;
  fx_t             bq [NZ][NZ];
  logic            k_wr_en;
  logic [NZ-1:0]   v_wr_en;
  logic            v_wr_bank;
  logic [IDXW-1:0] wr_addr;
  fx_t             wr_data;
  logic            out_valid;
  logic [IDXW-1:0] out_k, out_policy;
  logic [ZW-1:0]   out_z;
  fx_t             out_v;

  peak_finder #(.NK(NK), .NZ(NZ)) dut (.*);

  real kg [NK];
  real zg [NZ];
  real wt [NK][NZ];
  real vt [2][NK][NZ];
  real bqr [NZ][NZ];
  int  t_in [NK][NZ];
  int  nres = 0;
  int  bank_now = 0;

  function automatic real obj(input int i, input int k, input int z, input int bank);
    real c, s;
    c = wt[k][z] - kg[i];
    if (c <= 0.0) return -1.0e30;
    s = 0.0;
    for (int m = 0; m < NZ; m++) s += vt[bank][i][m] * bqr[z][m];
    return -1.0 / c + s;
  endfunction

  initial begin
    real kss;
    in_valid = 0; in_k = '0; in_z = '0; in_w = '0; rd_bank = 0;
    k_wr_en = 0; v_wr_en = '0; v_wr_bank = 0; wr_addr = '0; wr_data = '0;
    one_m_eta = r2fx(1.0 - ETA); inv_one_m_eta = r2fx(1.0 / (1.0 - ETA));
    kss = $pow((1.0 / BETA - 1.0 + DELTA) / ALPHA, 1.0 / (ALPHA - 1.0));
    for (int a = 0; a < NZ; a++) begin
      zg[a] = 0.97 + 0.02 * a;
      for (int b = 0; b < NZ; b++) begin
        bq[a][b] = r2fx(BETA * ((a == b) ? 0.85 : 0.05));
        bqr[a][b] = fx2r(bq[a][b]);
      end
    end
    for (int i = 0; i < NK; i++) begin
      kg[i] = fx2r(r2fx(0.5 * kss + kss * i / (NK - 1)));
      for (int z = 0; z < NZ; z++) begin
        wt[i][z] = fx2r(r2fx(zg[z] * $pow(kg[i], ALPHA) + (1.0 - DELTA) * kg[i]));
        vt[0][i][z] = fx2r(r2fx(10.0 * $ln(kg[i])));
        vt[1][i][z] = 0.0;
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < NK; i++) begin
      @(posedge clk);
      k_wr_en <= 1; v_wr_en <= '0; wr_addr <= IDXW'(i); wr_data <= r2fx(kg[i]);
      for (int b = 0; b < 2; b++)
        for (int m = 0; m < NZ; m++) begin
          @(posedge clk);
          k_wr_en <= 0; v_wr_en <= NZ'(1 << m); v_wr_bank <= b[0];
          wr_addr <= IDXW'(i); wr_data <= r2fx(vt[b][i][m]);
        end
    end
    @(posedge clk);
    k_wr_en <= 0; v_wr_en <= '0;
    for (int b = 0; b < 2; b++) begin
      @(posedge clk);
      rd_bank <= b[0];
      bank_now = b;
      for (int z = 0; z < NZ; z++)
        for (int k = 0; k < NK; k++) begin
          in_valid <= 1; in_k <= IDXW'(k); in_z <= ZW'(z); in_w <= r2fx(wt[k][z]);
          t_in[k][z] = cyc;
          @(posedge clk);
        end
      in_valid <= 0;
      repeat (NSTAGE * STAGE_LAT + 5) @(posedge clk);
    end
    checks++;
    if (nres != 2 * NK * NZ || n_zero == 0 || n_interior == 0) begin
      failures++;
      $display("FAIL: %0d results, %0d at index 0, %0d interior", nres, n_zero, n_interior);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      real best, at_pol;
      int  k, z, ibest;
      k = int'(out_k); z = int'(out_z);
      nres++;
      best = -1.0e30; ibest = 0;
      for (int i = 0; i < NK; i++)
        if (obj(i, k, z, bank_now) > best) begin best = obj(i, k, z, bank_now); ibest = i; end
      at_pol = obj(int'(out_policy), k, z, bank_now);
      if (out_policy == 0) n_zero++;
      else if (out_policy != IDXW'(NK - 1)) n_interior++;
      checks += 3;
      if (cyc - t_in[k][z] != NSTAGE * STAGE_LAT + 1) begin
        failures++;
        $display("FAIL latency %0d", cyc - t_in[k][z]);
      end
      if (rabs(fx2r(out_v) - best) > 2.0e-3) begin
        failures++;
        $display("FAIL V(%0d,%0d) %f exp %f", k, z, fx2r(out_v), best);
      end
      if (best - at_pol > 2.0e-3) begin
        failures++;
        $display("FAIL policy(%0d,%0d) %0d exp %0d", k, z, out_policy, ibest);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
