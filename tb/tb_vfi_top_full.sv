// tb_vfi_top_full: one complete value function iteration at the default
// size, 65536 capital points by 4 productivity states, with the RBC
// calibration and the initial guess V0(k',z') = 10 ln k' (see tb_rbc_pkg).
// The host loads every table, runs one iteration and reads back a sample of
// 48 grid points spread over the grid, each compared with an exhaustive
// search over all 65536 candidates in real arithmetic. The iteration must
// take exactly NK*NZ + 1 + 15 * 60 cycles, i.e. one grid point per clock
// plus the pipeline fill. Sampled points include k = 0, whose first-stage
// candidates are all infeasible.
module tb_vfi_top_full;
  import vfi_pkg::*;
  import tb_util_pkg::*;
  import tb_rbc_pkg::*;

  localparam int NK = 65536, NZ = 4, IDXW = 16, AW = 18, NSTAGE = 15;
  localparam int NSAMPLE = 48;
  localparam real TOL = 5.0e-3;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            host_wr_en;
  host_sel_e       host_wr_sel;
  logic [AW-1:0]   host_wr_addr;
  fx_t             host_wr_data;
  logic            start;
  logic [31:0]     n_iter;
  logic            busy, done;
  logic [31:0]     iter_cnt;
  logic [63:0]     cycle_cnt;
  logic [AW-1:0]   host_rd_addr;
  fx_t             host_rd_v;
  logic [IDXW-1:0] host_rd_policy;

  vfi_top dut (.*);

  real vprev [];
  int  n_interior = 0, n_infeasible = 0;


  task automatic hw(input host_sel_e sel, input int addr, input fx_t data);
    @(negedge clk);
    host_wr_en = 1; host_wr_sel = sel; host_wr_addr = AW'(addr); host_wr_data = data;
  endtask

  initial begin
    host_wr_en = 0; host_wr_sel = HOST_KGRID; host_wr_addr = '0; host_wr_data = '0;
    start = 0; n_iter = '0; host_rd_addr = '0;
    setup(NK, NZ);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    hw(HOST_PARAM, 0, r2fx(1.0 - ETA));
    hw(HOST_PARAM, 1, r2fx(1.0 / (1.0 - ETA)));
    for (int a = 0; a < NZ; a++)
      for (int b = 0; b < NZ; b++) hw(HOST_BQ, (a << IDXW) | b, r2fx(bqr[a * NZ + b]));
    for (int i = 0; i < NK; i++) hw(HOST_KGRID, i, r2fx(kg[i]));
    vprev = new[NK * NZ];
    for (int z = 0; z < NZ; z++)
      for (int i = 0; i < NK; i++) begin
        vprev[z * NK + i] = v0_guess(i);
        hw(HOST_W, (z << IDXW) | i, r2fx(wt[z * NK + i]));
        hw(HOST_V0, (z << IDXW) | i, r2fx(vprev[z * NK + i]));
      end
    @(negedge clk);
    host_wr_en = 0;
    start = 1; n_iter = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    checks += 2;
    if (cycle_cnt != 64'(NK * NZ + 1 + NSTAGE * STAGE_LAT)) begin
      failures++;
      $display("FAIL iteration took %0d cycles, expected %0d", cycle_cnt, NK * NZ + 1 + NSTAGE * STAGE_LAT);
    end
    if (iter_cnt != 1) begin
      failures++;
      $display("FAIL iter_cnt %0d", iter_cnt);
    end
    for (int s = 0; s < NSAMPLE; s++) begin
      int k, z, ib, pol;
      real vref, got, at_pol;
      z = s % NZ;
      k = (s * 1361 + 7) % NK;
      if (s == 1) k = 0;
      if (s == 2) k = NK - 1;
      @(negedge clk);
      host_rd_addr = AW'((z << IDXW) | k);
      @(negedge clk);
      got = fx2r(host_rd_v);
      pol = int'(host_rd_policy);
      vref = best(k, z, vprev, ib);
      at_pol = obj(pol, k, z, vprev);
      if (pol != 0 && pol != NK - 1) n_interior++;
      if (wt[z * NK + k] <= kg[NK / 4]) n_infeasible++;
      checks += 2;
      if (rabs(got - vref) > TOL) begin
        failures++;
        $display("FAIL V(%0d,%0d) %f exp %f", k, z, got, vref);
      end
      if (vref - at_pol > TOL) begin
        failures++;
        $display("FAIL policy(%0d,%0d) %0d (objective %f), best %0d (%f)", k, z, pol, at_pol, ib, vref);
      end
    end
    checks++;
    if (n_interior == 0 || n_infeasible == 0) begin
      failures++;
      $display("FAIL mechanisms: interior %0d infeasible %0d", n_interior, n_infeasible);
    end
    $display("iteration cycles %0d, interior optima %0d, points with an infeasible first stage %0d",
             cycle_cnt, n_interior, n_infeasible);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
