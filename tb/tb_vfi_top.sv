// tb_vfi_top: end-to-end test of the accelerator on a 64-point capital grid
// with four productivity states and the RBC calibration (see tb_rbc_pkg).
// The host loads all tables, then
//   run A  one iteration from V0 = 0 (the smallest capital is optimal, the
//          boundary index 0 wins, and many candidates are infeasible),
//   run B  one more iteration, continuing from the values left by run A,
//   run C  three iterations in one run (bank swaps inside a run).
// After every run all V(k,z) and policies are read back and compared with
// the Bellman operator applied in real arithmetic to the previous read-back,
// by exhaustive search over the grid. The run time must be exactly
// n_iter * (NK*NZ + 1 + stages * 60) cycles. Each mechanism (boundary
// index, infeasible candidates, interior optimum, bank swap, multi-iteration
// run) is counted and must occur. Infeasible first-stage candidates are
// counted from the stimulus: a grid point whose wealth lies below
// k'(NK/4) has all three first-stage candidates infeasible.
module tb_vfi_top;
  import vfi_pkg::*;
  import tb_util_pkg::*;
  import tb_rbc_pkg::*;

  localparam int NK = 64, NZ = 4, IDXW = 6, ZW = 2, AW = 8, NSTAGE = 5;
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

  vfi_top #(.NK(NK), .NZ(NZ)) dut (.*);

  real vprev [];
  real vread [];
  int  pread [];
  int  n_boundary = 0, n_interior = 0, n_infeasible = 0, n_swaps = 0, n_multi = 0;


  // One write per clock: inputs change on the falling edge.
  task automatic hw(input host_sel_e sel, input int addr, input fx_t data);
    @(negedge clk);
    host_wr_en = 1; host_wr_sel = sel; host_wr_addr = AW'(addr); host_wr_data = data;
  endtask

  task automatic hw_end();
    @(negedge clk);
    host_wr_en = 0;
  endtask

  task automatic run_and_check(input int iters);
    real vref [];
    real vnext [];
    int  ib;
    vref = vprev;
    vnext = new[NK * NZ];
    start <= 1; n_iter <= 32'(iters);
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    checks += 2;
    if (cycle_cnt != 64'(iters * (NK * NZ + 1 + NSTAGE * STAGE_LAT))) begin
      failures++;
      $display("FAIL run time %0d cycles, expected %0d", cycle_cnt,
               iters * (NK * NZ + 1 + NSTAGE * STAGE_LAT));
    end
    if (iter_cnt != 32'(iters)) begin failures++; $display("FAIL iter_cnt %0d", iter_cnt); end
    n_swaps += iters;
    if (iters > 1) n_multi++;
    // reference: apply the Bellman operator iters times
    for (int it = 0; it < iters; it++) begin
      if (it > 0) vref = vnext;
      for (int z = 0; z < NZ; z++)
        for (int k = 0; k < NK; k++) vnext[z * NK + k] = best(k, z, vref, ib);
    end
    // read back
    vread = new[NK * NZ];
    pread = new[NK * NZ];
    for (int a = 0; a < NK * NZ; a++) begin
      host_rd_addr <= AW'(a);
      @(posedge clk);
      #1;
      vread[a] = fx2r(host_rd_v);
      pread[a] = int'(host_rd_policy);
    end
    for (int z = 0; z < NZ; z++)
      for (int k = 0; k < NK; k++) begin
        int a;
        real at_pol;
        a = z * NK + k;
        at_pol = obj(pread[a], k, z, vref);
        // all three first-stage candidates infeasible (w below k'(NK/4))
        if (wt[a] <= kg[NK / 4]) n_infeasible++;
        if (pread[a] == 0) n_boundary++;
        else if (pread[a] != NK - 1) n_interior++;
        checks += 2;
        if (rabs(vread[a] - vnext[a]) > TOL) begin
          failures++;
          $display("FAIL V(%0d,%0d) %f exp %f", k, z, vread[a], vnext[a]);
        end
        if (vnext[a] - at_pol > TOL) begin
          failures++;
          $display("FAIL policy(%0d,%0d) %0d objective %f, max %f", k, z, pread[a], at_pol, vnext[a]);
        end
      end
    vprev = vread;
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
        hw(HOST_W, (z << IDXW) | i, r2fx(wt[z * NK + i]));
        hw(HOST_V0, (z << IDXW) | i, '0);
        vprev[z * NK + i] = 0.0;
      end
    hw_end();
    run_and_check(1);
    run_and_check(1);
    run_and_check(3);
    checks++;
    if (n_boundary == 0 || n_interior == 0 || n_infeasible == 0 || n_swaps < 5 || n_multi == 0) begin
      failures++;
      $display("FAIL mechanisms: boundary %0d interior %0d infeasible %0d swaps %0d multi %0d",
               n_boundary, n_interior, n_infeasible, n_swaps, n_multi);
    end
    $display("mechanisms: boundary %0d interior %0d infeasible %0d swaps %0d multi-iteration runs %0d",
             n_boundary, n_interior, n_infeasible, n_swaps, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
