// tb_objective_unit: streams random candidates (one per clock) through the
// objective pipeline with eta = 2 and eta = 0.5 and compares each output
// with the objective computed in real arithmetic:
//   h = (w-k')^(1-eta)/(1-eta) + sum_m V_m * bq_m
// Infeasible candidates (w <= k') must give FX_MIN. Checks the 51-cycle
// latency of the schedule.
module tb_objective_unit;
  import vfi_pkg::*;
  import tb_util_pkg::*;

  localparam int NZ = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid, out_valid;
  fx_t  w, kp, one_m_eta, inv_one_m_eta, h;
  fx_t  v_row [NZ];
  fx_t  bq [NZ];
  int   checks = 0, failures = 0, cyc = 0, n_inf = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  objective_unit #(.NZ(NZ)) dut (.*);

  typedef struct { real ref_v; real mag; bit inf; int t; } exp_t;
  exp_t q[$];
  int nout = 0;
  localparam int NOPS = 300;

  task automatic run(input real eta);
    one_m_eta     <= r2fx(1.0 - eta);
    inv_one_m_eta <= r2fx(1.0 / (1.0 - eta));
    @(posedge clk);
    for (int n = 0; n < NOPS; n++) begin
      exp_t e;
      real wr, kr, c, s;
      fx_t vv [NZ];
      fx_t bb [NZ];
      wr = urand(20.0, 80.0);
      kr = (n % 10 == 3) ? wr + urand(0.0, 5.0) : urand(5.0, wr - 0.2);
      s = 0.0;
      for (int m = 0; m < NZ; m++) begin
        vv[m] = r2fx(urand(-30.0, 5.0));
        bb[m] = r2fx(urand(0.0, 0.5));
        s += fx2r(vv[m]) * fx2r(bb[m]);
      end
      c = fx2r(r2fx(wr)) - fx2r(r2fx(kr));
      e.inf = (c <= 0.0);
      e.mag   = e.inf ? 0.0 :
                rabs($pow(c, fx2r(r2fx(1.0 - eta))) * fx2r(r2fx(1.0 / (1.0 - eta))));
      e.ref_v = e.inf ? 0.0 :
                $pow(c, fx2r(r2fx(1.0 - eta))) * fx2r(r2fx(1.0 / (1.0 - eta))) + s;
      e.t = cyc;
      q.push_back(e);
      in_valid <= 1'b1; w <= r2fx(wr); kp <= r2fx(kr);
      for (int m = 0; m < NZ; m++) begin v_row[m] <= vv[m]; bq[m] <= bb[m]; end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (OBJ_LAT + 5) @(posedge clk);
  endtask

  initial begin
    in_valid = 1'b0; w = '0; kp = '0;
    one_m_eta = '0; inv_one_m_eta = '0;
    for (int m = 0; m < NZ; m++) begin v_row[m] = '0; bq[m] = '0; end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(2.0);
    run(0.5);
    checks++;
    if (nout != 2 * NOPS || n_inf == 0) begin
      failures++;
      $display("FAIL: %0d results, %0d infeasible", nout, n_inf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      real got;
      e = q.pop_front();
      nout++;
      got = fx2r(h);
      checks += 2;
      if (cyc - e.t != OBJ_LAT + 1) begin
        failures++;
        $display("FAIL latency %0d", cyc - e.t);
      end
      if (e.inf) begin
        n_inf++;
        if (h != FX_MIN) begin failures++; $display("FAIL infeasible got %f", got); end
      end else if (rabs(got - e.ref_v) > 1.0e-4 * e.mag + 8.0 / (2.0 ** FX_FRAC)) begin
        failures++;
        $display("FAIL got=%f ref=%f", got, e.ref_v);
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
