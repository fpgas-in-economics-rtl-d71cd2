// tb_pow_unit: streams one operand pair per clock through pow_unit and
// compares every result with x^p from real arithmetic (relative tolerance
// 1e-4 plus 2 LSB). Checks the 33-cycle latency, the non-positive flag and
// saturation of results above the fixed-point range.
module tb_pow_unit;
  import vfi_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid;
  fx_t  x, p, y;
  logic out_valid, nonpos;
  int   checks = 0, failures = 0;
  int   cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pow_unit dut (.*);

  typedef struct { fx_t x; fx_t p; int t; } op_t;
  op_t q[$];
  int  nout = 0;
  localparam int NOPS = 400;
  real ps [5] = '{-1.0, -2.0, 0.5, -0.5, 1.5};

  initial begin
    in_valid = 1'b0; x = '0; p = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < NOPS; n++) begin
      op_t o;
      real xr;
      if (n % 37 == 5)       xr = -urand(0.0, 3.0);      // non-positive
      else if (n % 41 == 7)  xr = 0.0;
      else                   xr = 2.0 ** urand(-7.0, 7.0);
      o.x = r2fx(xr);
      o.p = r2fx(ps[n % 5]);
      if (n == 11) begin o.x = r2fx(1.0 / 4096.0); o.p = r2fx(-2.0); end // saturates
      o.t = cyc;
      in_valid <= 1'b1; x <= o.x; p <= o.p;
      q.push_back(o);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (POW_LAT + 5) @(posedge clk);
    checks++;
    if (nout != NOPS) begin
      failures++;
      $display("FAIL: %0d results for %0d operands", nout, NOPS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      op_t o;
      real xr, pr, ref_v, got, tol;
      o = q.pop_front();
      nout++;
      xr = fx2r(o.x); pr = fx2r(o.p);
      got = fx2r(y);
      checks++;
      if (cyc - o.t != POW_LAT + 1) begin
        failures++;
        $display("FAIL latency %0d", cyc - o.t);
      end
      checks++;
      if (xr <= 0.0) begin
        if (!nonpos) begin failures++; $display("FAIL nonpos flag x=%f", xr); end
      end else begin
        ref_v = $pow(xr, pr);
        if (ref_v > fx2r(FX_MAX)) ref_v = fx2r(FX_MAX);
        tol = 1.0e-4 * ref_v + 2.0 / (2.0 ** FX_FRAC);
        if (nonpos || rabs(got - ref_v) > tol) begin
          failures++;
          $display("FAIL x=%f p=%f got=%f ref=%f", xr, pr, got, ref_v);
        end
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
