// tb_search_stage: drives two search stages of a 64-point grid, a middle
// stage (n = 2, step 8, three indexes) and the last stage (n = 5, step 1,
// four indexes), with random search states, productivity states and wealth,
// one point per clock. The expected j*, h* and best value are computed in
// real arithmetic from the same tables. The capital grid has two plateaus
// with equal values so that exact ties occur, and wealth is sometimes below
// the grid so that infeasible candidates occur. Where two different
// candidates lie closer than the fixed-point error, the j* check is skipped.
// Also checks the 60-cycle stage latency and the value bank select.
module tb_search_stage;
  import vfi_pkg::*;
  import tb_util_pkg::*;

  localparam int NK = 64, NZ = 4, IDXW = 6, HW = 7, ZW = 2;
  localparam real ETA = 2.0;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0, skipped = 0;
  int code_seen [5];
  int n_inf = 0;

  logic            in_valid;
  logic [2:0]      in_jstar;
  logic [HW-1:0]   in_hstar;
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

  logic            ov [2];
  logic [2:0]      oj [2];
  logic [HW-1:0]   oh [2];
  fx_t             ovl [2];

  search_stage #(.NK(NK), .NZ(NZ), .STAGE(2), .LAST(1'b0)) dut_mid (
    .clk, .rst, .in_valid, .in_jstar, .in_hstar, .in_z, .in_w,
    .rd_bank, .one_m_eta, .inv_one_m_eta, .bq,
    .k_wr_en, .v_wr_en, .v_wr_bank, .wr_addr, .wr_data,
    .out_valid(ov[0]), .out_jstar(oj[0]), .out_hstar(oh[0]), .out_v(ovl[0]));

  search_stage #(.NK(NK), .NZ(NZ), .STAGE(5), .LAST(1'b1)) dut_last (
    .clk, .rst, .in_valid, .in_jstar, .in_hstar, .in_z, .in_w,
    .rd_bank, .one_m_eta, .inv_one_m_eta, .bq,
    .k_wr_en, .v_wr_en, .v_wr_bank, .wr_addr, .wr_data,
    .out_valid(ov[1]), .out_jstar(oj[1]), .out_hstar(oh[1]), .out_v(ovl[1]));

  // reference tables (the fixed-point values, as reals)
  real kg [NK];
  real vt [2][NK][NZ];
  real bqr [NZ][NZ];

  function automatic real obj(input int i, input int z, input real w, input int bank);
    real c, s;
    c = fx2r(r2fx(w)) - kg[i];
    if (c <= 0.0) return -1.0e30;
    s = 0.0;
    for (int m = 0; m < NZ; m++) s += vt[bank][i][m] * bqr[z][m];
    return -1.0 / c + s;
  endfunction

  typedef struct {
    int   hn_mid, hn_last;
    int   code_mid, code_last;
    bit   amb_mid, amb_last;
    real  v_mid, v_last;
    int   t;
  } exp_t;
  exp_t q[$];

  task automatic ref_stage(input int hn, input int step, input bit last, input int z,
                           input real w, input int bank,
                           output int code, output bit amb, output real best);
    real h [4];
    int  nj, j0;
    bit  e [4];
    real second;
    nj = last ? 4 : 3;
    j0 = last ? 0 : 1;
    for (int j = 0; j < nj; j++) h[j] = obj((hn + j0 + j) * step, z, w, bank);
    best = h[0];
    for (int j = 1; j < nj; j++) if (h[j] > best) best = h[j];
    for (int j = 0; j < nj; j++) e[j] = (h[j] == best);
    // ambiguous if a different value lies within the fixed-point error
    amb = 1'b0;
    for (int j = 0; j < nj; j++)
      if (!e[j] && best - h[j] < 2.0e-3) amb = 1'b1;
    code = 0;
    if (last) begin
      for (int j = nj - 1; j >= 0; j--) if (e[j]) code = j;
    end else begin
      case ({e[0], e[1], e[2]})
        3'b100: code = 0;
        3'b110: code = 1;
        3'b010: code = 2;
        3'b111: code = 2;
        3'b011: code = 3;
        3'b001: code = 4;
        default: code = 2;
      endcase
      if (best < -1.0e29) code = 0;
    end
    second = 0.0;
  endtask

  initial begin
    in_valid = 0; in_jstar = '0; in_hstar = '0; in_z = '0; in_w = '0;
    rd_bank = 0; k_wr_en = 0; v_wr_en = '0; v_wr_bank = 0; wr_addr = '0; wr_data = '0;
    one_m_eta = r2fx(1.0 - ETA); inv_one_m_eta = r2fx(1.0 / (1.0 - ETA));
    for (int a = 0; a < NZ; a++)
      for (int b = 0; b < NZ; b++) begin
        bq[a][b] = r2fx(0.984 * ((a == b) ? 0.7 : 0.1));
        bqr[a][b] = fx2r(bq[a][b]);
      end
    // grid: distinct values below 32, two plateaus above
    for (int i = 0; i < NK; i++) begin
      real k;
      k = (i < 32) ? 5.0 + 0.25 * i : 13.0 + 3.0 * ((i - 32) / 16);
      kg[i] = fx2r(r2fx(k));
      for (int b = 0; b < 2; b++)
        for (int m = 0; m < NZ; m++)
          vt[b][i][m] = fx2r(r2fx(10.0 * $ln(k) + 0.5 * m - 3.0 * b * $ln(k)));
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
    for (int pass = 0; pass < 2; pass++) begin
      @(posedge clk);
      rd_bank <= pass[0];
      for (int n = 0; n < 400; n++) begin
        exp_t e;
        int hn_m, hn_l, jin, hin, z;
        real w;
        // a common (h*, j*) input valid for both stages
        hn_m = $urandom_range(4);          // stage 2: h*(2) in 0..4
        jin  = (hn_m % 2) + 2 * $urandom_range(hn_m >= 3 ? 1 : 0);
        if (jin > hn_m) jin = hn_m % 2;
        hin  = (hn_m - jin) / 2;
        hn_l = hn_m;                        // stage 5 sees the same h*
        z = $urandom_range(NZ - 1);
        w = (n % 9 == 0) ? urand(4.0, 6.0) : urand(6.0, 30.0);
        ref_stage(hn_m, 8, 1'b0, z, w, pass, e.code_mid, e.amb_mid, e.v_mid);
        ref_stage(hn_l, 1, 1'b1, z, w, pass, e.code_last, e.amb_last, e.v_last);
        e.hn_mid = hn_m; e.hn_last = hn_l; e.t = cyc;
        q.push_back(e);
        in_valid <= 1; in_jstar <= 3'(jin); in_hstar <= HW'(hin);
        in_z <= ZW'(z); in_w <= r2fx(w);
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (STAGE_LAT + 5) @(posedge clk);
    end
    checks++;
    if (q.size() != 0 || code_seen[1] == 0 || code_seen[3] == 0 || code_seen[0] == 0 ||
        code_seen[2] == 0 || n_inf == 0) begin
      failures++;
      $display("FAIL: left %0d, codes %0d %0d %0d %0d %0d, infeasible %0d", q.size(),
               code_seen[0], code_seen[1], code_seen[2], code_seen[3], code_seen[4], n_inf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && ov[0]) begin
      exp_t e;
      e = q.pop_front();
      checks += 5;
      if (!ov[1] || cyc - e.t != STAGE_LAT + 1) begin
        failures++;
        $display("FAIL latency %0d", cyc - e.t);
      end
      if (oh[0] != HW'(e.hn_mid) || oh[1] != HW'(e.hn_last)) begin
        failures++;
        $display("FAIL hstar %0d/%0d exp %0d/%0d", oh[0], oh[1], e.hn_mid, e.hn_last);
      end
      if (e.v_mid < -1.0e29) begin
        n_inf++;
        if (ovl[0] != FX_MIN) begin failures++; $display("FAIL infeasible mid"); end
      end else if (rabs(fx2r(ovl[0]) - e.v_mid) > 2.0e-3) begin
        failures++;
        $display("FAIL v_mid %f exp %f", fx2r(ovl[0]), e.v_mid);
      end
      if (e.v_last >= -1.0e29 && rabs(fx2r(ovl[1]) - e.v_last) > 2.0e-3) begin
        failures++;
        $display("FAIL v_last %f exp %f", fx2r(ovl[1]), e.v_last);
      end
      if (e.amb_mid) skipped++;
      else begin
        code_seen[e.code_mid]++;
        if (oj[0] != 3'(e.code_mid)) begin
          failures++;
          $display("FAIL j* mid %0d exp %0d (h %0d)", oj[0], e.code_mid, e.hn_mid);
        end
      end
      if (!e.amb_last && oj[1] != 3'(e.code_last)) begin
        failures++;
        $display("FAIL j* last %0d exp %0d (h %0d)", oj[1], e.code_last, e.hn_last);
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
