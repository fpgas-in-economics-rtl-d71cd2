// objective_unit: pipelined evaluation of the Bellman objective for one
// candidate next-period capital k',
//
//   h(k,z,k') = (w - k')^(1-eta) / (1-eta) + sum_z' V(k',z') * betaQ(z',z)
//
// where w = w(k,z) = z k^alpha + (1-delta) k is the agent's wealth. The two
// branches run side by side and meet in a final adder, with the latencies of
// the design's schedule:
//   utility branch   subtract (8) -> power (33) -> multiply by 1/(1-eta) (5)
//   expectation      Nz multiplies (5) -> adder tree (5 per level, 2 levels
//                    for Nz = 4) -> delay that waits for the other branch (31)
//   final add (5)    total OBJ_LAT = 51 cycles, one new k' per clock.
// A non-positive consumption w - k' is infeasible and yields FX_MIN, so the
// comparison stage never selects it. Each operator is computed in one
// cycle and then padded to its scheduled latency with registers.
// Interface: in_valid qualifies the inputs; out_valid/h appear OBJ_LAT
// cycles later. one_m_eta and inv_one_m_eta are run constants.
module objective_unit
  import vfi_pkg::*;
#(
  parameter int NZ = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  fx_t  w,
  input  fx_t  kp,
  input  fx_t  one_m_eta,
  input  fx_t  inv_one_m_eta,
  input  fx_t  v_row [NZ],   // V(k', z'_m), m = 0..NZ-1
  input  fx_t  bq    [NZ],   // beta * Q(z'_m, z)
  output logic out_valid,
  output fx_t  h
);
  localparam int TREE_LVL = (NZ > 1) ? $clog2(NZ) : 1;
  localparam int BR_B_WAIT = SUB_LAT + POW_LAT + MUL_LAT - MUL_LAT - ADD_LAT * TREE_LVL;

  // ---------------- utility branch ----------------
  fx_t  cons, cons_d;
  logic v_d;
  assign cons = fx_sub(w, kp);
  delay_line #(.W(FX_W + 1), .N(SUB_LAT)) u_sub (
    .clk, .rst, .d({in_valid, cons}), .q({v_d, cons_d}));

  fx_t  pw;
  logic pw_valid, pw_np;
  pow_unit u_pow (
    .clk, .rst, .in_valid(v_d), .x(cons_d), .p(one_m_eta),
    .out_valid(pw_valid), .y(pw), .nonpos(pw_np));

  fx_t  util, util_d;
  logic util_np, util_v;
  assign util = fx_mul(pw, inv_one_m_eta);
  delay_line #(.W(FX_W + 2), .N(MUL_LAT)) u_mulu (
    .clk, .rst, .d({pw_valid, pw_np, util}), .q({util_v, util_np, util_d}));

  // ---------------- expectation branch ----------------
  fx_t prod [NZ];
  fx_t prod_d [NZ];
  for (genvar m = 0; m < NZ; m++) begin : g_mul
    assign prod[m] = fx_mul(v_row[m], bq[m]);
    delay_line #(.W(FX_W), .N(MUL_LAT)) u_mul (
      .clk, .rst, .d(prod[m]), .q(prod_d[m]));
  end

  fx_t ev, ev_d;
  always_comb begin
    ev = '0;
    for (int m = 0; m < NZ; m++) ev = fx_add(ev, prod_d[m]);
  end
  delay_line #(.W(FX_W), .N(ADD_LAT * TREE_LVL + BR_B_WAIT)) u_tree (
    .clk, .rst, .d(ev), .q(ev_d));

  // ---------------- final add ----------------
  fx_t hsum;
  assign hsum = util_np ? FX_MIN : fx_add(util_d, ev_d);
  delay_line #(.W(FX_W + 1), .N(ADD_LAT)) u_add (
    .clk, .rst, .d({util_v, hsum}), .q({out_valid, h}));
endmodule
