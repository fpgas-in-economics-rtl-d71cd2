// search_stage: stage n of the pipelined three-point binary search for the
// maximiser k' of the Bellman objective over a grid of NK points.
//
// The stage keeps the search state of one grid point (k,z) as h*, the left
// end of the current search range in units of Step(n) = NK / 2^(n+1), and
// the code j* in 0..4 that the previous stage chose:
//   h*(n)   = 2 h*(n-1) + j*(n-1)
//   i(n,j)  = Step(n) * (h*(n) + j),  j = 1, 2, 3
// It looks up k'(i) and the row V(k'(i), z'_0..NZ-1) for the three indexes,
// evaluates the objective at all three in parallel and encodes the winner:
//   j* = 0  h1 is the unique max       j* = 3  h2 = h3 are the max
//   j* = 1  h1 = h2 are the max        j* = 4  h3 is the unique max
//   j* = 2  h2 is the unique max, or all three are equal
// The next range is [h*(n+1), h*(n+1)+4] in units of Step(n+1), centred on
// the winner. The case h1 = h3 > h2 (impossible for a single-peaked
// objective) is encoded as 2, this design's choice.
// Feasibility: a candidate with non-positive consumption w - k' scores
// FX_MIN. With an increasing capital grid the feasible indexes form a prefix
// of the grid, so when all three candidates are infeasible the stage moves
// left (j* = 0) instead of treating the tie as a plateau.
//
// The last stage (LAST = 1, Step = 1) evaluates four indexes, j = 0..3, so
// that grid index 0, which no earlier stage visits, can also win. Its
// out_jstar is the position 0..3 of the first maximum, and the final policy
// index is h* + j*.
//
// Timing (cycles after the inputs): index selection and memory access 5,
// objective 51, comparison and output 4; STAGE_LAT = 60. One grid point per
// clock. Stage 1 is fed h*(0) = 0 and j*(0) = 0.
// The memories are this stage's own copies, all written through the same
// broadcast write port (host load and value write-back).
module search_stage
  import vfi_pkg::*;
#(
  parameter int NK    = 65536,
  parameter int NZ    = 4,
  parameter int STAGE = 1,
  parameter bit LAST  = 1'b0,
  localparam int IDXW = $clog2(NK),
  localparam int HW   = IDXW + 1,
  localparam int ZW   = (NZ > 1) ? $clog2(NZ) : 1
) (
  input  logic            clk,
  input  logic            rst,
  // search state from the previous stage
  input  logic            in_valid,
  input  logic [2:0]      in_jstar,
  input  logic [HW-1:0]   in_hstar,
  input  logic [ZW-1:0]   in_z,
  input  fx_t             in_w,
  // run constants
  input  logic            rd_bank,
  input  fx_t             one_m_eta,
  input  fx_t             inv_one_m_eta,
  input  fx_t             bq [NZ][NZ],      // bq[z][m] = beta * Q(z'_m, z)
  // table write port (broadcast to every stage)
  input  logic            k_wr_en,
  input  logic [NZ-1:0]   v_wr_en,
  input  logic            v_wr_bank,
  input  logic [IDXW-1:0] wr_addr,
  input  fx_t             wr_data,
  // result
  output logic            out_valid,
  output logic [2:0]      out_jstar,
  output logic [HW-1:0]   out_hstar,
  output fx_t             out_v
);
  localparam int NJ      = LAST ? 4 : 3;
  localparam int J_FIRST = LAST ? 0 : 1;
  localparam int SHIFT   = IDXW - STAGE - 1;

  // ---------------- index selection ----------------
  logic [HW-1:0] hn;
  assign hn = (in_hstar << 1) + HW'(in_jstar);

  logic            s1_valid;
  logic [HW-1:0]   s1_h;
  logic [ZW-1:0]   s1_z;
  fx_t             s1_w;
  logic [IDXW-1:0] s1_idx [NJ];

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_h     <= '0;
      s1_z     <= '0;
      s1_w     <= '0;
      for (int j = 0; j < NJ; j++) s1_idx[j] <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_h     <= hn;
      s1_z     <= in_z;
      s1_w     <= in_w;
      for (int j = 0; j < NJ; j++)
        s1_idx[j] <= IDXW'((hn + HW'(J_FIRST + j)) << SHIFT);
    end
  end

  // ---------------- memory access ----------------
  logic [0:0][FX_W-1:0]    k_rd [NJ];
  logic [NZ-1:0][FX_W-1:0] v_rd [NJ];
  logic [IDXW:0]           v_rd_addr [NJ];
  logic [0:0][FX_W-1:0]    k_wd;
  logic [NZ-1:0][FX_W-1:0] v_wd;

  assign k_wd = wr_data;
  assign v_wd = {NZ{wr_data}};
  for (genvar j = 0; j < NJ; j++) begin : g_addr
    assign v_rd_addr[j] = {rd_bank, s1_idx[j]};
  end

  stage_ram #(.DEPTH(NK), .LANES(1), .LANE_W(FX_W), .NRD(NJ)) u_kgrid (
    .clk, .wr_en(k_wr_en), .wr_addr(wr_addr), .wr_data(k_wd),
    .rd_addr(s1_idx), .rd_data(k_rd));

  stage_ram #(.DEPTH(2 * NK), .LANES(NZ), .LANE_W(FX_W), .NRD(NJ)) u_vmem (
    .clk, .wr_en(v_wr_en), .wr_addr({v_wr_bank, wr_addr}), .wr_data(v_wd),
    .rd_addr(v_rd_addr), .rd_data(v_rd));

  // Align table data (valid one cycle after s1) and side information at
  // cycle SEL_LAT.
  localparam int SBW = 1 + HW + ZW + FX_W;
  logic            s5_valid;
  logic [HW-1:0]   s5_h;
  logic [ZW-1:0]   s5_z;
  fx_t             s5_w;
  delay_line #(.W(SBW), .N(SEL_LAT - 1)) u_sb5 (
    .clk, .rst, .d({s1_valid, s1_h, s1_z, s1_w}), .q({s5_valid, s5_h, s5_z, s5_w}));

  fx_t kp5 [NJ];
  fx_t v5  [NJ][NZ];
  for (genvar j = 0; j < NJ; j++) begin : g_align
    logic [FX_W-1:0]          kq;
    logic [NZ-1:0][FX_W-1:0]  vq;
    delay_line #(.W(FX_W), .N(SEL_LAT - 2)) u_kd (
      .clk, .rst, .d(k_rd[j][0]), .q(kq));
    delay_line #(.W(NZ * FX_W), .N(SEL_LAT - 2)) u_vd (
      .clk, .rst, .d(v_rd[j]), .q(vq));
    assign kp5[j] = fx_t'(kq);
    for (genvar m = 0; m < NZ; m++) begin : g_lane
      assign v5[j][m] = fx_t'(vq[m]);
    end
  end

  // ---------------- objective evaluation ----------------
  fx_t bq_row [NZ];
  always_comb begin
    for (int m = 0; m < NZ; m++) bq_row[m] = bq[s5_z][m];
  end

  fx_t  hval [NJ];
  logic hv   [NJ];
  for (genvar j = 0; j < NJ; j++) begin : g_obj
    objective_unit #(.NZ(NZ)) u_obj (
      .clk, .rst, .in_valid(s5_valid), .w(s5_w), .kp(kp5[j]),
      .one_m_eta, .inv_one_m_eta, .v_row(v5[j]), .bq(bq_row),
      .out_valid(hv[j]), .h(hval[j]));
  end

  logic [HW-1:0] s56_h;
  delay_line #(.W(HW), .N(OBJ_LAT)) u_sb56 (
    .clk, .rst, .d(s5_h), .q(s56_h));

  // ---------------- comparison ----------------
  fx_t        best;
  logic [2:0] code;
  always_comb begin
    best = hval[0];
    for (int j = 1; j < NJ; j++) if (hval[j] > best) best = hval[j];
    code = '0;
    if (LAST) begin
      for (int j = NJ - 1; j >= 0; j--) if (hval[j] == best) code = 3'(j);
    end else begin
      logic e1, e2, e3;
      e1 = (hval[0] == best);
      e2 = (hval[1] == best);
      e3 = (hval[2] == best);
      case ({e1, e2, e3})
        3'b100:  code = 3'd0;
        3'b110:  code = 3'd1;
        3'b010:  code = 3'd2;
        3'b111:  code = 3'd2;
        3'b011:  code = 3'd3;
        3'b001:  code = 3'd4;
        default: code = 3'd2;   // h1 = h3 > h2
      endcase
      // All three infeasible: the feasible set is a prefix of the grid,
      // so the maximiser lies to the left.
      if (best == FX_MIN) code = 3'd0;
    end
  end

  delay_line #(.W(1 + 3 + HW + FX_W), .N(CMP_LAT)) u_out (
    .clk, .rst, .d({hv[0], code, s56_h, best}),
    .q({out_valid, out_jstar, out_hstar, out_v}));
endmodule
