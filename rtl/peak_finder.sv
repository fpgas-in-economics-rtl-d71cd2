// peak_finder: the assembly line that maximises the Bellman objective over
// the NK-point capital grid for one grid point (k,z) per clock.
//
// NSTAGE = log2(NK) - 1 search stages (15 for NK = 65536) are chained; each
// halves the search range, and the last one (step 1) checks four neighbours.
// Stage n hands h*(n) and j*(n) to stage n+1, while a separate stage delay
// of STAGE_LAT cycles per stage carries the point's z, its wealth w(k,z)
// and its grid address (k, z) alongside, so every stage sees the inputs of
// the same point. The policy index is i* = h*(last) + j*(last) and the new
// value V(k,z) is the best objective value of the last stage.
// Latency: NSTAGE * STAGE_LAT cycles (900 at the default size); throughput
// one point per clock, so the pipeline holds NSTAGE * STAGE_LAT points.
// The table write port is broadcast to the memories of every stage.
module peak_finder
  import vfi_pkg::*;
#(
  parameter int NK = 65536,
  parameter int NZ = 4,
  localparam int IDXW   = $clog2(NK),
  localparam int HW     = IDXW + 1,
  localparam int ZW     = (NZ > 1) ? $clog2(NZ) : 1,
  localparam int NSTAGE = IDXW - 1
) (
  input  logic            clk,
  input  logic            rst,
  // one grid point per clock
  input  logic            in_valid,
  input  logic [IDXW-1:0] in_k,
  input  logic [ZW-1:0]   in_z,
  input  fx_t             in_w,
  // run constants
  input  logic            rd_bank,
  input  fx_t             one_m_eta,
  input  fx_t             inv_one_m_eta,
  input  fx_t             bq [NZ][NZ],
  // table write port
  input  logic            k_wr_en,
  input  logic [NZ-1:0]   v_wr_en,
  input  logic            v_wr_bank,
  input  logic [IDXW-1:0] wr_addr,
  input  fx_t             wr_data,
  // results
  output logic            out_valid,
  output logic [IDXW-1:0] out_k,
  output logic [ZW-1:0]   out_z,
  output fx_t             out_v,
  output logic [IDXW-1:0] out_policy
);
  localparam int TW = IDXW + ZW + FX_W;

  logic            sv [NSTAGE+1];
  logic [2:0]      sj [NSTAGE+1];
  logic [HW-1:0]   sh [NSTAGE+1];
  fx_t             sval [NSTAGE+1];
  logic [TW-1:0]   tag [NSTAGE+1];   // {k, z, w} along the stage delays

  assign sv[0]   = in_valid;
  assign sj[0]   = '0;
  assign sh[0]   = '0;
  assign sval[0] = '0;
  assign tag[0]  = {in_k, in_z, in_w};

  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    logic [ZW-1:0] tz;
    fx_t           tw;
    assign tz = tag[s][FX_W +: ZW];
    assign tw = fx_t'(tag[s][FX_W-1:0]);

    search_stage #(.NK(NK), .NZ(NZ), .STAGE(s + 1), .LAST(s == NSTAGE - 1)) u_stage (
      .clk, .rst,
      .in_valid(sv[s]), .in_jstar(sj[s]), .in_hstar(sh[s]), .in_z(tz), .in_w(tw),
      .rd_bank, .one_m_eta, .inv_one_m_eta, .bq,
      .k_wr_en, .v_wr_en, .v_wr_bank, .wr_addr, .wr_data,
      .out_valid(sv[s+1]), .out_jstar(sj[s+1]), .out_hstar(sh[s+1]), .out_v(sval[s+1]));

    delay_line #(.W(TW), .N(STAGE_LAT)) u_stage_delay (
      .clk, .rst, .d(tag[s]), .q(tag[s+1]));
  end

  assign out_valid  = sv[NSTAGE];
  assign out_k      = tag[NSTAGE][FX_W + ZW +: IDXW];
  assign out_z      = tag[NSTAGE][FX_W +: ZW];
  assign out_v      = sval[NSTAGE];
  assign out_policy = IDXW'(sh[NSTAGE] + HW'(sj[NSTAGE]));
endmodule
