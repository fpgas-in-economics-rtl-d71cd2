// vfi_top: value function iteration accelerator for the real business cycle
// (RBC) model
//
//   V(k,z) = max_k' (w(k,z) - k')^(1-eta)/(1-eta) + beta sum_z' V(k',z') Q(z',z)
//
// on a grid of NK capital points and NZ productivity states. The host loads
// the capital grid k'(i), the initial guess V0, the wealth table w(k,z), the
// matrix beta*Q(z',z) and the constants 1-eta and 1/(1-eta) through the write
// port, starts a run of n_iter iterations, and afterwards reads V(k,z) and
// the policy index i*(k,z) through the read port.
//
// Inside, vfi_controller streams the grid points, one per clock, through the
// peak_finder pipeline (log2(NK)-1 binary-search stages of 60 cycles each).
// Each result V(k,z) is written back into the value bank that the running
// iteration does not read, in the memories of every stage, and also into a
// result table that the host reads. When all NK*NZ results of an iteration
// are back, the banks swap.
//
// Host write port: host_wr_sel selects the table (see vfi_pkg::host_sel_e);
// addresses of two-dimensional tables are {z, k} (or {z, z'} for beta*Q).
// V0 is written into the bank the next run reads. Writes are only allowed
// while no run is in progress. Host read port: host_rd_addr = {z, k}; data
// one cycle later, from the last iteration that finished.
// The table interface and the result table are this design's own; the
// source describes the pipeline, not the host link.
module vfi_top
  import vfi_pkg::*;
#(
  parameter int NK = 65536,
  parameter int NZ = 4,
  localparam int IDXW = $clog2(NK),
  localparam int ZW   = (NZ > 1) ? $clog2(NZ) : 1,
  localparam int AW   = IDXW + ZW
) (
  input  logic            clk,
  input  logic            rst,
  // host table writes
  input  logic            host_wr_en,
  input  host_sel_e       host_wr_sel,
  input  logic [AW-1:0]   host_wr_addr,
  input  fx_t             host_wr_data,
  // run control
  input  logic            start,
  input  logic [31:0]     n_iter,
  output logic            busy,
  output logic            done,
  output logic [31:0]     iter_cnt,
  output logic [63:0]     cycle_cnt,
  // host result reads
  input  logic [AW-1:0]   host_rd_addr,
  output fx_t             host_rd_v,
  output logic [IDXW-1:0] host_rd_policy
);
  // ---------------- run constants ----------------
  fx_t one_m_eta, inv_one_m_eta;
  fx_t bq [NZ][NZ];

  logic [ZW-1:0]   hz;
  logic [IDXW-1:0] hk;
  assign hz = host_wr_addr[IDXW +: ZW];
  assign hk = host_wr_addr[IDXW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      one_m_eta     <= '0;
      inv_one_m_eta <= '0;
      for (int a = 0; a < NZ; a++)
        for (int b = 0; b < NZ; b++) bq[a][b] <= '0;
    end else if (host_wr_en) begin
      if (host_wr_sel == HOST_PARAM) begin
        if (host_wr_addr[0]) inv_one_m_eta <= host_wr_data;
        else                 one_m_eta     <= host_wr_data;
      end
      if (host_wr_sel == HOST_BQ)
        bq[hz][ZW'(hk)] <= host_wr_data;
    end
  end

  // ---------------- controller ----------------
  logic            iss_valid;
  logic [IDXW-1:0] iss_k;
  logic [ZW-1:0]   iss_z;
  logic            rd_bank;
  logic            res_valid;

  vfi_controller #(.NK(NK), .NZ(NZ)) u_ctrl (
    .clk, .rst, .start, .n_iter, .res_valid,
    .issue_valid(iss_valid), .issue_k(iss_k), .issue_z(iss_z),
    .rd_bank, .busy, .done, .iter_cnt, .cycle_cnt);

  // ---------------- wealth table ----------------
  logic [0:0][FX_W-1:0] w_rd [1];
  logic [AW-1:0]        w_ra [1];
  logic [0:0][FX_W-1:0] w_wd;
  assign w_ra[0] = {iss_z, iss_k};
  assign w_wd    = host_wr_data;

  stage_ram #(.DEPTH(NK * NZ), .LANES(1), .LANE_W(FX_W), .NRD(1)) u_wtab (
    .clk, .wr_en(host_wr_en && host_wr_sel == HOST_W), .wr_addr(host_wr_addr),
    .wr_data(w_wd), .rd_addr(w_ra), .rd_data(w_rd));

  logic            p_valid;
  logic [IDXW-1:0] p_k;
  logic [ZW-1:0]   p_z;
  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid <= 1'b0;
      p_k     <= '0;
      p_z     <= '0;
    end else begin
      p_valid <= iss_valid;
      p_k     <= iss_k;
      p_z     <= iss_z;
    end
  end

  // ---------------- pipeline and write-back ----------------
  logic            k_wr_en;
  logic [NZ-1:0]   v_wr_en;
  logic            v_wr_bank;
  logic [IDXW-1:0] wr_addr;
  fx_t             wr_data;

  logic [IDXW-1:0] r_k;
  logic [ZW-1:0]   r_z;
  fx_t             r_v;
  logic [IDXW-1:0] r_pol;

  always_comb begin
    k_wr_en   = 1'b0;
    v_wr_en   = '0;
    v_wr_bank = rd_bank;
    wr_addr   = hk;
    wr_data   = host_wr_data;
    if (res_valid) begin
      v_wr_en[r_z] = 1'b1;
      v_wr_bank    = ~rd_bank;
      wr_addr      = r_k;
      wr_data      = r_v;
    end else if (host_wr_en) begin
      k_wr_en = (host_wr_sel == HOST_KGRID);
      if (host_wr_sel == HOST_V0) v_wr_en[hz] = 1'b1;
    end
  end

  peak_finder #(.NK(NK), .NZ(NZ)) u_pf (
    .clk, .rst,
    .in_valid(p_valid), .in_k(p_k), .in_z(p_z), .in_w(fx_t'(w_rd[0][0])),
    .rd_bank, .one_m_eta, .inv_one_m_eta, .bq,
    .k_wr_en, .v_wr_en, .v_wr_bank, .wr_addr, .wr_data,
    .out_valid(res_valid), .out_k(r_k), .out_z(r_z), .out_v(r_v), .out_policy(r_pol));

  // ---------------- result table ----------------
  logic [1:0][FX_W-1:0] res_rd [1];
  logic [AW-1:0]        res_ra [1];
  logic [1:0][FX_W-1:0] res_wd;
  assign res_ra[0] = host_rd_addr;
  assign res_wd    = {FX_W'(r_pol), r_v};

  stage_ram #(.DEPTH(NK * NZ), .LANES(2), .LANE_W(FX_W), .NRD(1)) u_result (
    .clk, .wr_en({2{res_valid}}), .wr_addr({r_z, r_k}), .wr_data(res_wd),
    .rd_addr(res_ra), .rd_data(res_rd));

  assign host_rd_v      = fx_t'(res_rd[0][0]);
  assign host_rd_policy = IDXW'(res_rd[0][1]);

  // The host may not rewrite the tables while a run is in progress.
  a_no_host_write_in_run: assert property (@(posedge clk) disable iff (rst)
    host_wr_en |-> !busy);
endmodule
