// pow_unit: fixed-point power function y = x^p for x > 0, computed as
// exp2(p * log2(x)) in a fully pipelined datapath of POW_LAT = 33 cycles
// that accepts a new operand pair every clock.
//
// Pipeline (one register per step):
//   1 cycle   normalise: x = 2^e * m with m in [1,2) held as unsigned Q2.30
//  15 cycles  log2 fraction, one bit per cycle by repeated squaring of m
//             (m^2 >= 2 gives a 1 bit and halves m)
//   1 cycle   y = p * (e + fraction), split into integer part yi and the top
//             15 fractional bits yf
//  15 cycles  exp2(yf) as a running product of 2^(2^-i) for each set bit
//   1 cycle   scale by 2^yi into the Q15.16 result, saturating at FX_MAX
//
// The 33-cycle latency and the use of one logarithm and one exponential
// follow the design's objective-function diagram and its operation count;
// the log2/exp2 digit-by-digit method is this implementation's choice.
// `nonpos` flags x <= 0 (no real power); the value output is then 0.
// Accuracy: about 2^-15 relative, plus truncation in the last bit.
module pow_unit
  import vfi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  fx_t  x,
  input  fx_t  p,
  output logic out_valid,
  output fx_t  y,
  output logic nonpos
);
  localparam int LB = POW_LOG_BITS;
  localparam int EB = POW_EXP_BITS;

  // ---------------- normalise ----------------
  function automatic int msb_pos(input logic [FX_W-1:0] v);
    int r;
    r = 0;
    for (int i = 0; i < FX_W; i++) if (v[i]) r = i;
    return r;
  endfunction

  logic               n_valid, n_np;
  logic signed [7:0]  n_e;
  logic [31:0]        n_m;
  fx_t                n_p;

  always_ff @(posedge clk) begin
    if (rst) begin
      n_valid <= 1'b0;
      n_np    <= 1'b0;
      n_e     <= '0;
      n_m     <= '0;
      n_p     <= '0;
    end else begin
      int mp;
      mp = msb_pos(x);
      n_valid <= in_valid;
      n_np    <= (x <= 0);
      n_e     <= 8'(mp - FX_FRAC);
      n_m     <= (x <= 0) ? 32'h4000_0000 : 32'((64'(unsigned'(x)) << 30) >> mp);
      n_p     <= p;
    end
  end

  // ---------------- log2 fraction ----------------
  logic               l_valid [LB+1];
  logic               l_np    [LB+1];
  logic signed [7:0]  l_e     [LB+1];
  logic [31:0]        l_m     [LB+1];
  logic [LB-1:0]      l_f     [LB+1];
  fx_t                l_p     [LB+1];

  assign l_valid[0] = n_valid;
  assign l_np[0]    = n_np;
  assign l_e[0]     = n_e;
  assign l_m[0]     = n_m;
  assign l_f[0]     = '0;
  assign l_p[0]     = n_p;

  for (genvar s = 0; s < LB; s++) begin : g_log
    logic [32:0] sq;   // m^2 in Q2.30 (below 4, so bit 32 is always zero)
    assign sq = 33'((64'(l_m[s]) * 64'(l_m[s])) >> 30);
    always_ff @(posedge clk) begin
      if (rst) begin
        l_valid[s+1] <= 1'b0;
        l_np[s+1]    <= 1'b0;
        l_e[s+1]     <= '0;
        l_m[s+1]     <= '0;
        l_f[s+1]     <= '0;
        l_p[s+1]     <= '0;
      end else begin
        l_valid[s+1] <= l_valid[s];
        l_np[s+1]    <= l_np[s];
        l_e[s+1]     <= l_e[s];
        l_p[s+1]     <= l_p[s];
        if (sq[31]) begin
          l_m[s+1] <= sq[32:1];
          l_f[s+1] <= {l_f[s][LB-2:0], 1'b1};
        end else begin
          l_m[s+1] <= sq[31:0];
          l_f[s+1] <= {l_f[s][LB-2:0], 1'b0};
        end
      end
    end
  end

  // ---------------- y = p * log2(x) ----------------
  logic signed [31:0] lg;       // log2(x) in Q.LB
  logic signed [63:0] prod;     // p * log2(x) in Q.(FX_FRAC+LB)
  assign lg   = (32'(l_e[LB]) <<< LB) | 32'(l_f[LB]);
  assign prod = 64'(l_p[LB]) * 64'(lg);

  logic               m_valid, m_np;
  logic signed [7:0]  m_yi;
  logic [EB-1:0]      m_yf;

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      m_np    <= 1'b0;
      m_yi    <= '0;
      m_yf    <= '0;
    end else begin
      logic signed [63:0] yi_full;
      yi_full = prod >>> (FX_FRAC + LB);
      m_valid <= l_valid[LB];
      m_np    <= l_np[LB];
      if (yi_full > 64)       m_yi <= 8'sd64;
      else if (yi_full < -64) m_yi <= -8'sd64;
      else                    m_yi <= 8'(yi_full);
      m_yf    <= prod[FX_FRAC+LB-1 -: EB];
    end
  end

  // ---------------- exp2 of the fraction ----------------
  logic               e_valid [EB+1];
  logic               e_np    [EB+1];
  logic signed [7:0]  e_yi    [EB+1];
  logic [EB-1:0]      e_yf    [EB+1];
  logic [31:0]        e_acc   [EB+1];   // unsigned Q2.30, in [1,2)

  assign e_valid[0] = m_valid;
  assign e_np[0]    = m_np;
  assign e_yi[0]    = m_yi;
  assign e_yf[0]    = m_yf;
  assign e_acc[0]   = 32'h4000_0000;

  for (genvar s = 0; s < EB; s++) begin : g_exp
    // bit EB-1-s of the fraction has weight 2^-(s+1)
    logic [31:0] mp;   // product stays below 2 in Q2.30
    assign mp = 32'((64'(e_acc[s]) * 64'(exp2_root(s + 1))) >> 30);
    always_ff @(posedge clk) begin
      if (rst) begin
        e_valid[s+1] <= 1'b0;
        e_np[s+1]    <= 1'b0;
        e_yi[s+1]    <= '0;
        e_yf[s+1]    <= '0;
        e_acc[s+1]   <= '0;
      end else begin
        e_valid[s+1] <= e_valid[s];
        e_np[s+1]    <= e_np[s];
        e_yi[s+1]    <= e_yi[s];
        e_yf[s+1]    <= e_yf[s];
        e_acc[s+1]   <= e_yf[s][EB-1-s] ? mp : e_acc[s];
      end
    end
  end

  // ---------------- scale by 2^yi ----------------
  // result (Q.FX_FRAC) = acc (Q2.30) * 2^yi >> (30 - FX_FRAC)
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      nonpos    <= 1'b0;
      y         <= '0;
    end else begin
      int sh;
      logic [127:0] big;
      sh = int'(e_yi[EB]) - (30 - FX_FRAC);
      out_valid <= e_valid[EB];
      nonpos    <= e_np[EB];
      if (e_np[EB]) begin
        y <= '0;
      end else if (sh >= 0) begin
        big = 128'(e_acc[EB]) << sh;
        y <= (big > 128'(FX_MAX)) ? FX_MAX : fx_t'(big);
      end else if (sh <= -64) begin
        y <= '0;
      end else begin
        y <= fx_t'(64'(e_acc[EB]) >> (-sh));
      end
    end
  end
endmodule
