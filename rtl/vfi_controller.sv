// vfi_controller: sequences value function iterations on the peak-finding
// pipeline.
//
// After `start` it runs n_iter iterations. In each one it issues every grid
// point once, one per clock, with k running fastest and z slowest (the
// order (z1,k1), (z1,k2), ... of the design's assembly-line schedule). It
// then waits until the pipeline has returned all NK*NZ results, which the
// top writes into the value bank that is not being read, flips rd_bank so the
// next iteration reads the values just computed, and starts again. An
// iteration therefore costs NK*NZ cycles plus one pipeline drain; the
// design's solution-time estimate of iterations * NK * NZ / f_clk leaves the
// drain out. Stopping after a fixed count given by the host is this design's
// choice. done stays high from the end of the run until the next start.
// cycle_cnt counts the clocks spent busy; iter_cnt the finished iterations.
module vfi_controller #(
  parameter int NK = 65536,
  parameter int NZ = 4,
  localparam int IDXW = $clog2(NK),
  localparam int ZW   = (NZ > 1) ? $clog2(NZ) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [31:0]     n_iter,
  input  logic            res_valid,     // a result left the pipeline
  output logic            issue_valid,
  output logic [IDXW-1:0] issue_k,
  output logic [ZW-1:0]   issue_z,
  output logic            rd_bank,
  output logic            busy,
  output logic            done,
  output logic [31:0]     iter_cnt,
  output logic [63:0]     cycle_cnt
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;
  state_e state;

  localparam int NPT = NK * NZ;
  logic [$clog2(NPT+1)-1:0] res_cnt;

  assign issue_valid = (state == S_ISSUE);
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      issue_k   <= '0;
      issue_z   <= '0;
      rd_bank   <= 1'b0;
      done      <= 1'b0;
      iter_cnt  <= '0;
      cycle_cnt <= '0;
      res_cnt   <= '0;
    end else begin
      if (busy) cycle_cnt <= cycle_cnt + 1;
      if (res_valid && busy) res_cnt <= res_cnt + 1;
      case (state)
        S_IDLE: begin
          if (start) begin
            done      <= 1'b0;
            iter_cnt  <= '0;
            cycle_cnt <= '0;
            res_cnt   <= '0;
            issue_k   <= '0;
            issue_z   <= '0;
            if (n_iter == 0) done <= 1'b1;
            else state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (issue_k == IDXW'(NK - 1)) begin
            issue_k <= '0;
            if (issue_z == ZW'(NZ - 1)) begin
              issue_z <= '0;
              state   <= S_DRAIN;
            end else begin
              issue_z <= issue_z + 1'b1;
            end
          end else begin
            issue_k <= issue_k + 1'b1;
          end
        end
        S_DRAIN: begin
          if (res_valid && res_cnt == $bits(res_cnt)'(NPT - 1)) begin
            res_cnt  <= '0;
            rd_bank  <= ~rd_bank;
            iter_cnt <= iter_cnt + 1;
            if (iter_cnt + 1 == n_iter) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_ISSUE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A result may only arrive while a run is in progress.
  a_res_in_run: assert property (@(posedge clk) disable iff (rst) res_valid |-> busy);
endmodule
