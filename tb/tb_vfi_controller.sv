// tb_vfi_controller: runs the iteration sequencer against a model pipeline
// that returns every issued point a fixed LAT cycles later. Checks the issue
// order (k fastest, then z), that every point is issued once per iteration,
// the bank flip after each iteration, iter_cnt, done, and that a run of
// n_iter iterations takes exactly n_iter * (NK*NZ + LAT) cycles. A second
// run checks restart and n_iter = 0.
module tb_vfi_controller;
  localparam int NK = 16, NZ = 4, IDXW = 4, ZW = 2, LAT = 37;
  localparam int NPT = NK * NZ;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            start;
  logic [31:0]     n_iter;
  logic            res_valid;
  logic            issue_valid;
  logic [IDXW-1:0] issue_k;
  logic [ZW-1:0]   issue_z;
  logic            rd_bank, busy, done;
  logic [31:0]     iter_cnt;
  logic [63:0]     cycle_cnt;

  vfi_controller #(.NK(NK), .NZ(NZ)) dut (.*);

  // model pipeline
  logic vq [LAT];
  always_ff @(posedge clk) begin
    vq[0] <= issue_valid & ~rst;
    for (int i = 1; i < LAT; i++) vq[i] <= vq[i-1] & ~rst;
  end
  assign res_valid = vq[LAT-1];

  int n_issued = 0, exp_k = 0, exp_z = 0, bank_flips = 0;
  logic last_bank;
  always @(posedge clk) begin
    if (!rst) begin
      if (issue_valid) begin
        checks++;
        if (int'(issue_k) != exp_k || int'(issue_z) != exp_z) begin
          failures++;
          $display("FAIL issue (%0d,%0d) exp (%0d,%0d)", issue_k, issue_z, exp_k, exp_z);
        end
        n_issued++;
        exp_k = exp_k + 1;
        if (exp_k == NK) begin exp_k = 0; exp_z = (exp_z + 1) % NZ; end
      end
      if (rd_bank != last_bank) bank_flips++;
      last_bank = rd_bank;
    end
  end

  task automatic run(input int iters);
    int flips0;
    @(posedge clk);
    flips0 = bank_flips;
    n_issued = 0;
    start <= 1; n_iter <= 32'(iters);
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    checks += 4;
    if (n_issued != iters * NPT) begin
      failures++; $display("FAIL issued %0d", n_issued);
    end
    if (iter_cnt != 32'(iters)) begin
      failures++; $display("FAIL iter_cnt %0d", iter_cnt);
    end
    if (cycle_cnt != 64'(iters * (NPT + LAT))) begin
      failures++; $display("FAIL cycles %0d exp %0d", cycle_cnt, iters * (NPT + LAT));
    end
    @(posedge clk);
    if (bank_flips - flips0 != iters) begin
      failures++; $display("FAIL bank flips %0d", bank_flips - flips0);
    end
  endtask

  initial begin
    start = 0; n_iter = '0; last_bank = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(3);
    run(0);
    run(2);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
