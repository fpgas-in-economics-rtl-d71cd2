// tb_stage_ram: random lane-masked writes and reads on three read ports,
// compared with a reference array; read data must appear one cycle after
// the address and show the old word when the same word is written.
module tb_stage_ram;
  localparam int DEPTH = 32, LANES = 2, LANE_W = 16, NRD = 3;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic [LANES-1:0]             wr_en;
  logic [AW-1:0]                wr_addr;
  logic [LANES-1:0][LANE_W-1:0] wr_data;
  logic [AW-1:0]                rd_addr [NRD];
  logic [LANES-1:0][LANE_W-1:0] rd_data [NRD];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stage_ram #(.DEPTH(DEPTH), .LANES(LANES), .LANE_W(LANE_W), .NRD(NRD)) dut (.*);

  logic [LANES-1:0][LANE_W-1:0] model [DEPTH];
  logic [LANES-1:0][LANE_W-1:0] expd [NRD];

  initial begin
    wr_en = '0; wr_addr = '0; wr_data = '0;
    for (int r = 0; r < NRD; r++) rd_addr[r] = '0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = '1; wr_addr = AW'(a); wr_data = {16'(a * 7 + 1), 16'(a * 13 + 5)};
      model[a] = wr_data;
    end
    // random traffic
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int r = 0; r < NRD; r++) begin
        rd_addr[r] = AW'($urandom_range(DEPTH - 1));
        expd[r] = model[rd_addr[r]];
      end
      wr_en = LANES'($urandom_range(3));
      wr_addr = (n % 5 == 0) ? rd_addr[0] : AW'($urandom_range(DEPTH - 1));
      wr_data = {16'($urandom), 16'($urandom)};
      for (int l = 0; l < LANES; l++) if (wr_en[l]) model[wr_addr][l] = wr_data[l];
      @(posedge clk);
      #1;
      for (int r = 0; r < NRD; r++) begin
        checks++;
        if (rd_data[r] !== expd[r]) begin
          failures++;
          $display("FAIL port %0d addr %0d got %h exp %h", r, rd_addr[r], rd_data[r], expd[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
