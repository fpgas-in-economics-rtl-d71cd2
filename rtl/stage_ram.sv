// stage_ram: synchronous RAM with NRD independent read ports and one write
// port with per-lane write enables. Each search stage holds its own copies of
// the two tables it looks up: the capital grid k'(i) (one lane) and the
// previous value function V(k', z') (NZ lanes per word, one word per k', two
// banks selected by the top address bit so that one iteration reads one bank
// while the other receives the new values).
// Timing: the read data of an address presented at a rising edge is valid
// after that edge (one cycle latency). A write and a read of the same word
// in the same cycle returns the old word.
// Replicating the tables per stage is how the design gives every stage its
// own memory access step; the port count and latency are this design's
// choice.
module stage_ram #(
  parameter int DEPTH  = 1024,
  parameter int LANES  = 1,
  parameter int LANE_W = 32,
  parameter int NRD    = 3,
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                          clk,
  input  logic [LANES-1:0]              wr_en,
  input  logic [AW-1:0]                 wr_addr,
  input  logic [LANES-1:0][LANE_W-1:0]  wr_data,
  input  logic [AW-1:0]                 rd_addr [NRD],
  output logic [LANES-1:0][LANE_W-1:0]  rd_data [NRD]
);
  logic [LANES-1:0][LANE_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      if (wr_en[l]) mem[wr_addr][l] <= wr_data[l];
  end

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    always_ff @(posedge clk) rd_data[r] <= mem[rd_addr[r]];
  end
endmodule
