// delay_line: a W-bit shift register of N clock cycles with synchronous
// reset to zero. N = 0 is a plain wire. Used to give each arithmetic
// operator the latency of the design's pipeline schedule and to carry side
// information (valid bits, indexes, wealth) alongside the data.
module delay_line #(
  parameter int W = 1,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [W-1:0] sr [N];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < N; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[N-1];
  end
endmodule
