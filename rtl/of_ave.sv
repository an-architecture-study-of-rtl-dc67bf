// of_ave: local average of the eight neighbouring optical flows (AVE).
//
// Sums the eight neighbour values of one flow component and divides by eight with
// an arithmetic right shift (rounding toward minus infinity, this design's choice).
// Registered output, latency 1 cycle. Two instances per PE give u-bar and v-bar.
module of_ave #(
  parameter int W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x [8],
  output logic signed [W-1:0] avg
);
  logic signed [W+2:0] s;
  always_comb begin
    s = '0;
    for (int i = 0; i < 8; i++) s += (W+3)'(x[i]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) avg <= '0;
    else        avg <= W'(s >>> 3);
  end
endmodule
