// of_delay: fixed-length shift register that delays a W-bit word by N clock cycles.
// Used to keep operands aligned with the pipelined units of the processing element.
// N = 0 is a wire. Reset clears every stage so that delayed valid bits start at 0.
module of_delay #(
  parameter int W = 1,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    logic [W-1:0] sr [N];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[N-1];
  end
endmodule
