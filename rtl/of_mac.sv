// of_mac: multiply-accumulate unit of the processing element (MAC1..MAC4).
//
// Three products are summed. Each multiplier operand comes through a multiplexer
// with NSRC inputs, so the sequence controller can reconfigure the data path by
// changing `sel` (one select for the whole unit, this design's simplification).
// Stage 1 registers the selected operands, stage 2 registers the three products,
// stage 3 registers the sum (the register after the adder is this design's choice).
// Latency is 3 cycles, one new operand set per cycle. `vi` travels with the data
// as `vo`.
module of_mac #(
  parameter int AW   = 24,             // operand A width (signed)
  parameter int BW   = 16,             // operand B width (signed)
  parameter int NSRC = 2,              // inputs per operand multiplexer
  parameter int SW   = AW + BW + 2,    // sum width
  localparam int SELW = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vi,
  input  logic [SELW-1:0]      sel,
  input  logic signed [AW-1:0] a [NSRC][3],
  input  logic signed [BW-1:0] b [NSRC][3],
  output logic                 vo,
  output logic signed [SW-1:0] sum
);
  logic signed [AW-1:0]    a_r [3];
  logic signed [BW-1:0]    b_r [3];
  logic signed [AW+BW-1:0] p_r [3];
  logic [1:0]              v_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        a_r[i] <= '0;
        b_r[i] <= '0;
        p_r[i] <= '0;
      end
      v_r <= '0;
      vo  <= 1'b0;
      sum <= '0;
    end else begin
      for (int i = 0; i < 3; i++) begin
        a_r[i] <= a[sel][i];
        b_r[i] <= b[sel][i];
        p_r[i] <= a_r[i] * b_r[i];
      end
      sum <= SW'(p_r[0]) + SW'(p_r[1]) + SW'(p_r[2]);
      v_r <= {v_r[0], vi};
      vo  <= v_r[1];
    end
  end
endmodule
