// of_prev_flow_buf: previous-flow buffer, two line memories of previous-iteration flows.
//
// During an iteration the optical-flow memory is overwritten row by row, so the
// flows of the two rows above the row being fetched must be kept: `line_mid`
// holds row y and `line_up` row y-1 while row y+1 is read from the flow memory.
// Cycle t: `rd` with group address `addr` reads both lines. Cycle t+1: `row_up`
// and `row_mid` hold the two words; if `push` is set, `push_data` (row y+1 of the
// same group) is written into `line_mid` and the old row y word moves into
// `line_up`, so after a full row the buffer has moved down one line.
// Each word is one group: LANES (u, v) pairs. Depth MAXG groups per line.
module of_prev_flow_buf
  import of_pkg::*;
#(
  parameter int LANES = 4,
  parameter int MAXG  = 88,
  localparam int AW   = $clog2(MAXG)
) (
  input  logic                         clk,
  input  logic                         rd,
  input  logic [AW-1:0]                addr,
  input  logic                         push,
  input  logic [LANES*LANE_W-1:0]      push_data,
  output logic [LANES*LANE_W-1:0]      row_up,
  output logic [LANES*LANE_W-1:0]      row_mid
);
  logic [LANES*LANE_W-1:0] line_up  [MAXG];
  logic [LANES*LANE_W-1:0] line_mid [MAXG];
  logic [AW-1:0]           addr_q;

  always_ff @(posedge clk) begin
    if (rd) begin
      row_up  <= line_up[addr];
      row_mid <= line_mid[addr];
      addr_q  <= addr;
    end
    if (push) begin
      line_up[addr_q]  <= row_mid;
      line_mid[addr_q] <= push_data;
    end
  end
endmodule
