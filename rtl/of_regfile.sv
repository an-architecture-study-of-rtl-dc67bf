// of_regfile: register file holding the flow neighbourhood seen by the PEs.
//
// It keeps a window of 3 rows x 3 pixel groups (a group is LANES horizontally
// adjacent pixels) of previous-iteration flows. Each `shift` moves the window one
// group to the right: the new right-hand column (rows y-1, y, y+1) comes in on
// `col_in`. The PEs work on the middle group: for lane k the outputs are its own
// old flow `ctr[k]` and its eight neighbours `nb[k][0..7]` in the order
// (-1,-1) (-1,0) (-1,+1) (0,-1) (0,+1) (+1,-1) (+1,0) (+1,+1), as (dy,dx).
// Outputs are combinational from the window registers; reset clears the window.
// The document names the register file only; this window organisation is this
// design's choice.
module of_regfile
  import of_pkg::*;
#(
  parameter int LANES = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      shift,
  input  flow_vec_t col_in [3][LANES],   // [row: 0 = y-1, 1 = y, 2 = y+1][lane]
  output flow_vec_t nb     [LANES][8],
  output flow_vec_t ctr    [LANES]
);
  localparam int NP = 3 * LANES;   // pixels across the window
  flow_vec_t win [3][NP];          // [row][pixel], pixel LANES..2*LANES-1 is the middle group

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++)
        for (int p = 0; p < NP; p++) win[r][p] <= '0;
    end else if (shift) begin
      for (int r = 0; r < 3; r++) begin
        for (int p = 0; p < NP - LANES; p++) win[r][p] <= win[r][p + LANES];
        for (int k = 0; k < LANES; k++)      win[r][NP - LANES + k] <= col_in[r][k];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      ctr[k]   = win[1][LANES + k];
      nb[k][0] = win[0][LANES + k - 1];
      nb[k][1] = win[0][LANES + k];
      nb[k][2] = win[0][LANES + k + 1];
      nb[k][3] = win[1][LANES + k - 1];
      nb[k][4] = win[1][LANES + k + 1];
      nb[k][5] = win[2][LANES + k - 1];
      nb[k][6] = win[2][LANES + k];
      nb[k][7] = win[2][LANES + k + 1];
    end
  end
endmodule
