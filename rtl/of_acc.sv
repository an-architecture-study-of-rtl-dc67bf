// of_acc: difference accumulator (ACC) of the common element.
//
// Adds the DIFF results of the lanes whose `vi` bit is set to a running sum that
// holds the total squared flow change of the current iteration; the sequence
// controller compares it with the convergence threshold. `clear` zeroes the sum
// (and takes precedence over a same-cycle addition). The sum saturates at its
// maximum instead of wrapping. Registered, one cycle from input to sum.
module of_acc
  import of_pkg::*;
#(
  parameter int LANES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [LANES-1:0]  vi,
  input  logic [DIFF_W-1:0] diff [LANES],
  output logic [DIFF_W-1:0] sum
);
  logic [DIFF_W+2:0] nxt;
  always_comb begin
    nxt = (DIFF_W+3)'(sum);
    for (int i = 0; i < LANES; i++)
      if (vi[i]) nxt += (DIFF_W+3)'(diff[i]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    sum <= '0;
    else if (clear)                sum <= '0;
    else if (|nxt[DIFF_W+2:DIFF_W]) sum <= '1;
    else                           sum <= nxt[DIFF_W-1:0];
  end
endmodule
