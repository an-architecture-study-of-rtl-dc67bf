// of_ce: common element (CE), the four-way SIMD data path of the processor.
//
// LANES processing elements (of_pe) work on LANES horizontally adjacent pixels in
// lock step under one mode and one valid; the ACC (of_acc) adds up the per-lane
// squared flow changes of an iteration. In MODE_ITER a set of neighbourhoods and
// gradients enters per clock and the updated flows leave PE_ITER_LAT cycles later
// on flow_vo; in MODE_FILTER a set of filter taps enters and the filtered words
// leave PE_FILT_LAT cycles later on filt_vo. `acc_sum` lags flow_vo by one cycle.
module of_ce
  import of_pkg::*;
#(
  parameter int LANES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              vi,
  input  mode_e             mode,
  input  flow_vec_t         nb   [LANES][8],
  input  flow_vec_t         ctr  [LANES],
  input  grad_vec_t         g    [LANES],
  input  logic [GRAD_W-2:0] alpha,
  input  grad_t             taps [LANES][3],
  input  coef_t             coef [3],
  input  logic              acc_clear,
  output logic              flow_vo,
  output flow_vec_t         flow_new [LANES],
  output logic              filt_vo,
  output grad_t             filt [LANES],
  output logic [DIFF_W-1:0] acc_sum
);
  logic [LANES-1:0]  fv, tv;
  logic [DIFF_W-1:0] diff [LANES];

  for (genvar k = 0; k < LANES; k++) begin : g_pe
    of_pe u_pe (
      .clk, .rst_n, .vi, .mode, .nb(nb[k]), .ctr(ctr[k]), .g(g[k]), .alpha,
      .taps(taps[k]), .coef, .flow_vo(fv[k]), .flow_new(flow_new[k]), .diff(diff[k]),
      .filt_vo(tv[k]), .filt(filt[k]));
  end

  // all lanes share one valid, lane 0 speaks for the group
  assign flow_vo = fv[0];
  assign filt_vo = tv[0];

  of_acc #(.LANES(LANES)) u_acc (.clk, .rst_n, .clear(acc_clear), .vi(fv), .diff, .sum(acc_sum));
endmodule
