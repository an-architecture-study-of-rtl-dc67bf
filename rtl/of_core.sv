// of_core: optical-flow processor core with one common element (CE).
//
// The core computes dense optical flow by iterating equation (1) of the
// Horn-Schunck family over a whole frame:
//   u' = u_bar - Ix (Ix u_bar + Iy v_bar + It) / (a^2 + Ix^2 + Iy^2),  v' likewise with Iy,
// where u_bar, v_bar are the means of the eight neighbouring flows of the previous
// iteration. One CE of LANES processing elements updates LANES adjacent pixels per
// clock; NUM_CE > 1 places several CEs side by side on one wider pixel group, the
// CEs seeing each other's boundary flows through the shared register file (the
// document's multi-CE scaling; one CE is its main configuration and the default).
// With NL = LANES x NUM_CE lanes, around the CEs sit the optical-flow memory
// (2 x NL two-port banks, one per lane and flow component, read and rewritten
// every iteration), the gradient memory (3 x NL single-port banks, one per lane
// and gradient), the previous-flow
// buffer and register file that present each pixel's 3x3 neighbourhood, the input
// and output data buffers towards the bus, and the sequence controller.
//
// Operations (set `mode`, pulse `start`, wait for `done`):
//   MODE_FILTER  each input word carries three 16-bit taps per lane; the CE forms
//                c0*e0 + c1*e1 + c2*e2 per lane and writes it to the gradient plane
//                `dest` (Ix, Iy, It) or to the output buffer. The separable passes of
//                the gradient filters and of the pyramid smoothing run this way.
//   MODE_LOAD    each input word carries one (u, v) pair per lane: initial flows.
//   MODE_ITER    iterates until the summed squared change of an iteration is at most
//                `threshold` or `max_iter` iterations have run; see `iter_count`,
//                `converged`, `acc_sum`.
//   MODE_READ    streams the flows out, one group of NL (u, v) pairs per word.
// Frames are up to WIDTH x HEIGHT; `img_g` (groups per row, width / NL) and
// `img_h` give the size used. Data words are addressed in raster order of groups.
// Bus words: lane k occupies bits [48k+47 : 48k]; a flow pair is {u, v}, three taps
// are {e0, e1, e2}, a filter result is sign-extended to 48 bits.
//
// Timing: an iteration takes (img_h + 1) x (img_g + 1) clocks plus a pipeline drain
// of about 40 clocks, i.e. about 25,700 clocks for CIF (352 x 288). Flows outside
// the frame count as zero in the neighbour average, this design's choice.
// The block structure and the memory organisation follow the document; number
// formats, bus format, operation set and sweep order are this design's own.
module of_core
  import of_pkg::*;
#(
  parameter int WIDTH      = 352,
  parameter int HEIGHT     = 288,
  parameter int LANES      = 4,
  parameter int NUM_CE     = 1,
  localparam int NL        = LANES * NUM_CE,
  parameter int FIFO_DEPTH = 16,
  localparam int MAXG      = WIDTH / NL,
  localparam int DEPTH     = MAXG * HEIGHT,
  localparam int AW        = $clog2(DEPTH),
  localparam int GW        = $clog2(MAXG + 1),
  localparam int HW        = $clog2(HEIGHT + 1),
  localparam int BW        = NL * LANE_W,
  localparam int FW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  mode_e             mode,
  input  dest_e             dest,
  input  logic [GW-1:0]     img_g,
  input  logic [HW-1:0]     img_h,
  input  logic [GRAD_W-2:0] alpha,
  input  logic [15:0]       max_iter,
  input  logic [DIFF_W-1:0] threshold,
  input  coef_t             coef [3],
  output logic              busy,
  output logic              done,
  output logic [15:0]       iter_count,
  output logic              converged,
  output logic [DIFF_W-1:0] acc_sum,
  // bus side of the input data buffer
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [BW-1:0]     in_data,
  // bus side of the output data buffer
  output logic              out_valid,
  input  logic              out_ready,
  output logic [BW-1:0]     out_data
);
  // ---------------- buffers ----------------
  logic          ib_valid, in_pop;
  logic [BW-1:0] ib_data;
  logic [FW-1:0] ob_free;
  logic          ob_push;
  logic [BW-1:0] ob_wdata;
  logic          ob_ready;

  of_fifo #(.W(BW), .DEPTH(FIFO_DEPTH)) u_in_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(ib_valid), .out_ready(in_pop), .out_data(ib_data), .free());

  of_fifo #(.W(BW), .DEPTH(FIFO_DEPTH)) u_out_buf (
    .clk, .rst_n, .in_valid(ob_push), .in_ready(ob_ready), .in_data(ob_wdata),
    .out_valid, .out_ready, .out_data, .free(ob_free));

  // ---------------- sequence controller ----------------
  mode_e         mode_q;
  dest_e         dest_q;
  logic          ld_we, fm_re, filt_vi, it_step, it_colv, it_up_ok, it_mid_ok, it_dn_ok;
  logic          it_cen_v, acc_clear;
  logic [AW-1:0] lin_addr, fm_raddr, it_cen_addr;
  logic [GW-1:0] pfb_addr;

  of_seq_ctrl #(.MAXG(MAXG), .MAXH(HEIGHT), .OFW(FW)) u_ctrl (
    .clk, .rst_n, .start, .mode, .dest, .img_g, .img_h, .max_iter, .threshold,
    .acc_sum, .in_avail(ib_valid), .out_free(ob_free), .res_push(ob_push),
    .busy, .done, .mode_q, .dest_q, .iter_count, .converged,
    .in_pop, .ld_we, .lin_addr, .fm_re, .fm_raddr, .filt_vi,
    .it_step, .it_colv, .it_up_ok, .it_mid_ok, .it_dn_ok, .pfb_addr,
    .it_cen_v, .it_cen_addr, .acc_clear);

  // ---------------- optical-flow memory: NL x (u, v) banks ----------------
  logic          fm_we;
  logic [AW-1:0] fm_waddr;
  logic [BW-1:0] fm_wdata, fm_rdata;
  for (genvar k = 0; k < NL; k++) begin : g_fm
    for (genvar j = 0; j < 2; j++) begin : g_comp
      of_dram2p #(.W(FLOW_W), .DEPTH(DEPTH)) u_bank (
        .clk, .we(fm_we), .waddr(fm_waddr),
        .wdata(fm_wdata[k*LANE_W + (1-j)*FLOW_W +: FLOW_W]),
        .re(fm_re), .raddr(fm_raddr),
        .rdata(fm_rdata[k*LANE_W + (1-j)*FLOW_W +: FLOW_W]));
    end
  end

  // ---------------- iteration front end (t1: memories answer) ----------------
  logic          step1, colv1, up1, mid1, dn1, cen_v1, rdv1;
  logic [AW-1:0] cen_addr1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step1 <= 1'b0; colv1 <= 1'b0; up1 <= 1'b0; mid1 <= 1'b0; dn1 <= 1'b0;
      cen_v1 <= 1'b0; cen_addr1 <= '0; rdv1 <= 1'b0;
    end else begin
      step1 <= it_step; colv1 <= it_colv; up1 <= it_up_ok; mid1 <= it_mid_ok; dn1 <= it_dn_ok;
      cen_v1 <= it_cen_v; cen_addr1 <= it_cen_addr;
      rdv1 <= fm_re && (mode_q == MODE_READ);
    end
  end

  logic [BW-1:0] pfb_up, pfb_mid, dn_word;
  assign dn_word = (colv1 && dn1) ? fm_rdata : '0;

  of_prev_flow_buf #(.LANES(NL), .MAXG(MAXG)) u_pfb (
    .clk, .rd(it_step && it_colv), .addr(pfb_addr[$clog2(MAXG)-1:0]),
    .push(step1 && colv1), .push_data(dn_word), .row_up(pfb_up), .row_mid(pfb_mid));

  flow_vec_t col_in [3][NL];
  always_comb
    for (int k = 0; k < NL; k++) begin
      col_in[0][k] = (colv1 && up1)  ? pfb_up [k*LANE_W +: LANE_W] : '0;
      col_in[1][k] = (colv1 && mid1) ? pfb_mid[k*LANE_W +: LANE_W] : '0;
      col_in[2][k] = dn_word[k*LANE_W +: LANE_W];
    end

  flow_vec_t nb [NL][8];
  flow_vec_t ctr [NL];
  of_regfile #(.LANES(NL)) u_rf (.clk, .rst_n, .shift(step1), .col_in, .nb, .ctr);

  // ---------------- gradient memory: NL x (Ix, Iy, It) banks ----------------
  logic          gm_wr;
  logic [AW-1:0] gm_waddr;
  grad_t         filt [NL];
  grad_vec_t     g [NL];
  for (genvar k = 0; k < NL; k++) begin : g_gm
    for (genvar j = 0; j < 3; j++) begin : g_plane
      logic  we;
      grad_t rd;
      assign we = gm_wr && (dest_q == dest_e'(j + 1));
      of_sram1p #(.W(GRAD_W), .DEPTH(DEPTH)) u_bank (
        .clk, .en(we || cen_v1), .we, .addr(we ? gm_waddr : cen_addr1),
        .wdata(filt[k]), .rdata(rd));
      if (j == 0) begin : g_x assign g[k].ix = rd; end
      else if (j == 1) begin : g_y assign g[k].iy = rd; end
      else begin : g_t assign g[k].it = rd; end
    end
  end

  // ---------------- common element ----------------
  logic          cen_v2;
  logic [AW-1:0] cen_addr2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cen_v2 <= 1'b0; cen_addr2 <= '0;
    end else begin
      cen_v2 <= cen_v1; cen_addr2 <= cen_addr1;
    end
  end

  grad_t taps [NL][3];
  always_comb
    for (int k = 0; k < NL; k++)
      for (int i = 0; i < 3; i++)
        taps[k][i] = ib_data[k*LANE_W + (2-i)*GRAD_W +: GRAD_W];

  // NUM_CE common elements side by side, each on LANES adjacent pixels of the group
  logic [NUM_CE-1:0] ce_flow_vo, ce_filt_vo;
  logic [DIFF_W-1:0] ce_acc [NUM_CE];
  logic              flow_vo, filt_vo;
  flow_vec_t         flow_new [NL];
  for (genvar c = 0; c < NUM_CE; c++) begin : g_ce
    flow_vec_t c_nb [LANES][8];
    flow_vec_t c_ctr [LANES], c_new [LANES];
    grad_vec_t c_g [LANES];
    grad_t     c_taps [LANES][3], c_filt [LANES];
    always_comb
      for (int k = 0; k < LANES; k++) begin
        c_nb[k]   = nb[c * LANES + k];
        c_ctr[k]  = ctr[c * LANES + k];
        c_g[k]    = g[c * LANES + k];
        c_taps[k] = taps[c * LANES + k];
        flow_new[c * LANES + k] = c_new[k];
        filt[c * LANES + k]     = c_filt[k];
      end
    of_ce #(.LANES(LANES)) u_ce (
      .clk, .rst_n, .vi(filt_vi || cen_v2), .mode(mode_q), .nb(c_nb), .ctr(c_ctr), .g(c_g), .alpha,
      .taps(c_taps), .coef, .acc_clear, .flow_vo(ce_flow_vo[c]), .flow_new(c_new),
      .filt_vo(ce_filt_vo[c]), .filt(c_filt), .acc_sum(ce_acc[c]));
  end
  assign flow_vo = ce_flow_vo[0];
  assign filt_vo = ce_filt_vo[0];

  // total of the CEs' accumulators, saturating
  always_comb begin
    logic [DIFF_W+7:0] t;
    t = '0;
    for (int c = 0; c < NUM_CE; c++) t += (DIFF_W+8)'(ce_acc[c]);
    acc_sum = (|t[DIFF_W+7:DIFF_W]) ? '1 : t[DIFF_W-1:0];
  end

  // addresses travelling with the CE pipeline
  logic [AW-1:0] it_waddr, f_waddr;
  of_delay #(.W(AW), .N(PE_ITER_LAT)) u_dly_it (.clk, .rst_n, .d(cen_addr2), .q(it_waddr));
  of_delay #(.W(AW), .N(PE_FILT_LAT)) u_dly_f  (.clk, .rst_n, .d(lin_addr),  .q(f_waddr));

  // ---------------- write-back ----------------
  logic [BW-1:0] new_word, filt_word;
  always_comb
    for (int k = 0; k < NL; k++) begin
      new_word [k*LANE_W +: LANE_W] = flow_new[k];
      filt_word[k*LANE_W +: LANE_W] = LANE_W'(filt[k]);
    end

  assign fm_we    = ld_we || (flow_vo && mode_q == MODE_ITER);
  assign fm_waddr = ld_we ? lin_addr : it_waddr;
  assign fm_wdata = ld_we ? ib_data  : new_word;

  assign gm_wr    = filt_vo && (dest_q != DEST_OUT);
  assign gm_waddr = f_waddr;

  assign ob_push  = rdv1 || (filt_vo && dest_q == DEST_OUT);
  assign ob_wdata = rdv1 ? fm_rdata : filt_word;

  // the controller never issues more than the output buffer can take
  assert property (@(posedge clk) disable iff (!rst_n) ob_push |-> ob_ready);
endmodule
