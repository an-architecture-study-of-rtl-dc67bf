// of_pe: processing element, one lane of the four-way SIMD common element.
//
// Iteration mode (mode = MODE_ITER) evaluates equation (1) for one pixel per clock:
//   AVE   u_bar, v_bar      = mean of the eight neighbouring flows        (1 cycle)
//   BE1   be1 = a*a + Ix*Ix + Iy*Iy     on MAC1 (denominator)              (3 cycles)
//   BE2   be2 = Ix*u_bar + Iy*v_bar + It on MAC2 (numerator), in parallel
//   DIV   div = be2 / be1                                                 (25 cycles)
//   U_V   u_new = u_bar - Ix*div, v_new = v_bar - Iy*div                  (1 cycle)
//   DIFF  diff = (u_new - u_c)^2 + (v_new - v_c)^2 on MAC4, u_c, v_c being the
//         pixel's own flow from the previous iteration                    (3 cycles)
// so a result leaves PE_ITER_LAT = 33 cycles after its operands entered. The
// alpha^2 term is formed on MAC1's third multiplier from alpha (unsigned, 8
// fraction bits). MAC3 of the document is the U_V unit here.
//
// Filter mode (mode = MODE_FILTER) reuses MAC1 through its second multiplexer
// input for a 3-tap filter: filt = c0*e0 + c1*e1 + c2*e2, taps in the gradient
// format, coefficients Q2.14, result shifted back and saturated to 16 bits,
// PE_FILT_LAT = 5 cycles after entry. This serves the gradient generation
// (E_ml*lpf0 + E_mm*lpf1 + E_mn*lpf0 and the derivative passes).
//
// Structure follows the document's PE (AVE, BE1, BE2, DIV, U_V, DIFF); the number
// formats, rounding and pipeline depths are this design's choices.
module of_pe
  import of_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             vi,
  input  mode_e            mode,
  input  flow_vec_t        nb [8],      // neighbours, previous iteration
  input  flow_vec_t        ctr,         // own flow, previous iteration
  input  grad_vec_t        g,
  input  logic [GRAD_W-2:0] alpha,
  input  grad_t            taps [3],
  input  coef_t            coef [3],
  output logic             flow_vo,
  output flow_vec_t        flow_new,
  output logic [DIFF_W-1:0] diff,
  output logic             filt_vo,
  output grad_t            filt
);
  localparam int SW1 = FLOW_W + COEF_W + 2;  // MAC1/MAC2 sum width (42)
  localparam int NW  = SW1 + GRAD_FRAC;      // divider numerator width
  localparam int DW4 = FLOW_W + 1;           // DIFF operand width

  // ---------------- stage 1: AVE and operand registers ----------------
  flow_t u_nb [8], v_nb [8];
  flow_t ubar, vbar;
  always_comb
    for (int i = 0; i < 8; i++) begin
      u_nb[i] = nb[i].u;
      v_nb[i] = nb[i].v;
    end
  of_ave #(.W(FLOW_W)) u_ave_u (.clk, .rst_n, .x(u_nb), .avg(ubar));
  of_ave #(.W(FLOW_W)) u_ave_v (.clk, .rst_n, .x(v_nb), .avg(vbar));

  logic      v1, iter1;
  logic [GRAD_W-2:0] alpha1;
  grad_vec_t g1;
  flow_vec_t c1;
  grad_t     taps1 [3];
  coef_t     coef1 [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; iter1 <= 1'b0; alpha1 <= '0; g1 <= '0; c1 <= '0;
      for (int i = 0; i < 3; i++) begin taps1[i] <= '0; coef1[i] <= '0; end
    end else begin
      v1    <= vi;
      iter1 <= (mode == MODE_ITER);
      alpha1 <= alpha;
      g1    <= g;
      c1    <= ctr;
      for (int i = 0; i < 3; i++) begin taps1[i] <= taps[i]; coef1[i] <= coef[i]; end
    end
  end

  // ---------------- MAC1 (BE1 / filter) and MAC2 (BE2) ----------------
  logic signed [FLOW_W-1:0] m1_a [2][3];
  logic signed [COEF_W-1:0] m1_b [2][3];
  logic signed [FLOW_W-1:0] m2_a [1][3];
  logic signed [COEF_W-1:0] m2_b [1][3];
  logic signed [SW1-1:0]    be1, be2;
  logic                     m1_vo, m2_vo;
  always_comb begin
    m1_a[0][0] = FLOW_W'(g1.ix);           m1_b[0][0] = g1.ix;
    m1_a[0][1] = FLOW_W'(g1.iy);           m1_b[0][1] = g1.iy;
    m1_a[0][2] = FLOW_W'({1'b0, alpha1});  m1_b[0][2] = {1'b0, alpha1};
    for (int i = 0; i < 3; i++) begin
      m1_a[1][i] = FLOW_W'(taps1[i]);
      m1_b[1][i] = coef1[i];
    end
    m2_a[0][0] = ubar;                     m2_b[0][0] = g1.ix;
    m2_a[0][1] = vbar;                     m2_b[0][1] = g1.iy;
    // It is brought to the 24 fraction bits of the other two products
    m2_a[0][2] = {g1.it, 8'b0};            m2_b[0][2] = COEF_W'(1 << (FLOW_FRAC - 8));
  end

  of_mac #(.AW(FLOW_W), .BW(COEF_W), .NSRC(2)) u_mac1 (
    .clk, .rst_n, .vi(v1), .sel(!iter1), .a(m1_a), .b(m1_b), .vo(m1_vo), .sum(be1));
  of_mac #(.AW(FLOW_W), .BW(COEF_W), .NSRC(1)) u_mac2 (
    .clk, .rst_n, .vi(v1 & iter1), .sel(1'b0), .a(m2_a), .b(m2_b), .vo(m2_vo), .sum(be2));

  // ---------------- filter output ----------------
  logic iter4;
  of_delay #(.W(1), .N(MAC_LAT)) u_dly_mode (.clk, .rst_n, .d(iter1), .q(iter4));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      filt_vo <= 1'b0; filt <= '0;
    end else begin
      filt_vo <= m1_vo & !iter4;
      if ((be1 >>> COEF_FRAC) > SW1'(32767))       filt <= 16'sh7fff;
      else if ((be1 >>> COEF_FRAC) < -SW1'(32768)) filt <= -16'sh8000;
      else                                         filt <= grad_t'(be1 >>> COEF_FRAC);
    end
  end

  // ---------------- DIV ----------------
  flow_t q;
  logic  div_vo;
  of_div #(.NW(NW), .DW(SW1), .QW(FLOW_W)) u_div (
    .clk, .rst_n, .vi(m2_vo), .num(NW'(be2) <<< GRAD_FRAC), .den(be1), .vo(div_vo), .q(q));

  // operands waiting for the quotient
  localparam int WOPS = 2 * FLOW_W + 2 * GRAD_W + $bits(flow_vec_t);
  logic [WOPS-1:0] ops_d;
  flow_t     ubar_d, vbar_d;
  grad_t     ix_d, iy_d;
  flow_vec_t c_d;
  of_delay #(.W(WOPS), .N(MAC_LAT + DIV_LAT)) u_dly_ops (
    .clk, .rst_n, .d({ubar, vbar, g1.ix, g1.iy, c1}), .q(ops_d));
  assign {ubar_d, vbar_d, ix_d, iy_d, c_d} = ops_d;

  // ---------------- U_V (MAC3) ----------------
  flow_t u_n, v_n;
  logic  uv_vo;
  of_uv u_uv (.clk, .rst_n, .vi(div_vo), .ubar(ubar_d), .vbar(vbar_d), .ix(ix_d), .iy(iy_d),
              .div(q), .vo(uv_vo), .u_new(u_n), .v_new(v_n));

  flow_vec_t c_e;
  of_delay #(.W($bits(flow_vec_t)), .N(1)) u_dly_c (.clk, .rst_n, .d(c_d), .q(c_e));

  // ---------------- DIFF (MAC4) ----------------
  logic signed [DW4-1:0] m4_a [1][3];
  logic signed [DW4-1:0] m4_b [1][3];
  logic signed [2*DW4+1:0] dsum;
  always_comb begin
    m4_a[0][0] = DW4'(u_n) - DW4'(c_e.u);
    m4_a[0][1] = DW4'(v_n) - DW4'(c_e.v);
    m4_a[0][2] = '0;
    for (int i = 0; i < 3; i++) m4_b[0][i] = m4_a[0][i];
  end
  of_mac #(.AW(DW4), .BW(DW4), .NSRC(1)) u_mac4 (
    .clk, .rst_n, .vi(uv_vo), .sel(1'b0), .a(m4_a), .b(m4_b), .vo(flow_vo), .sum(dsum));
  assign diff = DIFF_W'(unsigned'(dsum));

  of_delay #(.W($bits(flow_vec_t)), .N(MAC_LAT)) u_dly_new (
    .clk, .rst_n, .d({u_n, v_n}), .q(flow_new));
endmodule
