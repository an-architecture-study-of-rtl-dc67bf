// of_uv: optical-flow update (U_V), the last step of equation (1):
//   u_new = u_bar - Ix * div,   v_new = v_bar - Iy * div.
// Ix, Iy have GRAD_FRAC fraction bits and div has FLOW_FRAC, so each product is
// shifted right by GRAD_FRAC (toward minus infinity) to return to the flow format;
// the result saturates to FLOW_W bits. Registered, latency 1 cycle.
module of_uv
  import of_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  vi,
  input  flow_t ubar,
  input  flow_t vbar,
  input  grad_t ix,
  input  grad_t iy,
  input  flow_t div,
  output logic  vo,
  output flow_t u_new,
  output flow_t v_new
);
  localparam int PW = FLOW_W + GRAD_W;

  function automatic flow_t sat_flow(input logic signed [PW+1:0] x);
    localparam logic signed [PW+1:0] MAXV = (PW+2)'(2 ** (FLOW_W - 1) - 1);
    localparam logic signed [PW+1:0] MINV = -(PW+2)'(2 ** (FLOW_W - 1));
    if (x > MAXV)      return flow_t'(MAXV);
    else if (x < MINV) return flow_t'(MINV);
    else               return flow_t'(x);
  endfunction

  logic signed [PW-1:0]   pu, pv;
  logic signed [PW+1:0]   ru, rv;
  always_comb begin
    pu = PW'(ix) * PW'(div);
    pv = PW'(iy) * PW'(div);
    ru = (PW+2)'(ubar) - (PW+2)'(pu >>> GRAD_FRAC);
    rv = (PW+2)'(vbar) - (PW+2)'(pv >>> GRAD_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vo <= 1'b0; u_new <= '0; v_new <= '0;
    end else begin
      vo    <= vi;
      u_new <= sat_flow(ru);
      v_new <= sat_flow(rv);
    end
  end
endmodule
