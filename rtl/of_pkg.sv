// of_pkg: number formats, shared types and constants of the optical-flow processor.
//
// Luminance gradients are 16-bit two's-complement fixed point and optical flows are
// 24-bit two's-complement fixed point (the 16/24-bit format selected for the design).
// The position of the binary point inside those words is this design's choice:
// gradients carry 8 fraction bits, flows carry 16 fraction bits. Filter coefficients
// are 16-bit with 14 fraction bits. The default coefficients are the three-tap
// prefilter / derivative pair of Simoncelli's multi-dimensional derivative filters.
package of_pkg;

  localparam int GRAD_W    = 16;  // luminance-gradient word
  localparam int GRAD_FRAC = 8;
  localparam int FLOW_W    = 24;  // optical-flow word
  localparam int FLOW_FRAC = 16;
  localparam int COEF_W    = 16;  // filter coefficient word
  localparam int COEF_FRAC = 14;
  localparam int DIFF_W    = 64;  // squared-difference word and accumulator

  // Word carried per SIMD lane on the external streams: one flow pair (u, v)
  // or three filter taps.
  localparam int LANE_W    = 2 * FLOW_W;

  // Pipeline latencies of the processing element.
  localparam int MAC_LAT   = 3;             // mux/reg, multiply/reg, add/reg
  localparam int DIV_LAT   = FLOW_W + 1;    // one stage per quotient bit plus I/O stages
  localparam int PE_ITER_LAT = 1 + MAC_LAT + DIV_LAT + 1 + MAC_LAT;
  localparam int PE_FILT_LAT = 1 + MAC_LAT + 1;

  // Three-tap Simoncelli prefilter (lpf0, lpf1, lpf0) and derivative (d0, 0, -d0), Q2.14.
  localparam logic signed [COEF_W-1:0] LPF0 = 16'sd3666;   // 0.223755
  localparam logic signed [COEF_W-1:0] LPF1 = 16'sd9052;   // 0.552490
  localparam logic signed [COEF_W-1:0] DRV0 = 16'sd7422;   // 0.453014

  typedef logic signed [FLOW_W-1:0] flow_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  typedef struct packed {
    flow_t u;
    flow_t v;
  } flow_vec_t;

  typedef struct packed {
    grad_t ix;
    grad_t iy;
    grad_t it;
  } grad_vec_t;

  // Operation the sequence controller sets up on the common element.
  typedef enum logic [1:0] {
    MODE_FILTER = 2'd0,  // 3-tap MAC filter pass, input buffer -> output buffer or gradient memory
    MODE_LOAD   = 2'd1,  // input buffer -> optical-flow memory
    MODE_ITER   = 2'd2,  // iterate equation (1) over the frame
    MODE_READ   = 2'd3   // optical-flow memory -> output buffer
  } mode_e;

  // Destination of a filter pass.
  typedef enum logic [1:0] {
    DEST_OUT = 2'd0,
    DEST_IX  = 2'd1,
    DEST_IY  = 2'd2,
    DEST_IT  = 2'd3
  } dest_e;

endpackage
