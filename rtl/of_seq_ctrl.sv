// of_seq_ctrl: sequence controller. It sets the common element's data path for
// the selected operation and generates every address and strobe of it.
//
// A `start` pulse latches the mode and frame size (img_g groups of LANES pixels
// per row, img_h rows) and runs one operation; `done` pulses at its end.
//   MODE_LOAD   pops one input word per available word and writes it to the
//               optical-flow memory at linear group address 0, 1, ...
//   MODE_FILTER pops input words into the CE filter (`filt_vi`, `filt_addr`); the
//               results go to the gradient memory or, for DEST_OUT, to the output
//               buffer, never issuing more than the output buffer can take.
//   MODE_READ   reads the optical-flow memory in linear order for the output buffer.
//   MODE_ITER   runs iterations of equation (1). Each iteration is one raster sweep
//               of (img_h + 1) x (img_g + 1) steps, one per clock: step (r, c)
//               fetches group c of row r from the flow memory (rows 0..img_h-1,
//               columns 0..img_g-1; the extra row and column feed zeros past the
//               frame edge), reads the previous-flow buffer at c, and, when r and c
//               are at least 1, names group (r-1, c-1) as the centre the PEs update.
//               After the sweep the controller waits DRAIN cycles for the pipeline to
//               empty, counts the iteration, and stops when the accumulated squared
//               change is at most `threshold` (converged) or `max_iter` is reached.
// All outputs belong to the cycle of the step; the core adds the memory latencies.
// The operation set and the sweep order are this design's reading of the document.
module of_seq_ctrl
  import of_pkg::*;
#(
  parameter int MAXG  = 88,
  parameter int MAXH  = 288,
  parameter int DRAIN = PE_ITER_LAT + 4,
  parameter int OFW   = 5,                      // width of the output-buffer free count
  localparam int GW   = $clog2(MAXG + 1),
  localparam int HW   = $clog2(MAXH + 1),
  localparam int AW   = $clog2(MAXG * MAXH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  mode_e             mode,
  input  dest_e             dest,
  input  logic [GW-1:0]     img_g,
  input  logic [HW-1:0]     img_h,
  input  logic [15:0]       max_iter,
  input  logic [DIFF_W-1:0] threshold,
  input  logic [DIFF_W-1:0] acc_sum,
  input  logic              in_avail,
  input  logic [OFW-1:0]    out_free,
  input  logic              res_push,     // a result entered the output buffer
  output logic              busy,
  output logic              done,
  output mode_e             mode_q,
  output dest_e             dest_q,
  output logic [15:0]       iter_count,
  output logic              converged,
  output logic              in_pop,
  output logic              ld_we,
  output logic [AW-1:0]     lin_addr,     // linear address for load / filter / read
  output logic              fm_re,
  output logic [AW-1:0]     fm_raddr,
  output logic              filt_vi,
  output logic              it_step,
  output logic              it_colv,      // column c inside the frame
  output logic              it_up_ok,     // row r-2 inside the frame
  output logic              it_mid_ok,    // row r-1 inside the frame
  output logic              it_dn_ok,     // row r inside the frame
  output logic [GW-1:0]     pfb_addr,
  output logic              it_cen_v,
  output logic [AW-1:0]     it_cen_addr,
  output logic              acc_clear
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_CHECK} state_e;
  state_e state;

  logic [GW-1:0] g_q, c;
  logic [HW-1:0] h_q, r;
  logic [AW-1:0] rb;           // r * g_q
  logic [AW-1:0] n, n_tot;     // linear count
  logic [15:0]   maxit_q;
  logic [7:0]    dcnt;
  logic [OFW:0]  inflight;
  logic          issue;

  // ---------------- linear modes: issue condition ----------------
  logic out_room;
  assign out_room = ((OFW+1)'(out_free) > inflight);
  always_comb begin
    issue = 1'b0;
    if (state == S_RUN && n != n_tot)
      case (mode_q)
        MODE_LOAD:   issue = in_avail;
        MODE_FILTER: issue = in_avail && (dest_q != DEST_OUT || out_room);
        MODE_READ:   issue = out_room;
        default:     issue = 1'b0;
      endcase
  end
  assign in_pop   = issue && (mode_q == MODE_LOAD || mode_q == MODE_FILTER);
  assign ld_we    = issue && (mode_q == MODE_LOAD);
  assign filt_vi  = issue && (mode_q == MODE_FILTER);
  assign lin_addr = n;

  // ---------------- iteration sweep ----------------
  logic sweeping;
  assign sweeping  = (state == S_RUN) && (mode_q == MODE_ITER);
  assign it_step   = sweeping;
  assign it_colv   = (c != g_q);
  assign it_dn_ok  = (r != h_q);
  assign it_mid_ok = (r != '0);
  assign it_up_ok  = (r > HW'(1));
  assign pfb_addr  = c;
  assign it_cen_v  = sweeping && (r != '0) && (c != '0);
  assign it_cen_addr = rb - AW'(g_q) + AW'(c) - AW'(1);

  assign fm_re    = (sweeping && it_colv && it_dn_ok) || (issue && mode_q == MODE_READ);
  assign fm_raddr = (mode_q == MODE_ITER) ? rb + AW'(c) : n;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mode_q <= MODE_LOAD; dest_q <= DEST_OUT;
      g_q <= '0; h_q <= '0; c <= '0; r <= '0; rb <= '0; n <= '0; n_tot <= '0;
      maxit_q <= '0; dcnt <= '0; inflight <= '0;
      iter_count <= '0; converged <= 1'b0; done <= 1'b0; acc_clear <= 1'b0;
    end else begin
      done      <= 1'b0;
      acc_clear <= 1'b0;
      inflight  <= inflight + (OFW+1)'(issue && (mode_q == MODE_READ ||
                                (mode_q == MODE_FILTER && dest_q == DEST_OUT)))
                            - (OFW+1)'(res_push);
      case (state)
        S_IDLE: if (start) begin
          state   <= S_RUN;
          mode_q  <= mode;
          dest_q  <= dest;
          g_q     <= img_g;
          h_q     <= img_h;
          maxit_q <= max_iter;
          n       <= '0;
          n_tot   <= AW'(img_g * img_h);
          c <= '0; r <= '0; rb <= '0;
          iter_count <= '0;
          converged  <= 1'b0;
          acc_clear  <= 1'b1;
        end
        S_RUN: begin
          if (mode_q == MODE_ITER) begin
            if (c == g_q) begin
              c <= '0;
              if (r == h_q) begin
                state <= S_DRAIN;
                dcnt  <= 8'(DRAIN);
              end else begin
                r  <= r + 1'b1;
                rb <= rb + AW'(g_q);
              end
            end else begin
              c <= c + 1'b1;
            end
          end else begin
            if (issue) n <= n + 1'b1;
            if (n == n_tot) begin
              state <= S_DRAIN;
              dcnt  <= 8'(DRAIN);
            end
          end
        end
        S_DRAIN: begin
          if (dcnt != '0) dcnt <= dcnt - 1'b1;
          else if (inflight == '0) begin
            if (mode_q == MODE_ITER) state <= S_CHECK;
            else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_CHECK: begin
          iter_count <= iter_count + 1'b1;
          if (acc_sum <= threshold || iter_count + 1'b1 >= maxit_q) begin
            converged <= (acc_sum <= threshold);
            state     <= S_IDLE;
            done      <= 1'b1;
          end else begin
            state     <= S_RUN;
            c <= '0; r <= '0; rb <= '0;
            acc_clear <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
