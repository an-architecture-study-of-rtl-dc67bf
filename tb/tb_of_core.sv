// tb_of_core: end-to-end test of the optical-flow processor core.
// The core is built for a 32 x 8 frame and run on a 20 x 8 frame (5 groups of 4),
// so the runtime frame size is exercised too. The sequence is the one a host
// would use:
//   1. three MODE_FILTER passes with coefficients (0, 1, 0) write Ix, Iy, It into
//      the gradient memory (taps e0 and e2 carry junk that must be ignored);
//   2. a MODE_FILTER pass with the (lpf0, lpf1, lpf0) smoothing filter to the
//      output buffer, with the output side held off so the controller must stall;
//   3. MODE_LOAD of random initial flows;
//   4. MODE_ITER with threshold 0: stops at max_iter, results checked against a
//      Jacobi evaluation of equation (1) with zero flow outside the frame, the
//      last iteration's summed squared change checked against acc_sum, and the
//      cycle count against one group (4 pixels) per clock;
//   5. MODE_READ of all flows;
//   6. MODE_ITER with a large threshold: stops after one iteration, converged;
//      then MODE_READ again.
// Each mechanism is counted and a failure is counted for one that never happened.
module tb_of_core;
  import of_pkg::*;
  import tb_of_ref_pkg::*;
  localparam int WMAX = 32, HMAX = 8, L = 4;
  localparam int G = 5, H = 8, W = G * L;
  localparam int BW = L * LANE_W;
  localparam int KIT = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, converged, in_valid, in_ready, out_valid, out_ready;
  mode_e mode;
  dest_e dest;
  logic [3:0] img_g;
  logic [3:0] img_h;
  logic [14:0] alpha;
  logic [15:0] max_iter, iter_count;
  logic [63:0] threshold, acc_sum;
  coef_t coef [3];
  logic [BW-1:0] in_data, out_data;

  of_core #(.WIDTH(WMAX), .HEIGHT(HMAX), .LANES(L), .FIFO_DEPTH(16)) dut (
    .clk, .rst_n, .start, .mode, .dest, .img_g, .img_h, .alpha, .max_iter, .threshold, .coef,
    .busy, .done, .iter_count, .converged, .acc_sum,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  longint gx [H][W], gy [H][W], gt [H][W];
  longint u [H][W], v [H][W];
  longint last_dsum;
  int n_gradpass, n_filtout, n_stall, n_load, n_sweep, n_maxstop, n_convstop, n_read, n_inwait;

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one Jacobi iteration of equation (1) over the frame, zero flow outside it
  task automatic ref_iterate();
    longint nu [H][W], nv [H][W];
    longint nbu [8], nbv [8], un, vn, d, s;
    int dy [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
    int dx [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
    s = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        for (int i = 0; i < 8; i++) begin
          int yy = y + dy[i], xx = x + dx[i];
          if (yy < 0 || yy >= H || xx < 0 || xx >= W) begin nbu[i] = 0; nbv[i] = 0; end
          else begin nbu[i] = u[yy][xx]; nbv[i] = v[yy][xx]; end
        end
        ref_pixel(nbu, nbv, u[y][x], v[y][x], gx[y][x], gy[y][x], gt[y][x], longint'(alpha), un, vn, d);
        nu[y][x] = un; nv[y][x] = vn; s += d;
      end
    u = nu; v = nv; last_dsum = s;
  endtask

  task automatic op(input mode_e m, input dest_e d);
    @(negedge clk);
    mode = m; dest = d; start = 1;
    @(negedge clk);
    start = 0;
  endtask

  task automatic wait_done();
    while (!done) @(negedge clk);
  endtask

  // push one word per group in raster order; plane 0..2 = gradients with junk taps,
  // 3 = flows, 4 = random taps (expected filter results returned in exp)
  task automatic feed(input int plane, ref longint exp [$]);
    for (int a = 0; a < G * H; a++) begin
      int y = a / G, gx0 = (a % G) * L;
      for (int k = 0; k < L; k++) begin
        longint val;
        logic [15:0] j0, j2, t0, t1, t2;
        j0 = 16'($urandom); j2 = 16'($urandom);
        case (plane)
          0: val = gx[y][gx0 + k];
          1: val = gy[y][gx0 + k];
          2: val = gt[y][gx0 + k];
          default: val = 0;
        endcase
        if (plane < 3) in_data[k*LANE_W +: LANE_W] = {j0, 16'(val), j2};
        else if (plane == 3) in_data[k*LANE_W +: LANE_W] = {24'(u[y][gx0 + k]), 24'(v[y][gx0 + k])};
        else begin
          t0 = 16'($urandom); t1 = 16'($urandom); t2 = 16'($urandom);
          in_data[k*LANE_W +: LANE_W] = {t0, t1, t2};
          exp.push_back(ref_filt(longint'($signed(t0)), longint'($signed(t1)), longint'($signed(t2)),
                                 longint'(LPF0), longint'(LPF1), longint'(LPF0)));
        end
      end
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) begin n_inwait++; @(posedge clk); end
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  task automatic check_flows(input string tag);
    for (int a = 0; a < G * H; a++) begin
      int y = a / G, x0 = (a % G) * L;
      out_ready = 1;
      @(posedge clk);
      while (!out_valid) @(posedge clk);
      for (int k = 0; k < L; k++) begin
        flow_vec_t f;
        f = out_data[k*LANE_W +: LANE_W];
        checks++;
        if (longint'(f.u) != u[y][x0 + k] || longint'(f.v) != v[y][x0 + k]) begin
          failures++;
          if (failures < 10) $display("%s flow (%0d,%0d) got %0d %0d exp %0d %0d", tag, x0 + k, y,
                                      f.u, f.v, u[y][x0 + k], v[y][x0 + k]);
        end
      end
      @(negedge clk);
      out_ready = 0;
    end
  endtask

  // count cycles in which the controller holds back for a full output buffer
  always @(posedge clk)
    if (rst_n && dut.u_ctrl.state == 1 && dut.mode_q == MODE_FILTER && dut.ib_valid && !dut.in_pop)
      n_stall++;

  initial begin
    longint exp [$];
    longint none [$];
    longint t0;
    start = 0; mode = MODE_LOAD; dest = DEST_OUT; img_g = 4'(G); img_h = 4'(H);
    alpha = 15'd768; max_iter = 16'(KIT); threshold = 0;
    coef[0] = 0; coef[1] = 16'sd16384; coef[2] = 0;
    in_valid = 0; in_data = '0; out_ready = 0;
    n_gradpass = 0; n_filtout = 0; n_stall = 0; n_load = 0; n_sweep = 0;
    n_maxstop = 0; n_convstop = 0; n_read = 0; n_inwait = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        gx[y][x] = longint'(int'($urandom % 4001) - 2000);
        gy[y][x] = longint'(int'($urandom % 4001) - 2000);
        gt[y][x] = longint'(int'($urandom % 4001) - 2000);
        u[y][x]  = longint'(int'($urandom % 262145) - 131072);
        v[y][x]  = longint'(int'($urandom % 262145) - 131072);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. gradients through the filter path
    for (int p = 0; p < 3; p++) begin
      op(MODE_FILTER, dest_e'(p + 1));
      feed(p, none);
      wait_done();
      n_gradpass++;
    end

    // 2. smoothing filter to the output buffer, output held off at first
    coef[0] = LPF0; coef[1] = LPF1; coef[2] = LPF0;
    op(MODE_FILTER, DEST_OUT);
    fork
      feed(4, exp);
      begin
        repeat (60) @(negedge clk);
        for (int a = 0; a < G * H; a++) begin
          out_ready = 1;
          @(posedge clk);
          while (!out_valid) @(posedge clk);
          for (int k = 0; k < L; k++) begin
            automatic longint e = exp.pop_front();
            checks++;
            if (longint'($signed(out_data[k*LANE_W +: 16])) != e) begin
              failures++; $display("filter got %0d exp %0d", $signed(out_data[k*LANE_W +: 16]), e);
            end
          end
          @(negedge clk);
          out_ready = 0;
        end
        n_filtout++;
      end
    join
    wait_done();

    // 3. initial flows
    op(MODE_LOAD, DEST_OUT);
    feed(3, none);
    wait_done();
    n_load++;

    // 4. iterate to max_iter
    op(MODE_ITER, DEST_OUT);
    t0 = $time;
    wait_done();
    for (int i = 0; i < KIT; i++) begin ref_iterate(); n_sweep++; end
    checks++;
    if (iter_count != 16'(KIT) || converged) begin
      failures++; $display("iteration count %0d converged %b", iter_count, converged);
    end else n_maxstop++;
    checks++;
    if (acc_sum != 64'(last_dsum)) begin failures++; $display("acc_sum %0d exp %0d", acc_sum, last_dsum); end
    begin
      automatic int cyc = int'(($time - t0) / 10);
      checks++;
      if (cyc < KIT * (H + 1) * (G + 1) || cyc > KIT * ((H + 1) * (G + 1) + PE_ITER_LAT + 12)) begin
        failures++; $display("iteration took %0d cycles", cyc);
      end
      $display("%0d iterations of a %0dx%0d frame in %0d cycles", KIT, W, H, cyc);
    end

    // 5. read back
    op(MODE_READ, DEST_OUT);
    check_flows("iter");
    wait_done();
    n_read++;

    // 6. converging run
    threshold = 64'hffff_ffff_ffff;
    max_iter = 16'd100;
    op(MODE_ITER, DEST_OUT);
    wait_done();
    ref_iterate(); n_sweep++;
    checks++;
    if (iter_count != 1 || !converged) begin
      failures++; $display("convergence: iterations %0d converged %b", iter_count, converged);
    end else n_convstop++;
    op(MODE_READ, DEST_OUT);
    check_flows("conv");
    wait_done();
    n_read++;

    $display("gradient passes %0d, filter-to-output %0d, output stalls %0d, loads %0d, sweeps %0d,",
             n_gradpass, n_filtout, n_stall, n_load, n_sweep);
    $display("max-iteration stops %0d, convergence stops %0d, reads %0d, input waits %0d",
             n_maxstop, n_convstop, n_read, n_inwait);
    checks++;
    if (n_gradpass == 0 || n_filtout == 0 || n_stall == 0 || n_load == 0 || n_sweep == 0 ||
        n_maxstop == 0 || n_convstop == 0 || n_read == 0 || n_inwait == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
