// tb_of_core_levels: workload test on the default core (one CE, 352 x 288 build).
// It runs the frame sizes the processor is meant for, one after another, in the
// same memories:
//   CIF 352 x 288 and its pyramid levels 176 x 144 and 88 x 72 (three hierarchy
//   levels), the Yosemite size 316 x 252 (padded to 320 columns) and the Tree
//   sequences' 150 x 150 (padded to 152 columns).
// For each size: Ix, Iy, It are written through filter passes, random flows are
// loaded, three iterations run, and the flows read back must equal a Jacobi
// reference of the update (zero flow outside the frame). Each iteration must take
// (rows + 1) x (groups + 1) plus at most 45 clocks. From the measured clocks per
// iteration of the three CIF levels the test works out the time for 150
// iterations per level at 189 MHz and checks that it fits one frame at 30 frame/s.
module tb_of_core_levels;
  import of_pkg::*;
  import tb_of_ref_pkg::*;
  localparam int L = 4, BW = L * LANE_W, KIT = 3;
  localparam int WM = 352, HM = 288;
  localparam int NLEV = 5;
  localparam int LW [NLEV] = '{352, 176, 88, 320, 152};
  localparam int LH [NLEV] = '{288, 144, 72, 252, 150};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, converged, in_valid, in_ready, out_valid, out_ready;
  mode_e mode;
  dest_e dest;
  logic [6:0] img_g;
  logic [8:0] img_h;
  logic [14:0] alpha;
  logic [15:0] max_iter, iter_count;
  logic [63:0] threshold, acc_sum;
  coef_t coef [3];
  logic [BW-1:0] in_data, out_data;

  of_core dut (
    .clk, .rst_n, .start, .mode, .dest, .img_g, .img_h, .alpha, .max_iter, .threshold, .coef,
    .busy, .done, .iter_count, .converged, .acc_sum,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  longint gx [HM][WM], gy [HM][WM], gt [HM][WM];
  longint u [HM][WM], v [HM][WM], nu [HM][WM], nv [HM][WM];
  int W, H, G;
  longint cyc_per_iter [NLEV];

  initial begin
    #200000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic ref_iterate();
    longint nbu [8], nbv [8], un, vn, d;
    int dy [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
    int dx [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        for (int i = 0; i < 8; i++) begin
          int yy = y + dy[i], xx = x + dx[i];
          if (yy < 0 || yy >= H || xx < 0 || xx >= W) begin nbu[i] = 0; nbv[i] = 0; end
          else begin nbu[i] = u[yy][xx]; nbv[i] = v[yy][xx]; end
        end
        ref_pixel(nbu, nbv, u[y][x], v[y][x], gx[y][x], gy[y][x], gt[y][x], longint'(alpha), un, vn, d);
        nu[y][x] = un; nv[y][x] = vn;
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin u[y][x] = nu[y][x]; v[y][x] = nv[y][x]; end
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

  task automatic feed(input int plane);
    for (int a = 0; a < G * H; a++) begin
      int y = a / G, x0 = (a % G) * L;
      for (int k = 0; k < L; k++) begin
        case (plane)
          0: in_data[k*LANE_W +: LANE_W] = {16'($urandom), 16'(gx[y][x0 + k]), 16'($urandom)};
          1: in_data[k*LANE_W +: LANE_W] = {16'($urandom), 16'(gy[y][x0 + k]), 16'($urandom)};
          2: in_data[k*LANE_W +: LANE_W] = {16'($urandom), 16'(gt[y][x0 + k]), 16'($urandom)};
          default: in_data[k*LANE_W +: LANE_W] = {24'(u[y][x0 + k]), 24'(v[y][x0 + k])};
        endcase
      end
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  initial begin
    longint t0, budget, frame;
    int bad;
    start = 0; mode = MODE_LOAD; dest = DEST_OUT; img_g = 0; img_h = 0;
    alpha = 15'd512; max_iter = 16'(KIT); threshold = 0;
    coef[0] = 0; coef[1] = 16'sd16384; coef[2] = 0;
    in_valid = 0; in_data = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int lv = 0; lv < NLEV; lv++) begin
      W = LW[lv]; H = LH[lv]; G = W / L;
      img_g = 7'(G); img_h = 9'(H);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          gx[y][x] = longint'(int'($urandom % 6001) - 3000);
          gy[y][x] = longint'(int'($urandom % 6001) - 3000);
          gt[y][x] = longint'(int'($urandom % 6001) - 3000);
          u[y][x]  = longint'(int'($urandom % 400001) - 200000);
          v[y][x]  = longint'(int'($urandom % 400001) - 200000);
        end
      for (int p = 0; p < 3; p++) begin op(MODE_FILTER, dest_e'(p + 1)); feed(p); wait_done(); end
      op(MODE_LOAD, DEST_OUT); feed(3); wait_done();
      op(MODE_ITER, DEST_OUT);
      t0 = $time;
      wait_done();
      cyc_per_iter[lv] = ($time - t0) / 10 / KIT;
      for (int i = 0; i < KIT; i++) ref_iterate();
      checks++;
      if (iter_count != 16'(KIT) || cyc_per_iter[lv] < (H + 1) * (G + 1) ||
          cyc_per_iter[lv] > (H + 1) * (G + 1) + 45) begin
        failures++; $display("level %0d: %0d iterations, %0d clocks each", lv, iter_count, cyc_per_iter[lv]);
      end
      op(MODE_READ, DEST_OUT);
      bad = 0;
      for (int a = 0; a < G * H; a++) begin
        automatic int y = a / G, x0 = (a % G) * L;
        @(posedge clk);
        while (!out_valid) @(posedge clk);
        for (int k = 0; k < L; k++) begin
          flow_vec_t f;
          f = out_data[k*LANE_W +: LANE_W];
          checks++;
          if (longint'(f.u) != u[y][x0 + k] || longint'(f.v) != v[y][x0 + k]) begin
            bad++;
            if (bad < 4) $display("(%0d,%0d) got %0d %0d exp %0d %0d", x0 + k, y, f.u, f.v, u[y][x0 + k], v[y][x0 + k]);
          end
        end
      end
      wait_done();
      failures += bad;
      $display("%0d x %0d: %0d clocks per iteration, %0d flow mismatches", W, H, cyc_per_iter[lv], bad);
    end
    // CIF-30 budget: 150 iterations on each of the three CIF levels at 189 MHz
    budget = 189_000_000 / 30;
    frame = 150 * (cyc_per_iter[0] + cyc_per_iter[1] + cyc_per_iter[2]);
    $display("CIF, 3 levels, 150 iterations each: %0d clocks of %0d per frame at 189 MHz", frame, budget);
    checks++;
    if (frame > budget) begin failures++; $display("CIF-30 does not fit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
