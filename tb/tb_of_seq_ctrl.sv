// tb_of_seq_ctrl: runs the controller alone on a 3-group x 2-row frame.
//  - MODE_ITER: every step of every sweep is compared with an independent raster
//    loop (flow-memory read address, previous-flow-buffer address, edge flags,
//    centre address); the sweep length must be (H+1)(G+1); the run must stop after
//    max_iter iterations when acc_sum stays above the threshold, and after one
//    iteration with `converged` when it is below.
//  - MODE_LOAD: pops and write addresses 0..G*H-1 while input words trickle in.
//  - MODE_READ and MODE_FILTER to the output buffer: a modelled 4-place output
//    buffer drained slowly; the controller must never overfill it (stall) and must
//    issue every address once.
module tb_of_seq_ctrl;
  import of_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int G = 3, H = 2;

  logic start, in_avail, res_push, busy, done, converged;
  mode_e mode, mode_q;
  dest_e dest, dest_q;
  logic [6:0] img_g;
  logic [8:0] img_h;
  logic [15:0] max_iter, iter_count;
  logic [63:0] threshold, acc_sum;
  logic [4:0] out_free;
  logic in_pop, ld_we, fm_re, filt_vi, it_step, it_colv, it_up_ok, it_mid_ok, it_dn_ok;
  logic it_cen_v, acc_clear;
  logic [14:0] lin_addr, fm_raddr, it_cen_addr;
  logic [6:0] pfb_addr;

  of_seq_ctrl #(.MAXG(88), .MAXH(288), .OFW(5)) dut (.*);

  int steps, clears, stalls;
  int exp_r, exp_c;

  // iteration step checker
  always @(posedge clk) if (rst_n && it_step) begin
    checks++;
    if (fm_re != (exp_c < G && exp_r < H) || (fm_re && fm_raddr != 15'(exp_r * G + exp_c))
        || pfb_addr != 7'(exp_c) || it_colv != (exp_c < G) || it_dn_ok != (exp_r < H)
        || it_mid_ok != (exp_r >= 1) || it_up_ok != (exp_r >= 2)
        || it_cen_v != (exp_r >= 1 && exp_c >= 1)
        || (it_cen_v && it_cen_addr != 15'((exp_r - 1) * G + exp_c - 1))) begin
      failures++; $display("step r%0d c%0d wrong", exp_r, exp_c);
    end
    steps++;
    if (exp_c == G) begin exp_c = 0; exp_r = (exp_r == H) ? 0 : exp_r + 1; end
    else exp_c++;
  end
  always @(posedge clk) if (rst_n && acc_clear) clears++;

  task automatic run(input mode_e m, input dest_e d, input int mi, input logic [63:0] acc);
    @(negedge clk);
    mode = m; dest = d; max_iter = 16'(mi); acc_sum = acc; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  // output-buffer model for READ / FILTER
  int ob_cnt, issued, pend [$];
  always @(posedge clk) begin
    if (rst_n) begin
      res_push <= 1'b0;
      for (int i = 0; i < pend.size(); i++) pend[i]--;
      if (pend.size() > 0 && pend[0] == 0) begin void'(pend.pop_front()); res_push <= 1'b1; end
    end
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; mode = MODE_ITER; dest = DEST_OUT; img_g = G; img_h = H; max_iter = 3;
    threshold = 64'd100; acc_sum = 0; in_avail = 0; out_free = 5'd16; res_push = 0;
    steps = 0; clears = 0; stalls = 0; exp_r = 0; exp_c = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // not converging: runs max_iter = 3 sweeps
    run(MODE_ITER, DEST_OUT, 3, 64'd1000);
    checks++;
    if (steps != 3 * (H + 1) * (G + 1) || iter_count != 3 || converged || clears != 3) begin
      failures++; $display("iter run: steps %0d iters %0d conv %b clears %0d", steps, iter_count, converged, clears);
    end
    // converging: stops after one sweep
    steps = 0;
    run(MODE_ITER, DEST_OUT, 50, 64'd100);
    checks++;
    if (steps != (H + 1) * (G + 1) || iter_count != 1 || !converged) begin
      failures++; $display("converge run: steps %0d iters %0d conv %b", steps, iter_count, converged);
    end

    // load: input words arrive every third cycle
    fork
      run(MODE_LOAD, DEST_OUT, 1, 0);
      begin
        automatic int k = 0;
        while (k < G * H) begin
          @(negedge clk);
          in_avail = ($urandom % 3) == 0;
          #1;
          if (in_pop) begin
            checks++;
            if (!ld_we || lin_addr != 15'(k)) begin failures++; $display("load addr %0d exp %0d", lin_addr, k); end
            k++;
          end
        end
        @(negedge clk); in_avail = 0;
      end
    join

    // read and filter towards a small, slowly drained output buffer
    for (int pass = 0; pass < 2; pass++) begin
      ob_cnt = 0; issued = 0; in_avail = 1;
      fork
        run(pass == 0 ? MODE_READ : MODE_FILTER, DEST_OUT, 1, 0);
        begin
          while (issued < G * H || ob_cnt > 0 || pend.size() > 0) begin
            out_free = 5'(4 - ob_cnt);
            #1;
            if (fm_re || filt_vi) begin
              checks++;
              if (lin_addr != 15'(issued) || (pass == 0 ? !fm_re : (!filt_vi || !in_pop))) begin
                failures++; $display("issue addr %0d exp %0d", lin_addr, issued);
              end
              issued++;
              pend.push_back(pass == 0 ? 1 : 5);
            end else if (ob_cnt + pend.size() >= 4) stalls++;
            @(posedge clk);
            if (res_push) ob_cnt++;
            if (ob_cnt > 0 && ($urandom % 4) == 0) ob_cnt--;
            checks++;
            if (ob_cnt > 4) begin failures++; $display("output buffer overfilled"); end
            @(negedge clk);
          end
        end
      join
      in_avail = 0;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
