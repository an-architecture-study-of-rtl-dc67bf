// tb_of_ce: four lanes with independent random operands in iteration mode and in
// filter mode. Each lane's outputs are compared with the reference, with latency
// 33 (iteration) and 5 (filter) cycles, and the ACC total of a burst with the sum
// of the reference differences.
module tb_of_ce;
  import of_pkg::*;
  import tb_of_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int L = 4;

  logic vi, flow_vo, filt_vo, acc_clear;
  mode_e mode;
  flow_vec_t nb [L][8];
  flow_vec_t ctr [L], flow_new [L];
  grad_vec_t g [L];
  logic [14:0] alpha;
  grad_t taps [L][3];
  coef_t coef [3];
  grad_t filt [L];
  logic [63:0] acc_sum;
  of_ce #(.LANES(L)) dut (.clk, .rst_n, .vi, .mode, .nb, .ctr, .g, .alpha, .taps, .coef,
                          .acc_clear, .flow_vo, .flow_new, .filt_vo, .filt, .acc_sum);

  longint eu_q[$], ev_q[$], ef_q[$];
  int t_q[$], tt_q[$];
  int cyc = 0;
  longint dsum;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && flow_vo) begin
      automatic int t = t_q.pop_front();
      checks++;
      if (cyc - t != PE_ITER_LAT) begin failures++; $display("latency %0d", cyc - t); end
      for (int k = 0; k < L; k++) begin
        automatic longint eu = eu_q.pop_front(), ev = ev_q.pop_front();
        checks++;
        if (longint'(flow_new[k].u) != eu || longint'(flow_new[k].v) != ev) begin
          failures++; $display("lane %0d got %0d %0d exp %0d %0d", k, flow_new[k].u, flow_new[k].v, eu, ev);
        end
      end
    end
    if (rst_n && filt_vo) begin
      automatic int t = tt_q.pop_front();
      checks++;
      if (cyc - t != PE_FILT_LAT) begin failures++; $display("filter latency %0d", cyc - t); end
      for (int k = 0; k < L; k++) begin
        automatic longint ef = ef_q.pop_front();
        checks++;
        if (longint'(filt[k]) != ef) begin failures++; $display("lane %0d filt %0d exp %0d", k, filt[k], ef); end
      end
    end
  end

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int rnd(input int range);
    return int'($urandom % (2 * range + 1)) - range;
  endfunction

  initial begin
    vi = 0; mode = MODE_ITER; acc_clear = 0; alpha = 15'd512;
    foreach (ctr[k]) begin ctr[k] = '0; g[k] = '0; end
    foreach (nb[k, i]) nb[k][i] = '0;
    foreach (taps[k, i]) taps[k][i] = 0;
    coef[0] = -DRV0; coef[1] = 0; coef[2] = DRV0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int burst = 0; burst < 4; burst++) begin
      @(negedge clk); acc_clear = 1; @(negedge clk); acc_clear = 0;
      dsum = 0;
      for (int n = 0; n < 100; n++) begin
        vi = ($urandom % 4) != 0;
        mode = (burst == 2) ? MODE_FILTER : MODE_ITER;
        for (int k = 0; k < L; k++) begin
          longint nbu[8], nbv[8], un, vn, d;
          foreach (nb[k][i]) begin
            nb[k][i].u = 24'(rnd(1 << 17)); nb[k][i].v = 24'(rnd(1 << 17));
            nbu[i] = longint'(nb[k][i].u); nbv[i] = longint'(nb[k][i].v);
          end
          ctr[k].u = 24'(rnd(1 << 17)); ctr[k].v = 24'(rnd(1 << 17));
          g[k].ix = 16'(rnd(4000)); g[k].iy = 16'(rnd(4000)); g[k].it = 16'(rnd(4000));
          foreach (taps[k][i]) taps[k][i] = 16'(rnd(20000));
          if (vi && mode == MODE_ITER) begin
            ref_pixel(nbu, nbv, longint'(ctr[k].u), longint'(ctr[k].v), longint'(g[k].ix),
                      longint'(g[k].iy), longint'(g[k].it), longint'(alpha), un, vn, d);
            eu_q.push_back(un); ev_q.push_back(vn); dsum += d;
          end
          if (vi && mode == MODE_FILTER)
            ef_q.push_back(ref_filt(longint'(taps[k][0]), longint'(taps[k][1]), longint'(taps[k][2]),
                                    longint'(coef[0]), longint'(coef[1]), longint'(coef[2])));
        end
        if (vi && mode == MODE_ITER) t_q.push_back(cyc + 1);
        if (vi && mode == MODE_FILTER) tt_q.push_back(cyc + 1);
        @(negedge clk);
      end
      vi = 0;
      repeat (40) @(negedge clk);
      checks++;
      if (acc_sum != 64'(dsum)) begin failures++; $display("ACC %0d exp %0d", acc_sum, dsum); end
    end
    checks++;
    if (t_q.size() != 0 || tt_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
