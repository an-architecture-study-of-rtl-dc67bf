// tb_of_pe: drives one processing element with a random mix of iteration and
// filter operations, one per cycle. Iteration results (u', v', diff) are compared
// with the reference evaluation of equation (1) and must appear 33 cycles after
// entry; filter results are compared with the reference 3-tap filter and must
// appear 5 cycles after entry.
module tb_of_pe;
  import of_pkg::*;
  import tb_of_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic vi, flow_vo, filt_vo;
  mode_e mode;
  flow_vec_t nb [8];
  flow_vec_t ctr, flow_new;
  grad_vec_t g;
  logic [14:0] alpha;
  grad_t taps [3];
  coef_t coef [3];
  logic [63:0] diff;
  grad_t filt;
  of_pe dut (.clk, .rst_n, .vi, .mode, .nb, .ctr, .g, .alpha, .taps, .coef,
             .flow_vo, .flow_new, .diff, .filt_vo, .filt);

  longint eu_q[$], ev_q[$], ed_q[$], ef_q[$];
  int tf_q[$], tt_q[$];
  int cyc = 0, n_iter = 0, n_filt = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && flow_vo) begin
      automatic int t = tf_q.pop_front();
      automatic longint eu = eu_q.pop_front(), ev = ev_q.pop_front(), ed = ed_q.pop_front();
      checks++;
      if (longint'(flow_new.u) != eu || longint'(flow_new.v) != ev || longint'(diff) != ed
          || cyc - t != PE_ITER_LAT) begin
        failures++;
        $display("PE iter got %0d %0d %0d exp %0d %0d %0d lat %0d",
                 flow_new.u, flow_new.v, diff, eu, ev, ed, cyc - t);
      end
    end
    if (rst_n && filt_vo) begin
      automatic int t = tt_q.pop_front();
      automatic longint ef = ef_q.pop_front();
      checks++;
      if (longint'(filt) != ef || cyc - t != PE_FILT_LAT) begin
        failures++; $display("PE filt got %0d exp %0d lat %0d", filt, ef, cyc - t);
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
    vi = 0; mode = MODE_ITER; ctr = '0; g = '0; alpha = 15'd256;
    foreach (nb[i]) nb[i] = '0;
    foreach (taps[i]) begin taps[i] = 0; coef[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      vi = ($urandom % 6) != 0;
      mode = (($urandom % 3) == 0) ? MODE_FILTER : MODE_ITER;
      foreach (nb[i]) begin nb[i].u = 24'(rnd(1 << 18)); nb[i].v = 24'(rnd(1 << 18)); end
      ctr.u = 24'(rnd(1 << 18)); ctr.v = 24'(rnd(1 << 18));
      g.ix = 16'(rnd(1 << (n % 15))); g.iy = 16'(rnd(1 << 12)); g.it = 16'(rnd(1 << 13));
      alpha = 15'(($urandom % 4096) + 1);
      foreach (taps[i]) begin taps[i] = 16'($urandom); coef[i] = 16'($urandom); end
      if (n % 7 == 0) begin coef[0] = LPF0; coef[1] = LPF1; coef[2] = LPF0; end
      if (vi && mode == MODE_ITER) begin
        longint nbu[8], nbv[8], un, vn, d;
        foreach (nb[i]) begin nbu[i] = longint'(nb[i].u); nbv[i] = longint'(nb[i].v); end
        ref_pixel(nbu, nbv, longint'(ctr.u), longint'(ctr.v), longint'(g.ix), longint'(g.iy),
                  longint'(g.it), longint'(alpha), un, vn, d);
        eu_q.push_back(un); ev_q.push_back(vn); ed_q.push_back(d); tf_q.push_back(cyc + 1);
        n_iter++;
      end
      if (vi && mode == MODE_FILTER) begin
        ef_q.push_back(ref_filt(longint'(taps[0]), longint'(taps[1]), longint'(taps[2]),
                                longint'(coef[0]), longint'(coef[1]), longint'(coef[2])));
        tt_q.push_back(cyc + 1);
        n_filt++;
      end
    end
    @(negedge clk); vi = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (tf_q.size() != 0 || tt_q.size() != 0 || n_iter == 0 || n_filt == 0) begin
      failures++; $display("missing outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
