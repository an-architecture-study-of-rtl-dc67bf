// tb_of_uv: random averages, gradients and quotients, with some chosen to
// saturate; u_new and v_new must match u_bar - floor(Ix div / 2^8) (and the same
// for v) limited to 24 bits, one cycle later.
module tb_of_uv;
  import of_pkg::*;
  import tb_of_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic vi, vo;
  flow_t ubar, vbar, div, u_new, v_new;
  grad_t ix, iy;
  of_uv dut (.clk, .rst_n, .vi, .ubar, .vbar, .ix, .iy, .div, .vo, .u_new, .v_new);

  initial begin
    #20000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    vi = 0; ubar = 0; vbar = 0; div = 0; ix = 0; iy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      longint eu, ev;
      @(negedge clk);
      vi = 1;
      ubar = 24'($urandom); vbar = 24'($urandom); div = 24'($urandom);
      ix = 16'($urandom); iy = 16'($urandom);
      if (n % 3 == 0) begin div = div >>> 10; ix = ix >>> 4; end
      eu = sat(longint'(ubar) - ((longint'(ix) * longint'(div)) >>> 8), 24);
      ev = sat(longint'(vbar) - ((longint'(iy) * longint'(div)) >>> 8), 24);
      @(negedge clk);
      vi = 0;
      checks++;
      if (!vo || longint'(u_new) != eu || longint'(v_new) != ev) begin
        failures++; $display("U_V got %0d %0d exp %0d %0d", u_new, v_new, eu, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
