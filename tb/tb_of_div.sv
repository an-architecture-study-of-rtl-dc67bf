// tb_of_div: random numerator / denominator pairs across magnitudes, signs,
// overflowing quotients and a zero denominator, fed one per cycle. Each quotient
// is compared with the reference (truncating, saturating at +/-(2^23-1)) and must
// appear exactly 25 cycles after its operands.
module tb_of_div;
  import tb_of_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic vi, vo;
  logic signed [49:0] num;
  logic        [41:0] den;
  logic signed [23:0] q;
  of_div #(.NW(50), .DW(42), .QW(24)) dut (.clk, .rst_n, .vi, .num, .den, .vo, .q);

  longint exp_q[$];
  int t_q[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && vo) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        automatic longint e = exp_q.pop_front();
        automatic int t = t_q.pop_front();
        if (longint'(q) != e || cyc - t != 25) begin
          failures++; $display("DIV got %0d exp %0d lat %0d", q, e, cyc - t);
        end
      end
    end
  end

  initial begin
    #50000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    vi = 0; num = 0; den = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      longint nn, dd;
      @(negedge clk);
      vi = ($urandom % 5) != 0;
      nn = longint'({$urandom, $urandom}) >>> ($urandom % 40 + 14);
      dd = longint'({$urandom, $urandom} & 64'h3ff_ffff_ffff) >> ($urandom % 41);
      if (n % 50 == 7) dd = 0;
      if (n % 17 == 3) begin nn = -(64'sd1 <<< 40); dd = 3; end
      num = 50'(nn); den = 42'(dd);
      if (vi) begin exp_q.push_back(ref_div(longint'(num), longint'(den))); t_q.push_back(cyc + 1); end
    end
    @(negedge clk); vi = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
