// tb_of_mac: random operands through both multiplexer inputs of the MAC; each sum
// is compared with the 64-bit sum of the three selected products and must appear
// exactly 3 cycles after its operands.
module tb_of_mac;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic vi, vo, sel;
  logic signed [23:0] a [2][3];
  logic signed [15:0] b [2][3];
  logic signed [41:0] sum;
  of_mac #(.AW(24), .BW(16), .NSRC(2)) dut (.clk, .rst_n, .vi, .sel, .a, .b, .vo, .sum);

  longint exp_q[$];
  int     t_q[$];
  int     cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && vo) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        automatic longint e = exp_q.pop_front();
        automatic int t = t_q.pop_front();
        if (longint'(sum) != e || cyc - t != 3) begin
          failures++;
          $display("MAC mismatch got %0d exp %0d latency %0d", sum, e, cyc - t);
        end
      end
    end
  end

  initial begin
    #20000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    vi = 0; sel = 0;
    foreach (a[s, i]) begin a[s][i] = 0; b[s][i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      vi  = ($urandom % 4) != 0;
      sel = $urandom % 2;
      foreach (a[s, i]) begin
        a[s][i] = (n % 10 == 0) ? -24'sd8388608 : 24'($urandom);
        b[s][i] = (n % 10 == 0) ? -16'sd32768 : 16'($urandom);
      end
      if (vi) begin
        automatic longint e = 0;
        for (int i = 0; i < 3; i++) e += longint'(a[sel][i]) * longint'(b[sel][i]);
        exp_q.push_back(e);
        t_q.push_back(cyc + 1);
      end
    end
    @(negedge clk); vi = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
