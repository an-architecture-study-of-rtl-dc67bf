// tb_of_ave: random neighbour sets, including extreme values; the registered
// output must equal floor(sum / 8) one cycle later.
module tb_of_ave;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [23:0] x [8];
  logic signed [23:0] avg;
  of_ave #(.W(24)) dut (.clk, .rst_n, .x, .avg);

  initial begin
    #20000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (x[i]) x[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      automatic longint s = 0, e;
      @(negedge clk);
      foreach (x[i]) begin
        case (n % 4)
          0: x[i] = 24'($urandom);
          1: x[i] = -24'sd8388608;
          2: x[i] = 24'sd8388607;
          default: x[i] = 24'(int'($urandom % 64) - 32);
        endcase
        s += longint'(x[i]);
      end
      e = s >>> 3;
      @(negedge clk);
      checks++;
      if (longint'(avg) != e) begin failures++; $display("AVE got %0d exp %0d", avg, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
