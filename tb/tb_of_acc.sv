// tb_of_acc: random lane masks and differences, with clears and a run into the
// saturation limit; the sum is compared with a model one cycle after each input.
module tb_of_acc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear;
  logic [3:0] vi;
  logic [63:0] diff [4];
  logic [63:0] sum;
  of_acc #(.LANES(4)) dut (.clk, .rst_n, .clear, .vi, .diff, .sum);

  initial begin
    #30000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [66:0] model;
    clear = 0; vi = 0; foreach (diff[i]) diff[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      clear = ($urandom % 50) == 0;
      vi = 4'($urandom);
      foreach (diff[i]) diff[i] = (n > 450) ? 64'hffff_ffff_ffff_0000 : 64'($urandom % 100000);
      if (clear) model = 0;
      else begin
        for (int i = 0; i < 4; i++) if (vi[i]) model += 67'(diff[i]);
        if (model > 67'h0_ffff_ffff_ffff_ffff) model = 67'h0_ffff_ffff_ffff_ffff;
      end
      @(negedge clk);
      checks++;
      if (sum != model[63:0]) begin failures++; $display("ACC got %0d exp %0d", sum, model); end
      clear = 0; vi = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
