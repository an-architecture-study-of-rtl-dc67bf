// tb_of_fifo: random pushes and pops, including runs that fill and empty the
// buffer; data order, in_ready, out_valid and the free count are checked against
// a queue model every cycle.
module tb_of_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fulls = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  logic [3:0] free;
  of_fifo #(.W(32), .DEPTH(8)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                    .out_valid, .out_ready, .out_data, .free);
  logic [31:0] q[$];

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid  = ((n / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      out_ready = ((n / 200) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      in_data = $urandom;
      #1;
      checks++;
      if (in_ready != (q.size() < 8) || out_valid != (q.size() > 0) || free != 4'(8 - q.size())) begin
        failures++; $display("flags size %0d ready %b valid %b free %0d", q.size(), in_ready, out_valid, free);
      end
      if (q.size() == 8) fulls++;
      if (out_valid && out_ready) begin
        automatic logic [31:0] e = q.pop_front();
        checks++;
        if (out_data != e) begin failures++; $display("data %h exp %h", out_data, e); end
      end
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
