// tb_of_dram2p: random simultaneous writes and reads on the two ports, checked
// against a model array; a read of the address written in the same cycle must
// return the old word, and rdata must hold while no read is issued.
module tb_of_dram2p;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int D = 64;
  logic we, re;
  logic [5:0] waddr, raddr;
  logic [23:0] wdata, rdata;
  of_dram2p #(.W(24), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  logic [23:0] model [D];
  logic [23:0] exp_r;

  initial begin
    #50000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = 6'(i); wdata = 24'($urandom); model[i] = wdata; @(negedge clk);
    end
    exp_r = 0;
    for (int n = 0; n < 1000; n++) begin
      we = $urandom % 2; re = $urandom % 2;
      waddr = 6'($urandom); raddr = (n % 5 == 0) ? waddr : 6'($urandom);
      wdata = 24'($urandom);
      if (re) exp_r = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      if (re || n > 0) begin
        checks++;
        if (rdata != exp_r) begin failures++; $display("read got %h exp %h", rdata, exp_r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
