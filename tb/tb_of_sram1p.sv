// tb_of_sram1p: random single-port writes and reads against a model array; a read
// returns the word one cycle later and holds it through writes and idle cycles.
module tb_of_sram1p;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int D = 64;
  logic en, we;
  logic [5:0] addr;
  logic [15:0] wdata, rdata;
  of_sram1p #(.W(16), .DEPTH(D)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  logic [15:0] model [D];
  logic [15:0] exp_r;

  initial begin
    #50000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      en = 1; we = 1; addr = 6'(i); wdata = 16'($urandom); model[i] = wdata; @(negedge clk);
    end
    en = 1; we = 0; addr = 0; exp_r = model[0]; @(negedge clk);
    for (int n = 0; n < 1000; n++) begin
      en = ($urandom % 4) != 0; we = $urandom % 2;
      addr = 6'($urandom); wdata = 16'($urandom);
      if (en && !we) exp_r = model[addr];
      if (en && we) model[addr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata != exp_r) begin failures++; $display("read got %h exp %h", rdata, exp_r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
