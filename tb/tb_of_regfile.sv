// tb_of_regfile: shifts random columns into the window (with idle cycles between)
// and checks, for every lane, the centre value and all eight neighbours against
// a model of the 3 x 12 pixel window.
module tb_of_regfile;
  import of_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int L = 4;
  logic shift;
  flow_vec_t col_in [3][L];
  flow_vec_t nb [L][8];
  flow_vec_t ctr [L];
  of_regfile #(.LANES(L)) dut (.clk, .rst_n, .shift, .col_in, .nb, .ctr);

  flow_vec_t win [3][3*L];
  localparam int DY [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
  localparam int DX [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};

  initial begin
    #30000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    shift = 0;
    foreach (col_in[r, k]) col_in[r][k] = '0;
    foreach (win[r, p]) win[r][p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      shift = ($urandom % 3) != 0;
      foreach (col_in[r, k]) col_in[r][k] = {24'($urandom), 24'($urandom)};
      if (shift) begin
        for (int r = 0; r < 3; r++) begin
          for (int p = 0; p < 2 * L; p++) win[r][p] = win[r][p + L];
          for (int k = 0; k < L; k++) win[r][2 * L + k] = col_in[r][k];
        end
      end
      @(negedge clk);
      shift = 0;
      for (int k = 0; k < L; k++) begin
        checks++;
        if (ctr[k] != win[1][L + k]) begin failures++; $display("ctr lane %0d", k); end
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (nb[k][i] != win[1 + DY[i]][L + k + DX[i]]) begin
            failures++; $display("nb lane %0d idx %0d", k, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
