// tb_of_prev_flow_buf: streams random rows through the buffer the way an
// iteration sweep does (read group c, push row y+1's group c next cycle, with a
// gap at each row end) and checks that row_mid and row_up return the rows pushed
// one and two rows earlier.
module tb_of_prev_flow_buf;
  import of_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int L = 4, G = 6, H = 8;
  localparam int BW = L * LANE_W;
  logic rd, push;
  logic [2:0] addr;
  logic [BW-1:0] push_data, row_up, row_mid;
  of_prev_flow_buf #(.LANES(L), .MAXG(G)) dut (.clk, .rd, .addr, .push, .push_data, .row_up, .row_mid);

  logic [BW-1:0] rows [H][G];

  initial begin
    #30000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd = 0; push = 0; addr = 0; push_data = '0;
    foreach (rows[r, c]) rows[r][c] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c <= G; c++) begin
        // cycle t: read
        rd = (c < G); addr = 3'(c % G); push = 0;
        @(negedge clk);
        // cycle t+1: words valid, push this row's word
        rd = 0;
        if (c < G) begin
          if (r >= 1) begin
            checks++;
            if (row_mid != rows[r-1][c]) begin failures++; $display("mid r%0d c%0d", r, c); end
          end
          if (r >= 2) begin
            checks++;
            if (row_up != rows[r-2][c]) begin failures++; $display("up r%0d c%0d", r, c); end
          end
          push = 1; push_data = rows[r][c];
          @(negedge clk);
          push = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
