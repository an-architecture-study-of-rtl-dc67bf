// of_dram2p: one bank of the optical-flow memory, a two-port memory with one write
// port and one read port on the same clock (the document's 2-port gain-cell DRAM
// with a 0.61 Mb bank per lane and flow component).
// Write: `we`, `waddr`, `wdata` are stored at the clock edge. Read: `re`, `raddr`
// give `rdata` one cycle later; a read of the address written in the same cycle
// returns the old word. As every word is read each iteration, well within the
// retention time, the bank needs no refresh and has no refresh logic.
module of_dram2p #(
  parameter int W     = 24,
  parameter int DEPTH = 25344,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
