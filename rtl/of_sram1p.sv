// of_sram1p: one bank of the gradient memory, a single-port SRAM (0.41 Mb per lane
// and gradient component in the document's floor plan).
// With `en` set, `we` selects a write of `wdata` to `addr`; otherwise the word at
// `addr` appears on `rdata` one cycle later.
module of_sram1p #(
  parameter int W     = 16,
  parameter int DEPTH = 25344,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
