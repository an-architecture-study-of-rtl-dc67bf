// of_fifo: synchronous FIFO used as the input data buffer and the output data
// buffer between the bus and the common element.
// Valid/ready on both sides: a word moves on a clock edge where valid and ready
// are both high. `in_ready` is low when full, `out_valid` high when not empty;
// `free` gives the number of empty places. Depth DEPTH (a power of two) is this
// design's choice; the document gives no size for these buffers.
module of_fifo #(
  parameter int W     = 192,
  parameter int DEPTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [AW:0]  free
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp, cnt;
  logic         do_push, do_pop;

  assign cnt       = wp - rp;
  assign free      = (AW+1)'(DEPTH) - cnt;
  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp[AW-1:0]];
  assign do_push   = in_valid && in_ready;
  assign do_pop    = out_valid && out_ready;

  always_ff @(posedge clk) if (do_push) mem[wp[AW-1:0]] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cnt <= (AW+1)'(DEPTH));
endmodule
