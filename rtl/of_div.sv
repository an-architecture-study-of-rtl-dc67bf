// of_div: pipelined divider of the processing element (DIV), q = num / den.
//
// Restoring division on magnitudes: the numerator is signed, the denominator is
// taken as unsigned (it is alpha^2 + Ix^2 + Iy^2 and never negative). Stage 0
// registers |num|, den and the sign and flags a quotient that would not fit in
// QW signed bits; stages 1..QW-1 each decide one quotient bit, most significant
// first; the last stage applies the sign and saturates. The quotient is rounded
// toward zero. A zero denominator saturates. Latency QW + 1 cycles, one division
// accepted per cycle (the document asks for a data path that produces a result
// every clock; the restoring structure is this design's choice).
module of_div #(
  parameter int NW = 50,   // numerator width (signed)
  parameter int DW = 42,   // denominator width (unsigned)
  parameter int QW = 24    // quotient width (signed)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vi,
  input  logic signed [NW-1:0] num,
  input  logic        [DW-1:0] den,
  output logic                 vo,
  output logic signed [QW-1:0] q
);
  localparam int MB = QW - 1;                              // magnitude bits
  localparam int CW = ((NW > DW + MB) ? NW : DW + MB) + 1; // compare width

  logic [CW-1:0] rem  [MB+1];
  logic [CW-1:0] dvs  [MB+1];
  logic [MB-1:0] quo  [MB+1];
  logic          neg  [MB+1];
  logic          sat  [MB+1];
  logic          vld  [MB+1];

  logic [NW-1:0] num_mag;
  logic [CW-1:0] den_top;
  assign num_mag = num[NW-1] ? NW'(-num) : NW'(num);
  assign den_top = CW'(den) << MB;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= MB; s++) begin
        rem[s] <= '0; dvs[s] <= '0; quo[s] <= '0;
        neg[s] <= 1'b0; sat[s] <= 1'b0; vld[s] <= 1'b0;
      end
      vo <= 1'b0;
      q  <= '0;
    end else begin
      // stage 0
      rem[0] <= CW'(num_mag);
      dvs[0] <= CW'(den);
      quo[0] <= '0;
      neg[0] <= num[NW-1];
      sat[0] <= (den == '0) || (CW'(num_mag) >= den_top);
      vld[0] <= vi;
      // stages 1..MB: bit MB-s of the quotient
      for (int s = 1; s <= MB; s++) begin
        dvs[s] <= dvs[s-1];
        neg[s] <= neg[s-1];
        sat[s] <= sat[s-1];
        vld[s] <= vld[s-1];
        if (rem[s-1] >= (dvs[s-1] << (MB - s))) begin
          rem[s] <= rem[s-1] - (dvs[s-1] << (MB - s));
          quo[s] <= quo[s-1] | (MB'(1) << (MB - s));
        end else begin
          rem[s] <= rem[s-1];
          quo[s] <= quo[s-1];
        end
      end
      // output stage
      vo <= vld[MB];
      if (sat[MB])      q <= neg[MB] ? -QW'({1'b0, {MB{1'b1}}}) : QW'({1'b0, {MB{1'b1}}});
      else if (neg[MB]) q <= -QW'({1'b0, quo[MB]});
      else              q <= QW'({1'b0, quo[MB]});
    end
  end
endmodule
