// tmx_indicator: zero / outlier indicator for one operand.
// A value is an outlier when it cannot be written as an NB-bit signed
// number, i.e. it is above 2^(NB-1)-1 or below -2^(NB-1); with the default
// NB = 4 this is the 4-bit outlier rule of the design. Purely combinational.
// The indicator bits travel with the value into the PE buffers, where they
// decide how many narrow-multiplier cycles the product takes.
// The zero and outlier definitions follow the published design (outlier:
// above 7 or below -8 for 8-bit data).
module tmx_indicator #(
  parameter int DATA_W = 8,
  parameter int NB     = 4
) (
  input  logic signed [DATA_W-1:0] value,
  output logic                     zero,
  output logic                     outlier
);
  localparam logic signed [DATA_W-1:0] MAXV = DATA_W'((1 << (NB-1)) - 1);
  localparam logic signed [DATA_W-1:0] MINV = -DATA_W'(1 << (NB-1));
  always_comb begin
    zero    = (value == '0);
    outlier = (value > MAXV) || (value < MINV);
  end
endmodule
