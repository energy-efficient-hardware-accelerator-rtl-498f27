// psum_quantizer: rounds an accumulator value to the stored psum format.
// The value is shifted right by `shift` bits with round-half-up and then
// saturated to the QW-bit signed range. QW is the output width BW_O plus
// the extension bits of the integer and fractional parts. Saturation is
// the "exceeding error" of channel tiling and is flagged on `exceed`; the
// dropped bits are its "rounding error". Combinational.
// The rounding of psums to BW_O bits plus extension bits, and the two error
// kinds, follow the published method; round-half-up and saturation are this
// design's choice of rounding and overflow rule.
module psum_quantizer #(
  parameter int ACC_W = 24,
  parameter int QW    = 9
) (
  input  logic signed [ACC_W-1:0] acc,
  input  logic [4:0]              shift,
  output logic signed [QW-1:0]    q,
  output logic                    exceed
);
  localparam logic signed [ACC_W:0] MAXV = (ACC_W+1)'((1 << (QW-1)) - 1);
  localparam logic signed [ACC_W:0] MINV = -(ACC_W+1)'(1 << (QW-1));
  logic signed [ACC_W:0] rnd, scaled;
  always_comb begin
    rnd    = (shift == 0) ? '0 : ((ACC_W+1)'(1) <<< (shift - 5'd1));
    scaled = ($signed({acc[ACC_W-1], acc}) + rnd) >>> shift;
    exceed = 1'b1;
    if (scaled > MAXV)      q = MAXV[QW-1:0];
    else if (scaled < MINV) q = MINV[QW-1:0];
    else begin
      q      = scaled[QW-1:0];
      exceed = 1'b0;
    end
  end
endmodule
