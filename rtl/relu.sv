// relu: activation module. Takes an accumulator-scale partial sum, drops
// `shift` fraction bits with round-half-up, applies the rectified linear
// unit (negative results become 0) and saturates the result to the signed
// DATA_W-bit feature-map range, so outputs lie in 0 .. 2^(DATA_W-1)-1.
// The rescaling and saturation are this implementation's choices; the
// activation itself is the ReLU of the design. Combinational.
module relu #(
  parameter int ACC_W  = 24,
  parameter int DATA_W = 8
) (
  input  logic signed [ACC_W-1:0]  psum,
  input  logic [4:0]               shift,
  output logic signed [DATA_W-1:0] fmap
);
  localparam logic signed [ACC_W:0] MAXV = (ACC_W+1)'((1 << (DATA_W-1)) - 1);
  logic signed [ACC_W:0] rnd, scaled;
  always_comb begin
    rnd    = (shift == 0) ? '0 : ((ACC_W+1)'(1) <<< (shift - 5'd1));
    scaled = ($signed({psum[ACC_W-1], psum}) + rnd) >>> shift;
    if (scaled < 0)         fmap = '0;
    else if (scaled > MAXV) fmap = MAXV[DATA_W-1:0];
    else                    fmap = scaled[DATA_W-1:0];
  end
endmodule
