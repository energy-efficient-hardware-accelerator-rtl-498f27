// psum_recover: rebuilds a partial sum loaded back for the next channel
// tile. The stored BW_O-bit word gives the sign and low bits, the decoded
// absolute MSBs (XORed back with the sign) give the EXT middle bits; the
// BW_O+EXT bit value is sign-extended and shifted left by `shift`, the
// scale the quantizer removed, so the accumulator continues at its own
// scale. Combinational.
module psum_recover #(
  parameter int BW_O  = 8,
  parameter int EXT   = 1,
  parameter int ACC_W = 24
) (
  input  logic [BW_O-1:0]         stored,
  input  logic [EXT-1:0]          msbs,
  input  logic [4:0]              shift,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [BW_O+EXT-1:0] q;
  assign q   = {stored[BW_O-1], msbs ^ {EXT{stored[BW_O-1]}}, stored[BW_O-2:0]};
  assign acc = ACC_W'(q) <<< shift;
endmodule
