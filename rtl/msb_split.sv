// msb_split: splits an extended partial sum for storage.
// The QW = BW_O + EXT bit psum keeps its sign and its BW_O-1 low bits in
// the normal BW_O-bit output word, exactly where an unextended psum would
// be stored. The EXT bits between them are XORed with the sign, a
// one's-complement absolute value: for the small values that dominate they
// become 0, whatever the sign, which makes them compress well with the
// bit-level run-length encoder. Lossless: psum_recover undoes it.
// Combinational.
// Keeping {sign, 7 LSBs} in the output word and storing the remaining MSBs as
// absolute values follows the published method; using the XOR with the sign
// as the absolute value is this design's choice.
module msb_split #(
  parameter int BW_O = 8,
  parameter int EXT  = 1
) (
  input  logic [BW_O+EXT-1:0] q,
  output logic [BW_O-1:0]     stored,
  output logic [EXT-1:0]      msbs
);
  localparam int QW = BW_O + EXT;
  assign stored = {q[QW-1], q[BW_O-2:0]};
  assign msbs   = q[QW-2:BW_O-1] ^ {EXT{q[QW-1]}};
endmodule
