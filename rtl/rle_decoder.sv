// rle_decoder: expands {run bit, length} words back into a bit stream.
// A word is taken when the previous one is used up; its bit is then
// output `length` times, one per handshake. A word of length 0 is ignored.
// The word format follows the 16-bit run-length format described for the MSB
// compressor; the decoder itself and its handshake are this design's own,
// since only the encoding direction is described.
module rle_decoder #(
  parameter int LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             word_valid,
  output logic             word_ready,
  input  logic [LEN_W-1:0] word,
  output logic             bit_valid,
  input  logic             bit_ready,
  output logic             bit_out
);
  localparam int CW = LEN_W - 1;
  logic          cur;
  logic [CW-1:0] left;

  assign word_ready = (left == '0);
  assign bit_valid  = (left != '0);
  assign bit_out    = cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= 1'b0; left <= '0;
    end else if (left == '0) begin
      if (word_valid) begin
        cur  <= word[LEN_W-1];
        left <= word[CW-1:0];
      end
    end else if (bit_ready) begin
      left <= left - 1'b1;
    end
  end
endmodule
