// rle_encoder: bit-level run-length encoder for the extended psum MSBs.
// Input is a stream of bits; output words are {run bit, length} with a
// LEN_W-1 bit length field (1 + 15 bits for the 16-bit format), so a word
// records up to 2^(LEN_W-1)-1 equal consecutive bits. A word is emitted
// when the bit value changes, when the length field is full, or on
// `flush`, which closes the open run (given in a cycle without a bit).
// `word_valid` is a one-cycle pulse registered after the event; the
// receiver must take it (the compressed-MSB buffer always can).
// The 16-bit word with a 1-bit value and a 15-bit length follows the
// published example, which stores the run length directly; the flush input
// and the output pulse are this design's choices.
module rle_encoder #(
  parameter int LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bit_valid,
  input  logic             bit_in,
  input  logic             flush,
  output logic             word_valid,
  output logic [LEN_W-1:0] word
);
  localparam int CW = LEN_W - 1;
  logic          cur;
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= 1'b0; count <= '0; word_valid <= 1'b0; word <= '0;
    end else begin
      word_valid <= 1'b0;
      if (bit_valid) begin
        if (count == '0) begin
          cur <= bit_in; count <= CW'(1);
        end else if (bit_in == cur && count != '1) begin
          count <= count + 1'b1;
        end else begin
          word_valid <= 1'b1; word <= {cur, count};
          cur <= bit_in; count <= CW'(1);
        end
      end else if (flush && count != '0) begin
        word_valid <= 1'b1; word <= {cur, count};
        count <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(flush && bit_valid));
endmodule
