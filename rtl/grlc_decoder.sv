// grlc_decoder: restores 2x3 feature-map tiles from a GRLC byte stream.
// `start` begins a packet of `total_tiles` tiles. Each header byte
// {run, mask} yields `run` zero tiles, then (mask != 0) the tile built from
// the following non-zero bytes, or (mask == 0) one more zero tile. The
// end-of-packet header 0 ends the stream, after which zero tiles are
// emitted until `total_tiles` have been produced; `done` is then held until
// the next `start`. Bytes are taken one per cycle; a zero tile leaves in one
// cycle; a non-zero tile one cycle after its last byte.
// From the published scheme: 2x3 tiles, 2-bit run, 6-bit mask, non-zero values
// after the mask, an end-of-packet code. Own choices: the four-zero-tile
// header, the value 0 for end-of-packet, the zero fill up to total_tiles
// and the handshakes.
module grlc_decoder
  import grlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] total_tiles,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_byte,
  output logic        tile_valid,
  input  logic        tile_ready,
  output tile_t       tile,
  output logic        done
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_ZERO, S_DAT, S_OUT, S_FILL, S_DONE} state_e;
  state_e            state;
  tile_t             tile_q;
  logic [TILE_N-1:0] rem_q;
  logic [RUN_W:0]    zeros_q;
  logic [15:0]       count;
  header_t           hdr;

  assign hdr        = header_t'(in_byte);
  assign in_ready   = (state == S_HDR) || (state == S_DAT);
  assign tile_valid = (state == S_ZERO) || (state == S_OUT) ||
                      (state == S_FILL && count != total_tiles);
  assign tile       = (state == S_OUT) ? tile_q : '0;
  assign done       = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; tile_q <= '0; rem_q <= '0; zeros_q <= '0; count <= '0;
    end else begin
      if (start) begin
        state <= S_HDR; count <= '0;
      end else unique case (state)
        S_HDR: if (in_valid) begin
          if (in_byte == '0) state <= S_FILL;
          else begin
            zeros_q <= (RUN_W+1)'(hdr.run) + (RUN_W+1)'(hdr.mask == '0);
            rem_q   <= hdr.mask;
            tile_q  <= '0;
            state   <= (hdr.run != '0 || hdr.mask == '0) ? S_ZERO : S_DAT;
          end
        end
        S_ZERO: if (tile_ready) begin
          count   <= count + 1'b1;
          zeros_q <= zeros_q - 1'b1;
          if (zeros_q == (RUN_W+1)'(1)) state <= (rem_q != '0) ? S_DAT : S_HDR;
        end
        S_DAT: if (in_valid) begin
          tile_q[first_one(rem_q)] <= in_byte;
          rem_q[first_one(rem_q)]  <= 1'b0;
          if ((rem_q & (rem_q - 1'b1)) == '0) state <= S_OUT;
        end
        S_OUT: if (tile_ready) begin
          count <= count + 1'b1;
          state <= S_HDR;
        end
        S_FILL: begin
          if (count == total_tiles) state <= S_DONE;
          else if (tile_ready)      count <= count + 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
