// grlc_encoder: grid-based run-length compressor (GRLC).
// Takes one 2x3 tile of 8-bit feature-map values per handshake and emits
// the compressed stream one byte per handshake. A zero tile only advances
// the zero-tile run; a non-zero tile emits the header {run, 6-bit mask}
// and then its non-zero values in element order. Runs longer than the
// 2-bit field are cut by the header {3, 000000}, which codes four zero
// tiles. After the tile marked `tile_last` the end-of-packet header 0 is
// sent with `out_eop`; zero tiles at the end of a map are left implicit.
// Timing: a tile is taken in one cycle; its header and values then leave
// in 1 + (non-zero count) cycles while `out_ready` is high.
// The tile shape, run width, mask and end-of-packet code follow the design;
// the long-run code, mask bit order and byte-serial stream are choices of
// this implementation.
module grlc_encoder
  import grlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tile_valid,
  output logic        tile_ready,
  input  tile_t       tile,
  input  logic        tile_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_byte,
  output logic        out_eop
);
  typedef enum logic [1:0] {S_IN, S_HDR, S_DAT, S_EOP} state_e;
  state_e            state;
  tile_t             tile_q;
  header_t           hdr_q;
  logic [TILE_N-1:0] rem_q;
  logic              last_q;
  logic [RUN_W-1:0]  zrun;
  logic [TILE_N-1:0] mask;

  always_comb
    for (int i = 0; i < TILE_N; i++) mask[i] = (tile[i] != '0);

  assign tile_ready = (state == S_IN);
  assign out_valid  = (state != S_IN);
  assign out_eop    = (state == S_EOP);
  always_comb
    unique case (state)
      S_HDR:   out_byte = hdr_q;
      S_DAT:   out_byte = tile_q[first_one(rem_q)];
      default: out_byte = '0;
    endcase

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IN; zrun <= '0; tile_q <= '0; hdr_q <= '0; rem_q <= '0; last_q <= 1'b0;
    end else begin
      unique case (state)
        S_IN: if (tile_valid) begin
          tile_q <= tile;
          last_q <= tile_last;
          rem_q  <= mask;
          if (mask != '0) begin
            hdr_q <= '{run: zrun, mask: mask};
            zrun  <= '0;
            state <= S_HDR;
          end else if (zrun == RUN_W'(RUN_MAX)) begin
            hdr_q <= '{run: zrun, mask: '0};
            zrun  <= '0;
            state <= S_HDR;
          end else begin
            zrun  <= zrun + 1'b1;
            state <= tile_last ? S_EOP : S_IN;
          end
        end
        S_HDR: if (out_ready)
          state <= (rem_q != '0) ? S_DAT : (last_q ? S_EOP : S_IN);
        S_DAT: if (out_ready) begin
          rem_q[first_one(rem_q)] <= 1'b0;
          if ((rem_q & (rem_q - 1'b1)) == '0) state <= last_q ? S_EOP : S_IN;
        end
        S_EOP: if (out_ready) begin
          zrun  <= '0;
          state <= S_IN;
        end
        default: state <= S_IN;
      endcase
    end
  end
endmodule
