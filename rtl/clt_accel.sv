// clt_accel: channel-loop-tiling-aware CNN accelerator.
//
// Problem: when the input-channel loop of a layer is split into tiles, the
// partial sum of every output must be stored between tiles. Rounding it to
// the BW_O-bit output format each time adds rounding and saturation
// ("exceeding") errors that pile up over the tiles. This accelerator stores
// each partial sum with EXT extra bits (IP_EXT integer, FP_EXT fraction)
// but keeps the output buffer at BW_O bits per value: the sign and low bits
// go to the output buffer as usual, and the EXT middle bits, made absolute
// (XOR with the sign) so they are almost always 0, are compressed by a
// bit-level run-length encoder into a small compressed-MSB buffer.
//
// Operation: NPE PEs of NMAC MACs compute NL = NPE*NMAC outputs (PE p owns
// pixel p, MAC m output channel m). The host fills the input buffer
// (ifm_buf[c][p]), the filter buffer (wgt_buf[c][p][m]) and, once, the
// bias buffer, then issues one command per channel tile:
//   1. init: `first` loads the biases; otherwise every lane's partial sum
//      is rebuilt from its output-buffer byte and its decoded MSB bits
//      (one MSB bit per cycle from the run-length decoder).
//   2. MAC: `tc` cycles, channel c of the tile in cycle c.
//   3. store: one lane per cycle (EXT cycles when EXT > 1). Not `last`:
//      round by shift - FP_EXT to BW_O+EXT bits, split, compress the MSBs.
//      `last`: round by `shift` to BW_O bits, the final output map.
//   `done` pulses when the tile is complete. `shift` is the number of
//   fraction bits the accumulator has beyond the output format.
// Timing: 1 + NL*EXT (+1 per run-length word) cycles to initialise, tc
// cycles of MACs, NL*EXT + 3 cycles to store.
// The six PEs of eight MACs, the extension, the 16-bit run-length words and
// the split follow the design. Keeping stored partial sums on chip (instead
// of a round trip to external memory) and the command interface are
// choices of this implementation; the stored bits are the same.
// msb_words is LEN_W bits wide like a run-length word, although a tile
// needs at most NL*EXT+1 words; its upper bits are therefore constant 0.
module clt_accel #(
  parameter int NPE    = 6,
  parameter int NMAC   = 8,
  parameter int BW_I   = 8,
  parameter int BW_F   = 8,
  parameter int BW_O   = 8,
  parameter int ACC_W  = 24,
  parameter int IP_EXT = 0,
  parameter int FP_EXT = 1,
  parameter int LEN_W  = 16,
  parameter int TC_MAX = 64,
  localparam int NL  = NPE*NMAC,
  localparam int EXT = IP_EXT + FP_EXT,
  localparam int CAW = $clog2(TC_MAX),
  localparam int LAW = $clog2(NL)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // input / filter / bias buffer fill
  input  logic                   ifm_we,
  input  logic [CAW-1:0]         ifm_waddr,
  input  logic [NPE-1:0][BW_I-1:0] ifm_wdata,
  input  logic                   wgt_we,
  input  logic [CAW-1:0]         wgt_waddr,
  input  logic [NL-1:0][BW_F-1:0] wgt_wdata,
  input  logic                   bias_we,
  input  logic [LAW-1:0]         bias_waddr,
  input  logic [ACC_W-1:0]       bias_wdata,
  // channel tile command
  input  logic                   start,
  input  logic                   first,
  input  logic                   last,
  input  logic [CAW:0]           tc,
  input  logic [4:0]             shift,
  output logic                   busy,
  output logic                   done,
  // output buffer read
  input  logic [LAW-1:0]         out_raddr,
  output logic [BW_O-1:0]        out_rdata,
  // status
  output logic [15:0]            msb_words,    // run-length words holding the MSBs
  output logic [31:0]            exceed_count, // saturated (exceeding) roundings
  output logic [31:0]            recover_count // partial sums rebuilt
);
  if (IP_EXT + FP_EXT < 1) begin : g_ext_check
    $error("clt_accel needs at least one extension bit (IP_EXT + FP_EXT >= 1)");
  end
  localparam int QW        = BW_O + EXT;
  localparam int MSB_DEPTH = NL*EXT + 1;
  localparam int MAW       = $clog2(MSB_DEPTH + 1);
  localparam int EW        = (EXT > 1) ? $clog2(EXT) : 1;

  typedef enum logic [2:0] {S_IDLE, S_REC, S_LOAD, S_MAC, S_STORE, S_FLUSH, S_FIN} state_e;
  state_e state;

  logic [NPE-1:0][BW_I-1:0] ifm_buf  [TC_MAX];
  logic [NL-1:0][BW_F-1:0]  wgt_buf  [TC_MAX];
  logic signed [ACC_W-1:0]  bias_buf [NL];
  logic [BW_O-1:0]          out_buf  [NL];
  logic [LEN_W-1:0]         msb_buf  [MSB_DEPTH];
  logic signed [ACC_W-1:0]  init_q   [NL];

  logic            last_q;
  logic [CAW:0]    tc_q, c;
  logic [4:0]      shift_q, qshift;
  logic [LAW-1:0]  lane;
  logic [EW-1:0]   j;
  logic [EXT-1:0]  msb_acc;
  logic [MAW-1:0]  wptr, rptr;

  always_ff @(posedge clk) begin
    if (ifm_we)  ifm_buf[ifm_waddr]   <= ifm_wdata;
    if (wgt_we)  wgt_buf[wgt_waddr]   <= wgt_wdata;
    if (bias_we) bias_buf[bias_waddr] <= bias_wdata;
  end

  assign qshift = shift_q - 5'(FP_EXT);

  // ---------------- PEs ----------------
  logic signed [ACC_W-1:0] acc  [NL];
  logic                    pe_en, pe_load;
  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic signed [BW_F-1:0]  w  [NMAC];
    logic signed [ACC_W-1:0] in [NMAC];
    logic signed [ACC_W-1:0] a  [NMAC];
    for (genvar m = 0; m < NMAC; m++) begin : g_m
      assign w[m]            = wgt_buf[c[CAW-1:0]][p*NMAC+m];
      assign in[m]           = init_q[p*NMAC+m];
      assign acc[p*NMAC+m]   = a[m];
    end
    clt_pe #(.NMAC(NMAC), .BW_I(BW_I), .BW_F(BW_F), .ACC_W(ACC_W)) u_pe (
      .clk, .rst_n, .ifm(ifm_buf[c[CAW-1:0]][p]), .wgt(w),
      .en(pe_en), .load(pe_load), .init(in), .acc(a)
    );
  end
  assign pe_en   = (state == S_MAC);
  assign pe_load = (state == S_LOAD);

  // ---------------- store path ----------------
  logic signed [QW-1:0]   q_ext;
  logic signed [BW_O-1:0] q_fin;
  logic                   exc_ext, exc_fin;
  logic [BW_O-1:0]        stored;
  logic [EXT-1:0]         msbs;
  psum_quantizer #(.ACC_W(ACC_W), .QW(QW))   u_qext (.acc(acc[lane]), .shift(qshift),  .q(q_ext), .exceed(exc_ext));
  psum_quantizer #(.ACC_W(ACC_W), .QW(BW_O)) u_qfin (.acc(acc[lane]), .shift(shift_q), .q(q_fin), .exceed(exc_fin));
  msb_split      #(.BW_O(BW_O), .EXT(EXT))   u_split (.q(q_ext), .stored(stored), .msbs(msbs));

  logic             enc_bit_valid, enc_bit, enc_flush, enc_wvalid;
  logic [LEN_W-1:0] enc_word;
  assign enc_bit_valid = (state == S_STORE) && !last_q;
  assign enc_bit       = msbs[EXT-1-int'(j)];
  assign enc_flush     = (state == S_FLUSH) && !last_q;
  rle_encoder #(.LEN_W(LEN_W)) u_rle_enc (
    .clk, .rst_n, .bit_valid(enc_bit_valid), .bit_in(enc_bit), .flush(enc_flush),
    .word_valid(enc_wvalid), .word(enc_word)
  );

  // ---------------- recover path ----------------
  logic dec_wvalid, dec_wready, dec_bvalid, dec_bready, dec_bit;
  logic signed [ACC_W-1:0] rec_acc;
  logic [EXT-1:0]          msb_now;
  assign dec_wvalid = (state == S_REC) && (rptr != wptr);
  assign dec_bready = (state == S_REC);
  rle_decoder #(.LEN_W(LEN_W)) u_rle_dec (
    .clk, .rst_n, .word_valid(dec_wvalid), .word_ready(dec_wready), .word(msb_buf[rptr]),
    .bit_valid(dec_bvalid), .bit_ready(dec_bready), .bit_out(dec_bit)
  );
  assign msb_now = EXT'({msb_acc, dec_bit});
  psum_recover #(.BW_O(BW_O), .EXT(EXT), .ACC_W(ACC_W)) u_rec (
    .stored(out_buf[lane]), .msbs(msb_now), .shift(qshift), .acc(rec_acc)
  );

  assign out_rdata = out_buf[out_raddr];
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; last_q <= 1'b0; tc_q <= '0; c <= '0;
      shift_q <= '0; lane <= '0; j <= '0; msb_acc <= '0; wptr <= '0; rptr <= '0;
      msb_words <= '0; exceed_count <= '0; recover_count <= '0;
      for (int l = 0; l < NL; l++) begin init_q[l] <= '0; out_buf[l] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          last_q <= last; tc_q <= tc; shift_q <= shift;
          lane <= '0; j <= '0; c <= '0; rptr <= '0; msb_acc <= '0;
          if (first) begin
            for (int l = 0; l < NL; l++) init_q[l] <= bias_buf[l];
            state <= S_LOAD;
          end else state <= S_REC;
        end
        S_REC: begin
          if (dec_wvalid && dec_wready) rptr <= rptr + 1'b1;
          if (dec_bvalid) begin
            if (j == EW'(EXT - 1)) begin
              init_q[lane]  <= rec_acc;
              recover_count <= recover_count + 1;
              j <= '0; msb_acc <= '0;
              if (lane == LAW'(NL - 1)) state <= S_LOAD;
              else lane <= lane + 1'b1;
            end else begin
              j <= j + 1'b1;
              msb_acc <= msb_now;
            end
          end
        end
        S_LOAD: begin
          lane <= '0; j <= '0; c <= '0; wptr <= '0;
          state <= (tc_q == '0) ? S_STORE : S_MAC;
        end
        S_MAC: begin
          if (c == tc_q - 1'b1) begin c <= '0; state <= S_STORE; end
          else c <= c + 1'b1;
        end
        S_STORE: begin
          if (j == '0) begin
            out_buf[lane] <= last_q ? q_fin : stored;
            if (last_q ? exc_fin : exc_ext) exceed_count <= exceed_count + 1;
          end
          if (j == EW'(EXT - 1) || last_q) begin
            j <= '0;
            if (lane == LAW'(NL - 1)) state <= S_FLUSH;
            else lane <= lane + 1'b1;
          end else j <= j + 1'b1;
        end
        S_FLUSH: state <= S_FIN;            // flush word is registered now
        S_FIN: begin
          state <= S_IDLE; done <= 1'b1;
          msb_words <= 16'(wptr) + 16'(enc_wvalid);
        end
        default: state <= S_IDLE;
      endcase
      if (enc_wvalid) wptr <= wptr + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (enc_wvalid) msb_buf[wptr] <= enc_word;

  // the compressed-MSB buffer is sized for the worst case and never overflows
  assert property (@(posedge clk) disable iff (!rst_n) enc_wvalid |-> (wptr < MAW'(MSB_DEPTH)));
endmodule
