// tmx_accel: time-multiplexing CNN accelerator (one layer pass per start).
//
// Datapath: a compressed input feature map arrives from off-chip memory as
// a GRLC byte stream, is restored by the decoder and written into the
// on-chip global buffer. For each pass the controller copies the operand
// vectors of every PE from the global buffer into its IFM and weight
// buffers; on the way each value passes the indicator module, which adds
// its zero and outlier bits. All PEs then compute their dot products with
// the time-multiplexed narrow multipliers (non-outlier pairs in one cycle,
// outlier pairs in two or four). Each PE's result goes through ReLU back
// into the global buffer. After the last pass the output map is read in
// 2x3 tiles, compressed by the GRLC encoder and sent off-chip.
//
// Mapping (this implementation's choice; the controller's behaviour is not
// specified beyond its blocks): the host lays out each PE's operand vector
// in the global buffer (im2col). In pass p, PE k computes a dot product of
// chunks*len pairs, i < chunks*len:
//   IFM: gb[ifm_base + p*ifm_pass_stride + k*ifm_stride + i]
//   WGT: gb[wgt_base + p*wgt_pass_stride + k*wgt_stride + i]
// starting from the bias gb[bias_base + p*NPE + k] << relu_shift, and writes
// relu(psum) to gb[out_base + p*NPE + k]. Vectors longer than the 256-entry
// operand buffers are split into chunks of len: each chunk is loaded and
// run in turn, the first starting from the bias and the others from the
// PE's PSUM buffer, so only the final sum goes through ReLU. A stride of 0
// shares a vector between PEs. The output map is out_h x out_w bytes at
// out_base.
// Interfaces: byte streams with valid/ready to and from off-chip memory;
// a host port reads and writes the global buffer while the accelerator is
// idle. Timing: about 2*len+1 cycles per PE to load, the compute time of
// the slowest PE (both per chunk), NPE cycles of write-back per pass, and 7 cycles plus the
// encoder's output per tile.
module tmx_accel #(
  parameter int ROWS       = 3,
  parameter int COLS       = 5,
  parameter int BUF_DEPTH  = 256,
  parameter int NB         = 4,
  parameter int ACC_W      = 24,
  parameter int PSUM_DEPTH = 16,
  parameter int GB_DEPTH   = 16384,
  localparam int NPE = ROWS*COLS,
  localparam int GAW = $clog2(GB_DEPTH),
  localparam int LW  = $clog2(BUF_DEPTH+1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // layer configuration, held while busy
  input  logic            cfg_decomp,
  input  logic [GAW-1:0]  cfg_in_base,
  input  logic [7:0]      cfg_in_h,
  input  logic [7:0]      cfg_in_w,
  input  logic [GAW-1:0]  cfg_ifm_base,
  input  logic [GAW-1:0]  cfg_ifm_stride,
  input  logic [GAW-1:0]  cfg_ifm_pass_stride,
  input  logic [GAW-1:0]  cfg_wgt_base,
  input  logic [GAW-1:0]  cfg_wgt_stride,
  input  logic [GAW-1:0]  cfg_wgt_pass_stride,
  input  logic [GAW-1:0]  cfg_bias_base,
  input  logic [LW-1:0]   cfg_len,
  input  logic [7:0]      cfg_passes,
  input  logic [7:0]      cfg_chunks,
  input  logic            cfg_zero_skip,
  input  logic [4:0]      cfg_relu_shift,
  input  logic [GAW-1:0]  cfg_out_base,
  input  logic [7:0]      cfg_out_h,
  input  logic [7:0]      cfg_out_w,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // compressed input feature map from off-chip memory
  input  logic            dram_in_valid,
  output logic            dram_in_ready,
  input  logic [7:0]      dram_in_byte,
  // compressed output feature map to off-chip memory
  output logic            dram_out_valid,
  input  logic            dram_out_ready,
  output logic [7:0]      dram_out_byte,
  output logic            dram_out_eop,
  // host access to the global buffer (while idle)
  input  logic            gb_ext_we,
  input  logic [GAW-1:0]  gb_ext_waddr,
  input  logic [7:0]      gb_ext_wdata,
  input  logic            gb_ext_re,
  input  logic [GAW-1:0]  gb_ext_raddr,
  output logic [7:0]      gb_ext_rdata,
  // activity counters of the PE array
  output logic [31:0]     mult_cycles,
  output logic [31:0]     skip_count
);
  import grlc_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_DEC, S_DEC_WR, S_LOAD, S_LOAD_END, S_RUN, S_WAIT, S_DRAIN,
    S_COMP, S_COMP_OUT, S_EOP
  } state_e;
  state_e state;

  // ---------------- global buffer ----------------
  logic           gb_we, gb_re;
  logic [GAW-1:0] gb_waddr, gb_raddr;
  logic [7:0]     gb_wdata, gb_rdata;
  sdp_ram #(.DEPTH(GB_DEPTH), .WIDTH(8)) u_gb (
    .clk, .we(gb_we), .waddr(gb_waddr), .wdata(gb_wdata),
    .re(gb_re), .raddr(gb_raddr), .rdata(gb_rdata)
  );
  assign gb_ext_rdata = gb_rdata;

  // ---------------- indicator module ----------------
  logic ind_zero, ind_out;
  tmx_indicator #(.DATA_W(8), .NB(NB)) u_ind (.value(gb_rdata), .zero(ind_zero), .outlier(ind_out));

  // ---------------- PE array ----------------
  logic [7:0]     chunk;         // piece of the dot product being loaded / run
  localparam int SW  = $clog2(NPE);
  localparam int AW  = $clog2(BUF_DEPTH);
  localparam int PAW = $clog2(PSUM_DEPTH);
  logic [SW-1:0]           pe_sel;
  logic                    ifm_we, wgt_we, arr_start, arr_done, arr_busy;
  logic [AW-1:0]           buf_waddr;
  logic signed [ACC_W-1:0] bias_q [NPE];
  logic signed [ACC_W-1:0] psum_rd;
  tmx_pe_array #(.ROWS(ROWS), .COLS(COLS), .BUF_DEPTH(BUF_DEPTH), .DATA_W(8), .NB(NB),
                 .ACC_W(ACC_W), .PSUM_DEPTH(PSUM_DEPTH)) u_arr (
    .clk, .rst_n, .pe_sel,
    .ifm_we, .ifm_waddr(buf_waddr), .ifm_wdata(gb_rdata), .ifm_zero(ind_zero), .ifm_outlier(ind_out),
    .wgt_we, .wgt_waddr(buf_waddr), .wgt_wdata(gb_rdata), .wgt_zero(ind_zero), .wgt_outlier(ind_out),
    .start(arr_start), .len(cfg_len), .psum_addr(PAW'(0)), .psum_init(chunk == 8'd0), .psum_in(bias_q),
    .zero_skip(cfg_zero_skip), .busy(arr_busy), .done(arr_done),
    .psum_raddr(PAW'(0)), .psum_rdata(psum_rd), .mult_cycles, .skip_count
  );

  // ---------------- activation ----------------
  logic signed [7:0] act;
  relu #(.ACC_W(ACC_W), .DATA_W(8)) u_relu (.psum(psum_rd), .shift(cfg_relu_shift), .fmap(act));

  // ---------------- GRLC decoder / encoder ----------------
  logic [7:0] in_tc_n, out_tc_n, out_tr_n;
  logic        dec_start, dec_tvalid, dec_tready, dec_done;
  tile_t       dec_tile, tile_q;
  logic [15:0] in_tiles;
  logic [8:0]  in_h1;
  assign in_h1    = {1'b0, cfg_in_h} + 9'd1;
  assign in_tiles = 16'(in_h1[8:1]) * 16'(in_tc_n);

  grlc_decoder u_dec (
    .clk, .rst_n, .start(dec_start), .total_tiles(in_tiles),
    .in_valid(dram_in_valid), .in_ready(dram_in_ready), .in_byte(dram_in_byte),
    .tile_valid(dec_tvalid), .tile_ready(dec_tready), .tile(dec_tile), .done(dec_done)
  );

  logic enc_tvalid, enc_tready, enc_tlast;
  grlc_encoder u_enc (
    .clk, .rst_n, .tile_valid(enc_tvalid), .tile_ready(enc_tready), .tile(tile_q), .tile_last(enc_tlast),
    .out_valid(dram_out_valid), .out_ready(dram_out_ready), .out_byte(dram_out_byte), .out_eop(dram_out_eop)
  );

  // ---------------- controller ----------------
  logic [7:0]     tr, tc;        // tile row / column
  logic [2:0]     el;            // tile element being written or read
  logic [2:0]     el_d;          // element whose read data arrives now
  logic           rd_pend, rd_inrange;
  logic [7:0]     pass;
  logic [SW-1:0]  pe;
  logic [LW:0]    k;             // load item: ifm[k], wgt[k-len], bias
  logic           ld_pend;
  logic [1:0]     ld_kind;       // 0 ifm, 1 wgt, 2 bias
  logic [AW-1:0]  ld_idx;
  logic [SW-1:0]  ld_pe;

  // address of element `e` of tile (tr, tc) in a map of width w at base b
  function automatic logic [GAW-1:0] tile_addr(input logic [GAW-1:0] b, input logic [7:0] w,
                                               input logic [7:0] r0, input logic [7:0] c0,
                                               input logic [2:0] e);
    logic [15:0] r, c;
    r = 16'(r0) * 16'(TILE_ROWS) + 16'(e / 3'(TILE_COLS));
    c = 16'(c0) * 16'(TILE_COLS) + 16'(e % 3'(TILE_COLS));
    return GAW'(b + GAW'(r * 16'(w) + c));
  endfunction
  function automatic logic in_map(input logic [7:0] h, input logic [7:0] w,
                                  input logic [7:0] r0, input logic [7:0] c0, input logic [2:0] e);
    logic [15:0] r, c;
    r = 16'(r0) * 16'(TILE_ROWS) + 16'(e / 3'(TILE_COLS));
    c = 16'(c0) * 16'(TILE_COLS) + 16'(e % 3'(TILE_COLS));
    return (r < 16'(h)) && (c < 16'(w));
  endfunction

  assign in_tc_n  = (cfg_in_w + 8'd2) / 8'd3;
  assign out_tc_n = (cfg_out_w + 8'd2) / 8'd3;
  assign out_tr_n = (cfg_out_h + 8'd1) >> 1;

  logic [GAW-1:0] ld_addr;
  always_comb begin
    logic [GAW-1:0] pofs_i, pofs_w;
    pofs_i = GAW'(pass) * cfg_ifm_pass_stride + GAW'(chunk) * GAW'(cfg_len);
    pofs_w = GAW'(pass) * cfg_wgt_pass_stride + GAW'(chunk) * GAW'(cfg_len);
    if (k < (LW+1)'(cfg_len))
      ld_addr = cfg_ifm_base + pofs_i + GAW'(pe) * cfg_ifm_stride + GAW'(k);
    else if (k < (LW+1)'(2) * (LW+1)'(cfg_len))
      ld_addr = cfg_wgt_base + pofs_w + GAW'(pe) * cfg_wgt_stride + GAW'(k - (LW+1)'(cfg_len));
    else
      ld_addr = cfg_bias_base + GAW'(pass) * GAW'(NPE) + GAW'(pe);
  end

  always_comb begin
    gb_we = 1'b0; gb_waddr = gb_ext_waddr; gb_wdata = gb_ext_wdata;
    gb_re = 1'b0; gb_raddr = gb_ext_raddr;
    dec_tready = 1'b0;
    arr_start  = 1'b0;
    ifm_we = 1'b0; wgt_we = 1'b0; buf_waddr = ld_idx; pe_sel = ld_pe;
    enc_tvalid = 1'b0;
    enc_tlast  = (tr == out_tr_n - 8'd1) && (tc == out_tc_n - 8'd1);
    unique case (state)
      S_IDLE: begin
        gb_we = gb_ext_we;
        gb_re = gb_ext_re;
      end
      S_DEC: dec_tready = 1'b1;
      S_DEC_WR: begin
        gb_we    = in_map(cfg_in_h, cfg_in_w, tr, tc, el);
        gb_waddr = tile_addr(cfg_in_base, cfg_in_w, tr, tc, el);
        gb_wdata = tile_q[el];
      end
      S_LOAD: begin
        gb_re    = 1'b1;
        gb_raddr = ld_addr;
      end
      S_RUN: arr_start = 1'b1;
      S_DRAIN: begin
        pe_sel   = pe;
        gb_we    = 1'b1;
        gb_waddr = cfg_out_base + GAW'(pass) * GAW'(NPE) + GAW'(pe);
        gb_wdata = act;
      end
      S_COMP: begin
        gb_re    = (el < 3'(TILE_N));
        gb_raddr = tile_addr(cfg_out_base, cfg_out_w, tr, tc, el);
      end
      S_COMP_OUT: enc_tvalid = 1'b1;
      default: ;
    endcase
    if (ld_pend) begin
      pe_sel    = ld_pe;
      buf_waddr = ld_idx;
      ifm_we    = (ld_kind == 2'd0);
      wgt_we    = (ld_kind == 2'd1);
    end
  end

  assign dec_start = (state == S_IDLE) && start && cfg_decomp;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0;
      tr <= '0; tc <= '0; el <= '0; el_d <= '0; rd_pend <= 1'b0; rd_inrange <= 1'b0;
      pass <= '0; chunk <= '0; pe <= '0; k <= '0; ld_pend <= 1'b0; ld_kind <= '0; ld_idx <= '0; ld_pe <= '0;
      tile_q <= '0;
      for (int p = 0; p < NPE; p++) bias_q[p] <= '0;
    end else begin
      done    <= 1'b0;
      ld_pend <= 1'b0;
      // capture of load data issued in the previous cycle
      if (ld_pend && ld_kind == 2'd2)
        bias_q[ld_pe] <= ACC_W'($signed(gb_rdata)) <<< cfg_relu_shift;
      unique case (state)
        S_IDLE: if (start) begin
          tr <= '0; tc <= '0; el <= '0; pass <= '0; chunk <= '0; pe <= '0; k <= '0;
          state <= cfg_decomp ? S_DEC : S_LOAD;
        end
        S_DEC: begin
          if (dec_tvalid) begin
            tile_q <= dec_tile; el <= '0; state <= S_DEC_WR;
          end else if (dec_done) begin
            state <= S_LOAD;
          end
        end
        S_DEC_WR: begin
          el <= el + 3'd1;
          if (el == 3'(TILE_N - 1)) begin
            state <= S_DEC;
            if (tc == in_tc_n - 8'd1) begin tc <= '0; tr <= tr + 8'd1; end
            else tc <= tc + 8'd1;
          end
        end
        S_LOAD: begin
          ld_pend <= 1'b1;
          ld_pe   <= pe;
          if (k < (LW+1)'(cfg_len)) begin
            ld_kind <= 2'd0; ld_idx <= AW'(k);
          end else if (k < (LW+1)'(2) * (LW+1)'(cfg_len)) begin
            ld_kind <= 2'd1; ld_idx <= AW'(k - (LW+1)'(cfg_len));
          end else begin
            ld_kind <= 2'd2; ld_idx <= '0;
          end
          if (k == (LW+1)'(2) * (LW+1)'(cfg_len)) begin
            k <= '0;
            if (pe == SW'(NPE - 1)) begin pe <= '0; state <= S_LOAD_END; end
            else pe <= pe + 1'b1;
          end else k <= k + 1'b1;
        end
        S_LOAD_END: state <= S_RUN;      // last buffer write lands here
        S_RUN:  state <= S_WAIT;
        S_WAIT: if (arr_done) begin
          pe <= '0;
          if (chunk == cfg_chunks - 8'd1) begin chunk <= '0; state <= S_DRAIN; end
          else begin chunk <= chunk + 8'd1; state <= S_LOAD; end
        end
        S_DRAIN: begin
          if (pe == SW'(NPE - 1)) begin
            pe <= '0;
            if (pass == cfg_passes - 8'd1) begin
              tr <= '0; tc <= '0; el <= '0; rd_pend <= 1'b0; state <= S_COMP;
            end else begin
              pass <= pass + 8'd1; state <= S_LOAD;
            end
          end else pe <= pe + 1'b1;
        end
        S_COMP: begin
          // issue reads of elements 0..5, capture one cycle later
          rd_pend    <= (el < 3'(TILE_N));
          rd_inrange <= in_map(cfg_out_h, cfg_out_w, tr, tc, el);
          el_d       <= el;
          if (rd_pend) tile_q[el_d] <= rd_inrange ? gb_rdata : 8'd0;
          if (el == 3'(TILE_N)) state <= S_COMP_OUT;
          else el <= el + 3'd1;
        end
        S_COMP_OUT: if (enc_tready) begin
          el <= '0; rd_pend <= 1'b0;
          if (enc_tlast) state <= S_EOP;
          else begin
            state <= S_COMP;
            if (tc == out_tc_n - 8'd1) begin tc <= '0; tr <= tr + 8'd1; end
            else tc <= tc + 8'd1;
          end
        end
        S_EOP: if (dram_out_valid && dram_out_ready && dram_out_eop) begin
          state <= S_IDLE; done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a layer has at least one pass and one chunk
  assert property (@(posedge clk) disable iff (!rst_n) start && !busy |-> cfg_passes != 0 && cfg_chunks != 0);
  // the PE array is started only when idle
  assert property (@(posedge clk) disable iff (!rst_n) arr_start |-> !arr_busy);
endmodule
