// cnn_accel_top: the three energy-saving designs side by side.
//   tmx_*  time-multiplexing accelerator: narrow multipliers that spend
//          extra cycles only on outlier operands, with ReLU and grid-based
//          run-length compression of feature maps to and from DRAM.
//   clt_*  channel-loop-tiling-aware accelerator: partial sums stored with
//          extension bits whose absolute MSBs are run-length compressed.
//   fir_*  four-tap FIR filter built from approximate adder/subtractors.
// The three share only clock and reset; each brings out its own ports
// (off-chip memory and host connections are ports, as those parts are
// outside the chip). Parameters are the defaults of each design.
module cnn_accel_top (
  input  logic         clk,
  input  logic         rst_n,
  // ---------------- time-multiplexing accelerator ----------------
  input  logic         tmx_cfg_decomp,
  input  logic [13:0]  tmx_cfg_in_base,
  input  logic [7:0]   tmx_cfg_in_h,
  input  logic [7:0]   tmx_cfg_in_w,
  input  logic [13:0]  tmx_cfg_ifm_base,
  input  logic [13:0]  tmx_cfg_ifm_stride,
  input  logic [13:0]  tmx_cfg_ifm_pass_stride,
  input  logic [13:0]  tmx_cfg_wgt_base,
  input  logic [13:0]  tmx_cfg_wgt_stride,
  input  logic [13:0]  tmx_cfg_wgt_pass_stride,
  input  logic [13:0]  tmx_cfg_bias_base,
  input  logic [8:0]   tmx_cfg_len,
  input  logic [7:0]   tmx_cfg_passes,
  input  logic [7:0]   tmx_cfg_chunks,
  input  logic         tmx_cfg_zero_skip,
  input  logic [4:0]   tmx_cfg_relu_shift,
  input  logic [13:0]  tmx_cfg_out_base,
  input  logic [7:0]   tmx_cfg_out_h,
  input  logic [7:0]   tmx_cfg_out_w,
  input  logic         tmx_start,
  output logic         tmx_busy,
  output logic         tmx_done,
  input  logic         tmx_dram_in_valid,
  output logic         tmx_dram_in_ready,
  input  logic [7:0]   tmx_dram_in_byte,
  output logic         tmx_dram_out_valid,
  input  logic         tmx_dram_out_ready,
  output logic [7:0]   tmx_dram_out_byte,
  output logic         tmx_dram_out_eop,
  input  logic         tmx_gb_we,
  input  logic [13:0]  tmx_gb_waddr,
  input  logic [7:0]   tmx_gb_wdata,
  input  logic         tmx_gb_re,
  input  logic [13:0]  tmx_gb_raddr,
  output logic [7:0]   tmx_gb_rdata,
  output logic [31:0]  tmx_mult_cycles,
  output logic [31:0]  tmx_skip_count,
  // ---------------- channel-loop-tiling-aware accelerator ----------------
  input  logic         clt_ifm_we,
  input  logic [5:0]   clt_ifm_waddr,
  input  logic [5:0][7:0]  clt_ifm_wdata,
  input  logic         clt_wgt_we,
  input  logic [5:0]   clt_wgt_waddr,
  input  logic [47:0][7:0] clt_wgt_wdata,
  input  logic         clt_bias_we,
  input  logic [5:0]   clt_bias_waddr,
  input  logic [23:0]  clt_bias_wdata,
  input  logic         clt_start,
  input  logic         clt_first,
  input  logic         clt_last,
  input  logic [6:0]   clt_tc,
  input  logic [4:0]   clt_shift,
  output logic         clt_busy,
  output logic         clt_done,
  input  logic [5:0]   clt_out_raddr,
  output logic [7:0]   clt_out_rdata,
  output logic [15:0]  clt_msb_words,
  output logic [31:0]  clt_exceed_count,
  output logic [31:0]  clt_recover_count,
  // ---------------- approximate FIR filter ----------------
  input  logic         fir_in_valid,
  input  logic [14:0]  fir_x,
  output logic         fir_out_valid,
  output logic [27:0]  fir_y
);
  tmx_accel u_tmx (
    .clk, .rst_n,
    .cfg_decomp(tmx_cfg_decomp), .cfg_in_base(tmx_cfg_in_base), .cfg_in_h(tmx_cfg_in_h),
    .cfg_in_w(tmx_cfg_in_w), .cfg_ifm_base(tmx_cfg_ifm_base), .cfg_ifm_stride(tmx_cfg_ifm_stride),
    .cfg_ifm_pass_stride(tmx_cfg_ifm_pass_stride), .cfg_wgt_base(tmx_cfg_wgt_base),
    .cfg_wgt_stride(tmx_cfg_wgt_stride), .cfg_wgt_pass_stride(tmx_cfg_wgt_pass_stride),
    .cfg_bias_base(tmx_cfg_bias_base), .cfg_len(tmx_cfg_len), .cfg_passes(tmx_cfg_passes), .cfg_chunks(tmx_cfg_chunks),
    .cfg_zero_skip(tmx_cfg_zero_skip), .cfg_relu_shift(tmx_cfg_relu_shift),
    .cfg_out_base(tmx_cfg_out_base), .cfg_out_h(tmx_cfg_out_h), .cfg_out_w(tmx_cfg_out_w),
    .start(tmx_start), .busy(tmx_busy), .done(tmx_done),
    .dram_in_valid(tmx_dram_in_valid), .dram_in_ready(tmx_dram_in_ready), .dram_in_byte(tmx_dram_in_byte),
    .dram_out_valid(tmx_dram_out_valid), .dram_out_ready(tmx_dram_out_ready),
    .dram_out_byte(tmx_dram_out_byte), .dram_out_eop(tmx_dram_out_eop),
    .gb_ext_we(tmx_gb_we), .gb_ext_waddr(tmx_gb_waddr), .gb_ext_wdata(tmx_gb_wdata),
    .gb_ext_re(tmx_gb_re), .gb_ext_raddr(tmx_gb_raddr), .gb_ext_rdata(tmx_gb_rdata),
    .mult_cycles(tmx_mult_cycles), .skip_count(tmx_skip_count)
  );

  clt_accel u_clt (
    .clk, .rst_n,
    .ifm_we(clt_ifm_we), .ifm_waddr(clt_ifm_waddr), .ifm_wdata(clt_ifm_wdata),
    .wgt_we(clt_wgt_we), .wgt_waddr(clt_wgt_waddr), .wgt_wdata(clt_wgt_wdata),
    .bias_we(clt_bias_we), .bias_waddr(clt_bias_waddr), .bias_wdata(clt_bias_wdata),
    .start(clt_start), .first(clt_first), .last(clt_last), .tc(clt_tc), .shift(clt_shift),
    .busy(clt_busy), .done(clt_done), .out_raddr(clt_out_raddr), .out_rdata(clt_out_rdata),
    .msb_words(clt_msb_words), .exceed_count(clt_exceed_count), .recover_count(clt_recover_count)
  );

  fir4_approx u_fir (
    .clk, .rst_n, .in_valid(fir_in_valid), .x(fir_x), .out_valid(fir_out_valid), .y(fir_y)
  );
endmodule
