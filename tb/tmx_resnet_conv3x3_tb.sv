// tmx_resnet_conv3x3_tb: workload slice of a ResNet-style 3x3 convolution
// with 64 input channels on the default time-multiplexing accelerator
// (3x5 PEs, 256-entry operand buffers, 16 KB global buffer). The 15 PEs
// compute 15 neighbouring output pixels (3 rows x 5 columns) of 2 output
// channels (2 passes); each output is a 576-pair dot product run as 3
// chunks of 192 that accumulate in the PSUM buffers. The host writes the
// im2col input vectors, weights and biases; the 6x5 output map leaves
// GRLC-compressed. Activations look post-ReLU (about half zero, most of
// the rest 4-bit, a few outliers); weights are mostly 4-bit with about 15%
// outliers. The layer runs without and with zero skipping; checked each
// time: the output stream, the output map read back over the host port and
// the multiply-cycle and skip counters. The multiply cycles are printed
// next to the one-cycle-per-pair cost of an 8-bit multiplier (the
// counters are cumulative, so the expected values are too). The layer
// shape follows the published workloads; data distributions, the slice and
// the shift are this testbench's own.
module tmx_resnet_conv3x3_tb;
  import tb_ref_pkg::*;
  localparam int NPE = 15, GAW = 14, C = 64, VL = 9 * C, CH = 3, LEN = VL / CH, PASSES = 2;
  localparam int OH = 3, OW = 5, IH = OH + 2, IW = OW + 2, RS = 7;
  localparam int OUT_H = 6, OUT_W = 5;
  localparam int IFM_BASE = 0, WGT_BASE = 8640, BIAS_BASE = 9800, OUT_BASE = 9900;
  int checks = 0, failures = 0;
  longint e_mult = 0, e_skip = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_decomp = 0, cfg_zero_skip = 0;
  logic [GAW-1:0] cfg_in_base = 0, cfg_ifm_base = GAW'(IFM_BASE), cfg_ifm_stride = GAW'(VL), cfg_ifm_pass_stride = 0;
  logic [GAW-1:0] cfg_wgt_base = GAW'(WGT_BASE), cfg_wgt_stride = 0, cfg_wgt_pass_stride = GAW'(VL);
  logic [GAW-1:0] cfg_bias_base = GAW'(BIAS_BASE), cfg_out_base = GAW'(OUT_BASE);
  logic [7:0] cfg_chunks = 8'(CH), cfg_in_h = 2, cfg_in_w = 3, cfg_passes = 8'(PASSES), cfg_out_h = 8'(OUT_H), cfg_out_w = 8'(OUT_W);
  logic [8:0] cfg_len = 9'(LEN);
  logic [4:0] cfg_relu_shift = 5'(RS);
  logic start = 0, busy, done;
  logic dram_in_valid = 0, dram_in_ready; logic [7:0] dram_in_byte = 0;
  logic dram_out_valid, dram_out_ready = 0, dram_out_eop; logic [7:0] dram_out_byte;
  logic gb_ext_we = 0, gb_ext_re = 0; logic [GAW-1:0] gb_ext_waddr = 0, gb_ext_raddr = 0;
  logic [7:0] gb_ext_wdata = 0, gb_ext_rdata;
  logic [31:0] mult_cycles, skip_count;

  tmx_accel dut (.*);

  byte unsigned fmap [IH][IW][C];
  byte unsigned vec [NPE][VL];
  byte unsigned wgt [PASSES][VL];
  byte unsigned bias [PASSES];
  byte unsigned outmap [OUT_H * OUT_W];

  function automatic bit is_out(byte unsigned v);
    return $signed(v) > 7 || $signed(v) < -8;
  endfunction
  task automatic host_write(int a, byte unsigned d);
    @(negedge clk); gb_ext_we = 1; gb_ext_waddr = GAW'(a); gb_ext_wdata = d;
    @(negedge clk); gb_ext_we = 0;
  endtask
  task automatic host_read(int a, output byte unsigned d);
    @(negedge clk); gb_ext_re = 1; gb_ext_raddr = GAW'(a);
    @(negedge clk); gb_ext_re = 0; d = gb_ext_rdata;
  endtask

  task automatic run(input bit zskip);
    bytes_q exp_s, got;
    byte unsigned tiles[$][6];
    longint pairs = 0, m0 = e_mult, s0 = e_skip;
    int cyc;
    for (int p = 0; p < PASSES; p++)
      for (int k = 0; k < NPE; k++) begin
        longint acc = longint'($signed(bias[p])) <<< RS;
        longint r;
        for (int i = 0; i < VL; i++) begin
          byte unsigned a = vec[k][i], w = wgt[p][i];
          acc += longint'($signed(a)) * longint'($signed(w));
          pairs++;
          if (zskip && (a == 0 || w == 0)) e_skip++;
          else e_mult += (is_out(a) ? 2 : 1) * (is_out(w) ? 2 : 1);
        end
        r = ref_round_sat(acc, RS, 8);
        outmap[p*NPE+k] = byte'(r < 0 ? 0 : r);
      end
    for (int tr = 0; tr < OUT_H / 2; tr++)
      for (int tc = 0; tc < (OUT_W + 2) / 3; tc++) begin
        byte unsigned t[6];
        for (int e = 0; e < 6; e++) begin
          int r = tr * 2 + e / 3, c = tc * 3 + e % 3;
          t[e] = (c < OUT_W) ? outmap[r * OUT_W + c] : 0;
        end
        tiles.push_back(t);
      end
    exp_s = ref_grlc_encode(tiles);
    @(negedge clk);
    cfg_zero_skip = zskip; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    fork
      begin
        bit fin = 0;
        while (!fin) begin
          dram_out_ready = ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (dram_out_valid && dram_out_ready) begin
            got.push_back(dram_out_byte);
            if (dram_out_eop) fin = 1;
          end
          @(negedge clk);
        end
        dram_out_ready = 0;
      end
      while (!done) begin @(negedge clk); cyc++; end
    join
    $display("zero_skip=%0d: %0d cycles (mostly operand loading), %0d output bytes; multiply cycles %0d, skipped pairs %0d, 8-bit multiplier %0d cycles for %0d pairs",
             zskip, cyc, got.size(), e_mult - m0, e_skip - s0, pairs, pairs);
    checks++;
    if (got != exp_s) begin
      failures++; $display("FAIL output stream (%0d bytes, expected %0d)", got.size(), exp_s.size());
    end
    for (int i = 0; i < OUT_H * OUT_W; i++) begin
      byte unsigned d;
      host_read(OUT_BASE + i, d);
      checks++;
      if (d != outmap[i]) begin failures++; $display("FAIL output %0d: %0d exp %0d", i, d, outmap[i]); end
    end
    checks++;
    if (mult_cycles != 32'(e_mult) || skip_count != 32'(e_skip)) begin
      failures++; $display("FAIL counters mult %0d/%0d skip %0d/%0d", mult_cycles, e_mult, skip_count, e_skip);
    end
  endtask

  initial begin
    int r, nz, no;
    nz = 0; no = 0;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++)
        for (int c = 0; c < C; c++) begin
          r = $urandom_range(0, 99);
          fmap[y][x][c] = (r < 50) ? 0 : (r < 95) ? byte'($urandom_range(1, 7)) : byte'($urandom_range(8, 90));
        end
    for (int k = 0; k < NPE; k++)
      for (int i = 0; i < VL; i++)
        vec[k][i] = fmap[k / OW + i / (3 * C)][k % OW + (i / C) % 3][i % C];
    for (int p = 0; p < PASSES; p++) begin
      bias[p] = byte'(int'($urandom_range(0, 30)) - 10);
      for (int i = 0; i < VL; i++) begin
        r = $urandom_range(0, 99);
        wgt[p][i] = (r < 85) ? byte'(int'($urandom_range(0, 15)) - 8)
                             : byte'((($urandom_range(0, 1) != 0) ? 1 : -1) * int'($urandom_range(8, 60)));
        if (is_out(wgt[p][i])) no++;
      end
    end
    foreach (vec[k, i]) if (vec[k][i] == 0) nz++;
    $display("input vectors: %0d of %0d zero; weights: %0d of %0d outliers", nz, NPE * VL, no, PASSES * VL);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NPE; k++) for (int i = 0; i < VL; i++) host_write(IFM_BASE + k * VL + i, vec[k][i]);
    for (int p = 0; p < PASSES; p++) for (int i = 0; i < VL; i++) host_write(WGT_BASE + p * VL + i, wgt[p][i]);
    for (int p = 0; p < PASSES; p++) for (int k = 0; k < NPE; k++) host_write(BIAS_BASE + p * NPE + k, bias[p]);
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
