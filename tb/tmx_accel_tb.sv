// tmx_accel_tb: layer runs on a small time-multiplexing accelerator
// (1x3 PEs, 16-entry operand buffers, 1024-byte global buffer).
// Each run: the host writes weights and biases into the global buffer;
// the input map (4x6) arrives GRLC-compressed over the input stream with
// random gaps, or is written by the host; three passes compute 9 outputs
// from dot products of 8 pairs, or of 16 pairs split into two chunks that
// accumulate in the PSUM buffers,
// into a 3x3 map that leaves GRLC-compressed over the output stream under
// random back-pressure. Checked: the output byte stream against the
// encoding of the expected map (round, ReLU, saturate of bias plus dot
// product), the decoded input and the output map read back over the host
// port, and the multiply-cycle and zero-skip counters against the count of
// 1, 2 and 4-step pairs. Operands mix zeros, 4-bit values and outliers.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module tmx_accel_tb;
  import tb_ref_pkg::*;
  localparam int ROWS = 1, COLS = 3, NPE = 3, GB = 1024, GAW = 10, LEN = 8, PASSES = 3;
  localparam int IN_H = 4, IN_W = 6, OUT_H = 3, OUT_W = 3, RS = 4;
  localparam int IN_BASE = 0, WGT_BASE = 100, BIAS_BASE = 400, OUT_BASE = 500;
  int checks = 0, failures = 0;
  longint exp_mult = 0, exp_skip = 0;
  int n_single = 0, n_double = 0, n_zero = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_decomp = 0, cfg_zero_skip = 0;
  logic [GAW-1:0] cfg_in_base = IN_BASE, cfg_ifm_base = IN_BASE, cfg_ifm_stride = 0, cfg_ifm_pass_stride = 0;
  logic [GAW-1:0] cfg_wgt_base = WGT_BASE, cfg_wgt_stride = 0, cfg_wgt_pass_stride = 0;
  logic [GAW-1:0] cfg_bias_base = BIAS_BASE, cfg_out_base = OUT_BASE;
  logic [7:0] cfg_chunks = 1, cfg_in_h = IN_H, cfg_in_w = IN_W, cfg_passes = PASSES, cfg_out_h = OUT_H, cfg_out_w = OUT_W;
  logic [4:0] cfg_len = LEN, cfg_relu_shift = RS;
  logic start = 0, busy, done;
  logic dram_in_valid = 0, dram_in_ready; logic [7:0] dram_in_byte = 0;
  logic dram_out_valid, dram_out_ready = 0, dram_out_eop; logic [7:0] dram_out_byte;
  logic gb_ext_we = 0, gb_ext_re = 0; logic [GAW-1:0] gb_ext_waddr = 0, gb_ext_raddr = 0;
  logic [7:0] gb_ext_wdata = 0, gb_ext_rdata;
  logic [31:0] mult_cycles, skip_count;

  tmx_accel #(.ROWS(ROWS), .COLS(COLS), .BUF_DEPTH(16), .GB_DEPTH(GB)) dut (.*);

  byte unsigned inmap [IN_H * IN_W];
  byte unsigned wgt [PASSES * NPE * LEN * 2];
  byte unsigned bias [PASSES * NPE];
  byte unsigned outmap [OUT_H * OUT_W];
  bytes_q in_stream, out_exp, out_got;

  function automatic byte unsigned rnd_operand();
    int r = $urandom_range(0, 9);
    if (r < 3) return 0;
    if (r < 7) return byte'(int'($urandom_range(0, 15)) - 8);
    return byte'($urandom_range(0, 255));
  endfunction
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

  task automatic run(input bit decomp, input bit zskip, input int chunks);
    int vl = LEN * chunks, istr = (chunks == 1) ? LEN : 4;
    byte unsigned tiles[$][6];
    byte unsigned itiles[$][6];
    int cyc;
    for (int i = 0; i < IN_H * IN_W; i++) inmap[i] = rnd_operand();
    for (int i = 0; i < PASSES * NPE * vl; i++) wgt[i] = rnd_operand();
    for (int i = 0; i < PASSES * NPE; i++) bias[i] = byte'(int'($urandom_range(0, 40)) - 20);
    for (int i = 0; i < PASSES * NPE * vl; i++) host_write(WGT_BASE + i, wgt[i]);
    for (int i = 0; i < PASSES * NPE; i++) host_write(BIAS_BASE + i, bias[i]);
    if (!decomp) for (int i = 0; i < IN_H * IN_W; i++) host_write(IN_BASE + i, inmap[i]);
    // expected outputs and counters
    for (int p = 0; p < PASSES; p++)
      for (int k = 0; k < NPE; k++) begin
        longint acc = longint'($signed(bias[p*NPE+k])) <<< RS;
        longint r;
        for (int i = 0; i < vl; i++) begin
          byte unsigned a = inmap[k*istr+i], w = wgt[(p*NPE+k)*vl+i];
          acc += longint'($signed(a)) * longint'($signed(w));
          if (a == 0 || w == 0) n_zero++;
          if (zskip && (a == 0 || w == 0)) exp_skip++;
          else begin
            exp_mult += (is_out(a) ? 2 : 1) * (is_out(w) ? 2 : 1);
            if (is_out(a) && is_out(w)) n_double++;
            else if (is_out(a) || is_out(w)) n_single++;
          end
        end
        r = ref_round_sat(acc, RS, 8);
        outmap[p*NPE+k] = byte'(r < 0 ? 0 : r);
      end
    tiles.delete();
    for (int tr = 0; tr < (OUT_H + 1) / 2; tr++)
      for (int tc = 0; tc < (OUT_W + 2) / 3; tc++) begin
        byte unsigned t[6];
        for (int e = 0; e < 6; e++) begin
          int r = tr * 2 + e / 3, c = tc * 3 + e % 3;
          t[e] = (r < OUT_H && c < OUT_W) ? outmap[r * OUT_W + c] : 0;
        end
        tiles.push_back(t);
      end
    out_exp = ref_grlc_encode(tiles);
    itiles.delete();
    for (int tr = 0; tr < IN_H / 2; tr++)
      for (int tc = 0; tc < IN_W / 3; tc++) begin
        byte unsigned t[6];
        for (int e = 0; e < 6; e++) t[e] = inmap[(tr * 2 + e / 3) * IN_W + tc * 3 + e % 3];
        itiles.push_back(t);
      end
    in_stream = ref_grlc_encode(itiles);
    out_got.delete();
    // start
    @(negedge clk);
    cfg_decomp = decomp; cfg_zero_skip = zskip; cfg_chunks = 8'(chunks);
    cfg_ifm_stride = GAW'(istr); cfg_wgt_stride = GAW'(vl); cfg_wgt_pass_stride = GAW'(NPE * vl);
    start = 1;
    @(negedge clk); start = 0; cyc = 1;
    fork
      begin : feed
        while (decomp && in_stream.size() > 0) begin
          dram_in_valid = ($urandom_range(0, 3) != 0);
          dram_in_byte  = in_stream[0];
          @(posedge clk);
          if (dram_in_valid && dram_in_ready) void'(in_stream.pop_front());
          @(negedge clk);
        end
        dram_in_valid = 0;
      end
      begin : drain
        bit fin = 0;
        while (!fin) begin
          dram_out_ready = ($urandom_range(0, 2) != 0);
          @(posedge clk);
          if (dram_out_valid && dram_out_ready) begin
            out_got.push_back(dram_out_byte);
            if (dram_out_eop) fin = 1;
          end
          @(negedge clk);
        end
        dram_out_ready = 0;
      end
      begin : count
        while (!done) begin @(negedge clk); cyc++; end
      end
    join
    $display("run decomp=%0d zero_skip=%0d chunks=%0d: %0d cycles, %0d output bytes", decomp, zskip, chunks, cyc, out_got.size());
    checks++;
    if (out_got.size() != out_exp.size()) begin
      failures++; $display("FAIL output stream length %0d exp %0d", out_got.size(), out_exp.size());
    end else
      foreach (out_exp[i]) if (out_got[i] != out_exp[i]) begin
        failures++; $display("FAIL output byte %0d: %h exp %h", i, out_got[i], out_exp[i]); break;
      end
    for (int i = 0; i < IN_H * IN_W; i++) begin
      byte unsigned d;
      host_read(IN_BASE + i, d);
      checks++;
      if (d != inmap[i]) begin failures++; $display("FAIL input map %0d: %h exp %h", i, d, inmap[i]); end
    end
    for (int i = 0; i < OUT_H * OUT_W; i++) begin
      byte unsigned d;
      host_read(OUT_BASE + i, d);
      checks++;
      if (d != outmap[i]) begin failures++; $display("FAIL output map %0d: %0d exp %0d", i, d, outmap[i]); end
    end
    checks++;
    if (mult_cycles != 32'(exp_mult) || skip_count != 32'(exp_skip)) begin
      failures++; $display("FAIL counters mult %0d/%0d skip %0d/%0d", mult_cycles, exp_mult, skip_count, exp_skip);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) run(r % 3 != 2, r % 2 == 0, (r % 4 < 2) ? 1 : 2);
    $display("pairs: single outlier %0d, double outlier %0d, with zero %0d", n_single, n_double, n_zero);
    checks++;
    if (n_single == 0 || n_double == 0 || exp_skip == 0) begin failures++; $display("FAIL mechanism not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
