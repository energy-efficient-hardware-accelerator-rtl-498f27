// cnn_accel_top_tb: end-to-end run of the top at its default parameters
// (no parameter overrides): 3x5 PEs with 256-entry buffers and a 16K-byte
// global buffer; 6x8 MACs for the tiling-aware design; the 4-tap
// approximate FIR. The three designs run at the same time.
//  - Time-multiplexing accelerator: a 16x12 input map, mostly zero rows,
//    arrives GRLC-compressed with random gaps; four passes of 15 PEs with
//    128-long dot products, each run as two 64-long chunks, fill a 12x5
//    output map, which leaves compressed
//    under random back-pressure. Two layers, with and without zero skipping.
//    Checked: output stream, decoded input and output map over the host
//    port, multiply-cycle and skip counters.
//  - Tiling-aware accelerator: a layer of 5 channel tiles of 40 channels,
//    with stored bytes, MSB run-length word counts and final outputs
//    checked against a model of store / recover with one extension bit.
//  - FIR: 3000 samples against a model of the approximate adder graph.
// Mechanisms counted, each of which must occur: single- and double-outlier
// multiplications, zero skips, decoded zero tiles, a long (4-tile) zero run,
// out-of-map padding, end-of-packet, psum recovery, MSB run-length words
// above one, exceeding errors, and approximate FIR outputs differing from
// exact ones.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module cnn_accel_top_tb;
  import tb_ref_pkg::*;
  localparam int NPE = 15, LEN = 64, CH = 2, VL = LEN * CH, PASSES = 4, RS = 8;
  localparam int IN_H = 16, IN_W = 12, OUT_H = 12, OUT_W = 5;
  localparam int IN_BASE = 0, WGT_BASE = 1024, BIAS_BASE = 12000, OUT_BASE = 13000;
  localparam int CNPE = 6, CNL = 48;
  int checks = 0, failures = 0;
  // mechanism counters
  int m_single = 0, m_double = 0, m_zero_tiles = 0, m_long_run = 0, m_pad = 0, m_eop = 0;
  int m_recover = 0, m_rle = 0, m_exceed = 0, m_fir_apx = 0;
  longint exp_mult = 0, exp_skip = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // time-multiplexing accelerator
  logic tmx_cfg_decomp = 1, tmx_cfg_zero_skip = 0;
  logic [13:0] tmx_cfg_in_base = IN_BASE, tmx_cfg_ifm_base = IN_BASE, tmx_cfg_ifm_stride = 4, tmx_cfg_ifm_pass_stride = 0;
  logic [13:0] tmx_cfg_wgt_base = WGT_BASE, tmx_cfg_wgt_stride = VL, tmx_cfg_wgt_pass_stride = NPE * VL;
  logic [13:0] tmx_cfg_bias_base = BIAS_BASE, tmx_cfg_out_base = OUT_BASE;
  logic [7:0]  tmx_cfg_chunks = CH, tmx_cfg_in_h = IN_H, tmx_cfg_in_w = IN_W, tmx_cfg_passes = PASSES, tmx_cfg_out_h = OUT_H, tmx_cfg_out_w = OUT_W;
  logic [8:0]  tmx_cfg_len = LEN;
  logic [4:0]  tmx_cfg_relu_shift = RS;
  logic tmx_start = 0, tmx_busy, tmx_done;
  logic tmx_dram_in_valid = 0, tmx_dram_in_ready; logic [7:0] tmx_dram_in_byte = 0;
  logic tmx_dram_out_valid, tmx_dram_out_ready = 0, tmx_dram_out_eop; logic [7:0] tmx_dram_out_byte;
  logic tmx_gb_we = 0, tmx_gb_re = 0; logic [13:0] tmx_gb_waddr = 0, tmx_gb_raddr = 0;
  logic [7:0] tmx_gb_wdata = 0, tmx_gb_rdata;
  logic [31:0] tmx_mult_cycles, tmx_skip_count;
  // tiling-aware accelerator
  logic clt_ifm_we = 0, clt_wgt_we = 0, clt_bias_we = 0;
  logic [5:0] clt_ifm_waddr = 0, clt_wgt_waddr = 0, clt_bias_waddr = 0, clt_out_raddr = 0;
  logic [5:0][7:0] clt_ifm_wdata = '0;
  logic [47:0][7:0] clt_wgt_wdata = '0;
  logic [23:0] clt_bias_wdata = 0;
  logic clt_start = 0, clt_first = 0, clt_last = 0, clt_busy, clt_done;
  logic [6:0] clt_tc = 0;
  logic [4:0] clt_shift = 0;
  logic [7:0] clt_out_rdata;
  logic [15:0] clt_msb_words;
  logic [31:0] clt_exceed_count, clt_recover_count;
  // FIR
  logic fir_in_valid = 0, fir_out_valid;
  logic [14:0] fir_x = 0;
  logic [27:0] fir_y;

  cnn_accel_top dut (.*);

  // ======================= time-multiplexing accelerator =======================
  byte unsigned inmap [IN_H * IN_W];
  byte unsigned wgt [PASSES * NPE * VL];
  byte unsigned bias [PASSES * NPE];
  byte unsigned outmap [OUT_H * OUT_W];

  function automatic byte unsigned rnd_operand();
    int r = $urandom_range(0, 9);
    if (r < 3) return 0;
    if (r < 7) return byte'(int'($urandom_range(0, 15)) - 8);
    return byte'($urandom_range(0, 255));
  endfunction
  function automatic bit is_out(byte unsigned v);
    return $signed(v) > 7 || $signed(v) < -8;
  endfunction

  task automatic gb_write(int a, byte unsigned d);
    @(negedge clk); tmx_gb_we = 1; tmx_gb_waddr = 14'(a); tmx_gb_wdata = d;
    @(negedge clk); tmx_gb_we = 0;
  endtask
  task automatic gb_read(int a, output byte unsigned d);
    @(negedge clk); tmx_gb_re = 1; tmx_gb_raddr = 14'(a);
    @(negedge clk); tmx_gb_re = 0; d = tmx_gb_rdata;
  endtask

  task automatic tmx_layer(input bit zskip);
    byte unsigned tiles[$][6];
    byte unsigned itiles[$][6];
    bytes_q in_stream, out_exp, out_got;
    int cyc;
    // rows 4.. of the input are zero; passes 2 and 3 have zero weights and
    // negative biases, so their outputs are zero
    for (int i = 0; i < IN_H * IN_W; i++) inmap[i] = (i < 4 * IN_W) ? rnd_operand() : 8'd0;
    for (int i = 0; i < PASSES * NPE * VL; i++) wgt[i] = (i < 2 * NPE * VL) ? rnd_operand() : 8'd0;
    for (int i = 0; i < PASSES * NPE; i++)
      bias[i] = (i < 2 * NPE) ? byte'(int'($urandom_range(0, 40)) - 20) : byte'(-int'($urandom_range(1, 100)));
    for (int i = 0; i < PASSES * NPE * VL; i++) gb_write(WGT_BASE + i, wgt[i]);
    for (int i = 0; i < PASSES * NPE; i++) gb_write(BIAS_BASE + i, bias[i]);
    for (int p = 0; p < PASSES; p++)
      for (int k = 0; k < NPE; k++) begin
        longint acc, r;
        acc = longint'($signed(bias[p*NPE+k])) <<< RS;
        for (int i = 0; i < VL; i++) begin
          byte unsigned a, w;
          a = inmap[k*4+i]; w = wgt[(p*NPE+k)*VL+i];
          acc += longint'($signed(a)) * longint'($signed(w));
          if (zskip && (a == 0 || w == 0)) exp_skip++;
          else begin
            exp_mult += (is_out(a) ? 2 : 1) * (is_out(w) ? 2 : 1);
            if (is_out(a) && is_out(w)) m_double++;
            else if (is_out(a) || is_out(w)) m_single++;
          end
        end
        r = ref_round_sat(acc, RS, 8);
        outmap[p*NPE+k] = byte'(r < 0 ? 0 : r);
      end
    for (int tr = 0; tr < (OUT_H + 1) / 2; tr++)
      for (int tc = 0; tc < (OUT_W + 2) / 3; tc++) begin
        byte unsigned t[6];
        for (int e = 0; e < 6; e++) begin
          int r, c;
          r = tr * 2 + e / 3; c = tc * 3 + e % 3;
          t[e] = (r < OUT_H && c < OUT_W) ? outmap[r * OUT_W + c] : 0;
          if (!(r < OUT_H && c < OUT_W)) m_pad++;
        end
        tiles.push_back(t);
      end
    out_exp = ref_grlc_encode(tiles);
    for (int tr = 0; tr < IN_H / 2; tr++)
      for (int tc = 0; tc < IN_W / 3; tc++) begin
        byte unsigned t[6];
        bit z;
        z = 1;
        for (int e = 0; e < 6; e++) begin
          t[e] = inmap[(tr * 2 + e / 3) * IN_W + tc * 3 + e % 3];
          if (t[e] != 0) z = 0;
        end
        if (z) m_zero_tiles++;
        itiles.push_back(t);
      end
    in_stream = ref_grlc_encode(itiles);
    foreach (in_stream[i]) if (in_stream[i] == 8'hC0) m_long_run++;
    foreach (out_exp[i]) if (out_exp[i] == 8'hC0) m_long_run++;
    @(negedge clk);
    tmx_cfg_zero_skip = zskip; tmx_start = 1;
    @(negedge clk); tmx_start = 0; cyc = 1;
    fork
      begin
        while (in_stream.size() > 0) begin
          tmx_dram_in_valid = ($urandom_range(0, 3) != 0);
          tmx_dram_in_byte  = in_stream[0];
          @(posedge clk);
          if (tmx_dram_in_valid && tmx_dram_in_ready) void'(in_stream.pop_front());
          @(negedge clk);
        end
        tmx_dram_in_valid = 0;
      end
      begin
        bit fin;
        fin = 0;
        while (!fin) begin
          tmx_dram_out_ready = ($urandom_range(0, 2) != 0);
          @(posedge clk);
          if (tmx_dram_out_valid && tmx_dram_out_ready) begin
            out_got.push_back(tmx_dram_out_byte);
            if (tmx_dram_out_eop) begin fin = 1; m_eop++; end
          end
          @(negedge clk);
        end
        tmx_dram_out_ready = 0;
      end
      begin
        while (!tmx_done) begin @(negedge clk); cyc++; end
      end
    join
    $display("tmx layer zero_skip=%0d: %0d cycles, %0d input tiles, %0d output bytes",
             zskip, cyc, itiles.size(), out_got.size());
    checks++;
    if (out_got.size() != out_exp.size()) begin
      failures++; $display("FAIL tmx output length %0d exp %0d", out_got.size(), out_exp.size());
    end else
      foreach (out_exp[i]) if (out_got[i] != out_exp[i]) begin
        failures++; $display("FAIL tmx output byte %0d: %h exp %h", i, out_got[i], out_exp[i]); break;
      end
    for (int i = 0; i < IN_H * IN_W; i++) begin
      byte unsigned d;
      gb_read(IN_BASE + i, d);
      checks++;
      if (d != inmap[i]) begin failures++; $display("FAIL tmx input map %0d", i); end
    end
    for (int i = 0; i < OUT_H * OUT_W; i++) begin
      byte unsigned d;
      gb_read(OUT_BASE + i, d);
      checks++;
      if (d != outmap[i]) begin failures++; $display("FAIL tmx output map %0d: %0d exp %0d", i, d, outmap[i]); end
    end
    checks++;
    if (tmx_mult_cycles != 32'(exp_mult) || tmx_skip_count != 32'(exp_skip)) begin
      failures++; $display("FAIL tmx counters mult %0d/%0d skip %0d/%0d", tmx_mult_cycles, exp_mult, tmx_skip_count, exp_skip);
    end
  endtask

  // ======================= tiling-aware accelerator =======================
  task automatic clt_layer(input int ntiles, input int tcs, input int sh, input int wmax);
    longint acc [CNL];
    int ifm [64][CNPE];
    int w [64][CNL];
    for (int l = 0; l < CNL; l++) begin
      @(negedge clk);
      clt_bias_we = 1; clt_bias_waddr = 6'(l);
      clt_bias_wdata = 24'(int'($urandom_range(0, 4000)) - 2000);
      acc[l] = longint'($signed(clt_bias_wdata));
    end
    @(negedge clk); clt_bias_we = 0;
    for (int t = 0; t < ntiles; t++) begin
      bit is_last;
      bit bits[$];
      int nw;
      is_last = (t == ntiles - 1);
      for (int c = 0; c < tcs; c++) begin
        @(negedge clk);
        clt_ifm_we = 1; clt_wgt_we = 1; clt_ifm_waddr = 6'(c); clt_wgt_waddr = 6'(c);
        for (int p = 0; p < CNPE; p++) begin
          ifm[c][p] = int'($urandom_range(0, 255)) - 128;
          clt_ifm_wdata[p] = 8'(ifm[c][p]);
        end
        for (int l = 0; l < CNL; l++) begin
          w[c][l] = int'($urandom_range(0, 2 * wmax)) - wmax;
          clt_wgt_wdata[l] = 8'(w[c][l]);
        end
      end
      @(negedge clk); clt_ifm_we = 0; clt_wgt_we = 0;
      for (int l = 0; l < CNL; l++)
        for (int c = 0; c < tcs; c++) acc[l] += longint'(ifm[c][l / 8]) * longint'(w[c][l]);
      @(negedge clk);
      clt_start = 1; clt_first = (t == 0); clt_last = is_last; clt_tc = 7'(tcs); clt_shift = 5'(sh);
      @(negedge clk); clt_start = 0;
      while (!clt_done) @(negedge clk);
      for (int l = 0; l < CNL; l++) begin
        longint q;
        clt_out_raddr = 6'(l); #1;
        if (!is_last) begin
          logic [8:0] qb;
          q = ref_round_sat(acc[l], sh - 1, 9);
          qb = 9'(q);
          if (q != ((acc[l] + (longint'(1) << (sh - 2))) >>> (sh - 1))) m_exceed++;
          bits.push_back(qb[7] ^ qb[8]);
          checks++;
          if (clt_out_rdata !== {qb[8], qb[6:0]}) begin failures++; $display("FAIL clt tile %0d lane %0d", t, l); end
          acc[l] = q <<< (sh - 1);
        end else begin
          q = ref_round_sat(acc[l], sh, 8);
          checks++;
          if (clt_out_rdata !== 8'(q)) begin failures++; $display("FAIL clt final lane %0d got %0d exp %0d", l, $signed(clt_out_rdata), q); end
        end
      end
      if (!is_last) begin
        nw = 0;
        foreach (bits[i]) if (i == 0 || bits[i] != bits[i-1]) nw++;
        if (nw > 1) m_rle++;
        checks++;
        if (clt_msb_words != 16'(nw)) begin failures++; $display("FAIL clt msb words %0d exp %0d", clt_msb_words, nw); end
        m_recover += CNL;
      end
    end
  endtask

  // ======================= FIR =======================
  localparam longint M = 64'hFFFFFFF;
  function automatic longint unsigned ad(input longint unsigned p, input longint unsigned q, input bit s, input int ap);
    return ref_approx_addsub(p & M, q & M, s, 28, ap);
  endfunction
  function automatic longint sx(input longint unsigned v); return longint'(v << 36) >>> 36; endfunction

  task automatic fir_run(input int n_samples);
    longint xs [$];
    longint unsigned p105[$], p831[$], p621[$], p815[$];
    for (int n = 0; n < n_samples; n++) begin
      longint xi, e, ea;
      longint unsigned xe, x15, x129, x105, x831, x621, x815;
      xi = (n < 4) ? 0 : longint'($urandom_range(0, 32767));
      xs.push_front(xi);
      xe   = longint'(xi) & M;
      x15  = ad(xe << 4, xe, 1, 11);  x129 = ad(xe << 7, xe, 0, 11);
      x105 = ad(x15 << 3, x15, 1, 16); x831 = ad(x15 << 6, x129, 1, 16);
      x621 = ad(x831, x105 << 1, 1, 14); x815 = ad(x831, xe << 4, 1, 14);
      p105.push_front(x105); p831.push_front(x831); p621.push_front(x621); p815.push_front(x815);
      @(negedge clk); fir_in_valid = 1; fir_x = 15'(xi);
      @(negedge clk); fir_in_valid = 0;
      if (n >= 3) begin
        e  = 105 * xs[0] + 831 * xs[1] + 621 * xs[2] + 815 * xs[3];
        ea = sx((p105[0] + p831[1] + p621[2] + p815[3]) & M);
        if (ea != e) m_fir_apx++;
        checks++;
        if (!fir_out_valid || fir_y !== 28'(ea)) begin failures++; $display("FIR FAIL n=%0d got %0d exp %0d", n, $signed(fir_y), ea); end
      end
      if (xs.size() > 4) begin
        void'(xs.pop_back()); void'(p105.pop_back()); void'(p831.pop_back());
        void'(p621.pop_back()); void'(p815.pop_back());
      end
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin tmx_layer(1); tmx_layer(0); end
      begin clt_layer(5, 40, 10, 60); clt_layer(2, 64, 8, 127); end
      fir_run(3000);
    join
    checks++;
    if (clt_recover_count != 32'(m_recover)) begin failures++; $display("FAIL clt recover count %0d exp %0d", clt_recover_count, m_recover); end
    $display("mechanisms:");
    need("single-outlier multiplications", m_single);
    need("double-outlier multiplications", m_double);
    need("zero-skipped pairs", int'(exp_skip));
    need("decoded all-zero tiles", m_zero_tiles);
    need("long zero runs (4 tiles)", m_long_run);
    need("out-of-map padded elements", m_pad);
    need("end-of-packet", m_eop);
    need("recovered partial sums", int'(clt_recover_count));
    need("tiles with several MSB words", m_rle);
    need("exceeding errors (model)", m_exceed);
    need("exceeding errors (hardware)", int'(clt_exceed_count));
    need("approximate FIR outputs", m_fir_apx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
