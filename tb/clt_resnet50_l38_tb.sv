// clt_resnet50_l38_tb: workload slice of ResNet50 layer 38 (16x16 map,
// C = 1024 input channels, M = 256 output channels; 1x1 convolution) on the
// default channel-loop-tiling-aware accelerator. One lane group, 6 output
// pixels x 8 output channels, is computed over all 1024 channels in 16
// channel tiles of 64. Inputs look like post-ReLU activations (half zero,
// the rest mostly small, 0..127); weights are small signed values. Every
// tile's stored bytes and MSB word count and the final outputs are checked
// against the store / recover model; the error of the tiled result against
// an untiled convolution is printed for the one-fraction-bit extension and
// for plain 8-bit storage (computed here). The layer sizes follow the
// published example; data distributions and the shift are this
// testbench's own.
module clt_resnet50_l38_tb;
  import tb_ref_pkg::*;
  localparam int NPE = 6, NMAC = 8, NL = 48, TC = 64, TILES = 16, SH = 9;
  int checks = 0, failures = 0, words = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ifm_we = 0, wgt_we = 0, bias_we = 0;
  logic [5:0] ifm_waddr = 0, wgt_waddr = 0, bias_waddr = 0, out_raddr = 0;
  logic [NPE-1:0][7:0] ifm_wdata = '0;
  logic [NL-1:0][7:0]  wgt_wdata = '0;
  logic [23:0] bias_wdata = 0;
  logic start = 0, first = 0, last = 0, busy, done;
  logic [6:0] tc = 0;
  logic [4:0] shift = 0;
  logic [7:0] out_rdata;
  logic [15:0] msb_words;
  logic [31:0] exceed_count, recover_count;
  clt_accel dut (.*);

  function automatic int act();
    int r;
    r = $urandom_range(0, 99);
    if (r < 50) return 0;
    if (r < 90) return $urandom_range(1, 24);
    return $urandom_range(25, 127);
  endfunction

  initial begin
    longint acc [NL], exact [NL], plain [NL];
    longint e_ext, e_plain;
    int cyc;
    e_ext = 0; e_plain = 0; cyc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < NL; l++) begin
      @(negedge clk);
      bias_we = 1; bias_waddr = 6'(l); bias_wdata = 24'(int'($urandom_range(0, 2000)) - 1000);
      acc[l] = longint'($signed(bias_wdata)); exact[l] = acc[l]; plain[l] = acc[l];
    end
    @(negedge clk); bias_we = 0;
    for (int t = 0; t < TILES; t++) begin
      int a [TC][NPE];
      int w [TC][NL];
      bit bits[$];
      int nw;
      for (int c = 0; c < TC; c++) begin
        @(negedge clk);
        ifm_we = 1; wgt_we = 1; ifm_waddr = 6'(c); wgt_waddr = 6'(c);
        for (int p = 0; p < NPE; p++) begin a[c][p] = act(); ifm_wdata[p] = 8'(a[c][p]); end
        for (int l = 0; l < NL; l++) begin w[c][l] = int'($urandom_range(0, 24)) - 12; wgt_wdata[l] = 8'(w[c][l]); end
      end
      @(negedge clk); ifm_we = 0; wgt_we = 0;
      for (int l = 0; l < NL; l++)
        for (int c = 0; c < TC; c++) begin
          longint pr;
          pr = longint'(a[c][l / NMAC]) * longint'(w[c][l]);
          acc[l] += pr; exact[l] += pr; plain[l] += pr;
        end
      @(negedge clk);
      start = 1; first = (t == 0); last = (t == TILES - 1); tc = 7'(TC); shift = 5'(SH);
      @(negedge clk); start = 0; cyc++;
      while (!done) begin @(negedge clk); cyc++; end
      for (int l = 0; l < NL; l++) begin
        longint q;
        out_raddr = 6'(l); #1;
        if (t != TILES - 1) begin
          logic [8:0] qb;
          q = ref_round_sat(acc[l], SH - 1, 9);
          qb = 9'(q);
          bits.push_back(qb[7] ^ qb[8]);
          checks++;
          if (out_rdata !== {qb[8], qb[6:0]}) begin failures++; $display("FAIL tile %0d lane %0d", t, l); end
          acc[l] = q <<< (SH - 1);
          plain[l] = ref_round_sat(plain[l], SH, 8) <<< SH;
        end else begin
          longint ex;
          q = ref_round_sat(acc[l], SH, 8);
          ex = ref_round_sat(exact[l], SH, 8);
          checks++;
          if (out_rdata !== 8'(q)) begin failures++; $display("FAIL final lane %0d got %0d exp %0d", l, $signed(out_rdata), q); end
          e_ext   += (q > ex) ? q - ex : ex - q;
          q = ref_round_sat(plain[l], SH, 8);
          e_plain += (q > ex) ? q - ex : ex - q;
        end
      end
      if (t != TILES - 1) begin
        nw = 0;
        foreach (bits[i]) if (i == 0 || bits[i] != bits[i-1]) nw++;
        words += nw;
        checks++;
        if (msb_words != 16'(nw)) begin failures++; $display("FAIL tile %0d msb words %0d exp %0d", t, msb_words, nw); end
      end
    end
    $display("16 channel tiles x 64 channels, 48 outputs: %0d accelerator cycles, %0d MSB words (%0d bits) for %0d stored psums",
             cyc, words, words * 16, 15 * NL);
    $display("total |error| vs untiled: one extension bit %0d, plain 8-bit storage %0d", e_ext, e_plain);
    checks++;
    if (e_ext > e_plain) begin failures++; $display("FAIL extension did not reduce the error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
