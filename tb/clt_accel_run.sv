// clt_accel_run: one test sequence for a clt_accel instance with a given
// partial-sum extension (IP_EXT integer bits, FP_EXT fraction bits), used
// by clt_accel_tb, which runs several extensions side by side.
// Sequence: four layers split into channel tiles (small values, large
// values that saturate, an untiled layer, many short tiles). A model here
// repeats what the hardware must do: each non-final tile rounds every
// partial sum to 8+EXT bits at scale shift-FP_EXT and the next tile
// restarts from that value; the final tile rounds to 8 bits. After every
// non-final tile it checks the 48 stored bytes ({sign, 7 LSBs}) and the
// number of run-length words of the absolute MSB stream (MSB first per
// lane); after the final tile the 48 outputs. It also reports the error
// against an untiled convolution with unrounded partial sums. Results are
// returned on `checks`, `failures` and the mechanism counts, with
// `finished` set at the end. The stimulus and the checking method are this
// testbench's own; the expected values follow the published store and
// recover scheme and the rounding choices stated in the RTL.
module clt_accel_run #(
  parameter int IP_EXT = 0,
  parameter int FP_EXT = 1
) (
  input  logic clk,
  input  logic rst_n,
  output bit   finished,
  output int   checks,
  output int   failures,
  output int   n_exceed,
  output int   n_multiword,
  output longint err_total
);
  import tb_ref_pkg::*;
  localparam int NPE = 6, NMAC = 8, NL = 48, TCM = 64, EXT = IP_EXT + FP_EXT;
  int n_recover = 0;

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
  clt_accel #(.IP_EXT(IP_EXT), .FP_EXT(FP_EXT)) dut (.*);

  int ifm [TCM][NPE];
  int wgt [TCM][NL];

  function automatic int rle_words(input bit bits[$]);
    int n = 0;
    for (int i = 0; i < bits.size(); i++) if (i == 0 || bits[i] != bits[i-1]) n++;
    return n;
  endfunction
  function automatic longint round_only(input longint v, input int s);
    return (s == 0) ? v : ((v + (longint'(1) << (s - 1))) >>> s);
  endfunction
  function automatic longint absl(input longint v); return v < 0 ? -v : v; endfunction

  task automatic layer(input int ntiles, input int tcs, input int sh, input int wmax);
    longint acc [NL], exact [NL];
    for (int l = 0; l < NL; l++) begin
      @(negedge clk);
      bias_we = 1; bias_waddr = 6'(l);
      bias_wdata = 24'(int'($urandom_range(0, 4000)) - 2000);
      acc[l] = longint'($signed(bias_wdata)); exact[l] = acc[l];
    end
    @(negedge clk); bias_we = 0;
    for (int t = 0; t < ntiles; t++) begin
      bit is_last;
      bit bits[$];
      is_last = (t == ntiles - 1);
      for (int c = 0; c < tcs; c++) begin
        @(negedge clk);
        ifm_we = 1; wgt_we = 1; ifm_waddr = 6'(c); wgt_waddr = 6'(c);
        for (int p = 0; p < NPE; p++) begin
          ifm[c][p] = int'($urandom_range(0, 255)) - 128;
          ifm_wdata[p] = 8'(ifm[c][p]);
        end
        for (int l = 0; l < NL; l++) begin
          wgt[c][l] = int'($urandom_range(0, 2 * wmax)) - wmax;
          wgt_wdata[l] = 8'(wgt[c][l]);
        end
      end
      @(negedge clk); ifm_we = 0; wgt_we = 0;
      for (int l = 0; l < NL; l++)
        for (int c = 0; c < tcs; c++) begin
          longint pr;
          pr = longint'(ifm[c][l / NMAC]) * longint'(wgt[c][l]);
          acc[l] += pr; exact[l] += pr;
        end
      @(negedge clk);
      start = 1; first = (t == 0); last = is_last; tc = 7'(tcs); shift = 5'(sh);
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        longint q, e;
        out_raddr = 6'(l); #1;
        if (!is_last) begin
          logic [15:0] qb;
          q  = ref_round_sat(acc[l], sh - FP_EXT, 8 + EXT);
          qb = 16'(q);
          if (q != round_only(acc[l], sh - FP_EXT)) n_exceed++;
          for (int b = 8 + EXT - 2; b >= 7; b--) bits.push_back(qb[b] ^ qb[8 + EXT - 1]);
          checks++;
          if (out_rdata !== {qb[8 + EXT - 1], qb[6:0]}) begin
            failures++; $display("FAIL ext %0d.%0d tile %0d lane %0d stored %h", IP_EXT, FP_EXT, t, l, out_rdata);
          end
          acc[l] = q <<< (sh - FP_EXT);
        end else begin
          e = ref_round_sat(acc[l], sh, 8);
          checks++;
          if (out_rdata !== 8'(e)) begin
            failures++; $display("FAIL ext %0d.%0d final lane %0d got %0d exp %0d", IP_EXT, FP_EXT, l, $signed(out_rdata), e);
          end
          err_total += absl(e - ref_round_sat(exact[l], sh, 8));
        end
      end
      if (!is_last) begin
        checks++;
        if (rle_words(bits) > 1) n_multiword++;
        if (msb_words != 16'(rle_words(bits))) begin
          failures++; $display("FAIL ext %0d.%0d tile %0d msb words %0d exp %0d", IP_EXT, FP_EXT, t, msb_words, rle_words(bits));
        end
        n_recover += NL;
      end
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0; n_exceed = 0; n_multiword = 0; err_total = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    layer(4, 16, 10, 20);   // small values: MSBs almost all zero
    layer(3, 64, 8, 127);   // large values: saturation (exceeding error)
    layer(1, 8, 6, 30);     // channel loop not tiled
    layer(8, 5, 9, 60);     // many short tiles
    checks++;
    if (recover_count != 32'(n_recover)) begin
      failures++; $display("FAIL ext %0d.%0d recover count %0d exp %0d", IP_EXT, FP_EXT, recover_count, n_recover);
    end
    checks++;
    if (exceed_count == 0) begin failures++; $display("FAIL ext %0d.%0d no exceeding error counted", IP_EXT, FP_EXT); end
    finished = 1;
  end
endmodule
