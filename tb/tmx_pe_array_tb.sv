// tmx_pe_array_tb: a 2 x 2 array with 16-entry buffers. Each PE gets its
// own random operands (some outliers, so PEs finish at different times);
// after one broadcast start the testbench waits for `done` and reads every
// PE's PSUM through pe_sel, comparing with dot products computed here, and
// checks that done arrives exactly when the slowest PE finishes.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module tmx_pe_array_tb;
  localparam int NPE = 4, DEPTH = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0]  pe_sel = 0;
  logic        ifm_we = 0, wgt_we = 0, ifm_zero = 0, ifm_outlier = 0, wgt_zero = 0, wgt_outlier = 0;
  logic [3:0]  ifm_waddr = 0, wgt_waddr = 0;
  logic [7:0]  ifm_wdata = 0, wgt_wdata = 0;
  logic        start = 0, psum_init = 1, zero_skip = 0, busy, done;
  logic [4:0]  len = 0;
  logic [3:0]  psum_addr = 0, psum_raddr = 0;
  logic signed [23:0] psum_in [NPE];
  logic signed [23:0] psum_rdata;
  logic [31:0] mult_cycles, skip_count;
  tmx_pe_array #(.ROWS(2), .COLS(2), .BUF_DEPTH(DEPTH)) dut (.*);

  function automatic bit outl(input int v); return v > 7 || v < -8; endfunction
  int iv [NPE][DEPTH], wv [NPE][DEPTH];

  initial begin
    longint expv [NPE];
    int cyc [NPE];
    int maxc, c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      maxc = 0;
      for (int p = 0; p < NPE; p++) begin
        psum_in[p] = 24'(p * 100 - 150);
        expv[p] = p * 100 - 150;
        cyc[p] = 1;
        for (int i = 0; i < DEPTH; i++) begin
          iv[p][i] = ($urandom_range(0, 9) < 2) ? int'($urandom_range(0, 255)) - 128 : int'($urandom_range(0, 15)) - 8;
          wv[p][i] = ($urandom_range(0, 9) < 2 + p) ? int'($urandom_range(0, 255)) - 128 : int'($urandom_range(0, 15)) - 8;
          expv[p] += iv[p][i] * wv[p][i];
          cyc[p] += (outl(iv[p][i]) ? 2 : 1) * (outl(wv[p][i]) ? 2 : 1);
          @(negedge clk);
          pe_sel = 2'(p);
          ifm_we = 1; ifm_waddr = 4'(i); ifm_wdata = 8'(iv[p][i]); ifm_zero = (iv[p][i] == 0); ifm_outlier = outl(iv[p][i]);
          wgt_we = 1; wgt_waddr = 4'(i); wgt_wdata = 8'(wv[p][i]); wgt_zero = (wv[p][i] == 0); wgt_outlier = outl(wv[p][i]);
        end
        if (cyc[p] > maxc) maxc = cyc[p];
      end
      @(negedge clk); ifm_we = 0; wgt_we = 0;
      start = 1; len = 5'(DEPTH);
      @(negedge clk); start = 0; c = 1;
      while (!done) begin @(negedge clk); c++; end
      checks++;
      // done is registered one cycle after the slowest PE's done
      if (c != maxc + 1) begin failures++; $display("FAIL done after %0d cycles, slowest PE %0d", c, maxc); end
      for (int p = 0; p < NPE; p++) begin
        pe_sel = 2'(p); #1;
        checks++;
        if (psum_rdata !== 24'(expv[p])) begin failures++; $display("FAIL pe %0d psum=%0d exp=%0d", p, psum_rdata, expv[p]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
