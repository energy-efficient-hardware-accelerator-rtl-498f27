// rle_encoder_tb: checks the worked example (six 0s, five 1s, five 0s ->
// {0,6} {1,5} {0,5}), then random bit streams of sparse and dense kind
// with a small LEN_W = 4 instance (runs cut at 7) and the default 16-bit
// one, against run-length words computed here.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module rle_encoder_tb;
  int checks = 0, failures = 0, n_cut = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bit_valid = 0, bit_in = 0, flush = 0;
  logic wv16, wv4;
  logic [15:0] w16;
  logic [3:0] w4;
  rle_encoder #(.LEN_W(16)) u16 (.clk, .rst_n, .bit_valid, .bit_in, .flush, .word_valid(wv16), .word(w16));
  rle_encoder #(.LEN_W(4))  u4  (.clk, .rst_n, .bit_valid, .bit_in, .flush, .word_valid(wv4),  .word(w4));
  int got16[$], got4[$];
  always @(posedge clk) begin
    if (wv16) got16.push_back(int'(w16));
    if (wv4)  got4.push_back(int'(w4));
  end

  function automatic void words(input bit bits[$], input int lw, ref int q[$]);
    int maxl = (1 << (lw - 1)) - 1;
    int i = 0;
    q.delete();
    while (i < bits.size()) begin
      int n = 1;
      while (i + n < bits.size() && bits[i + n] == bits[i] && n < maxl) n++;
      q.push_back((int'(bits[i]) << (lw - 1)) | n);
      i += n;
    end
  endfunction

  task automatic stream(input bit bits[$]);
    int e16[$], e4[$];
    got16.delete(); got4.delete();
    words(bits, 16, e16); words(bits, 4, e4);
    foreach (bits[k]) begin
      @(negedge clk); bit_valid = 1; bit_in = bits[k];
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); bit_valid = 0; end
    end
    @(negedge clk); bit_valid = 0; flush = 1;
    @(negedge clk); flush = 0;
    @(negedge clk);
    checks++;
    if (got16 != e16) begin failures++; $display("FAIL 16-bit words: %0d vs %0d", got16.size(), e16.size()); end
    checks++;
    if (got4 != e4) begin failures++; $display("FAIL 4-bit words: %0d vs %0d", got4.size(), e4.size()); end
    foreach (e4[k]) if ((e4[k] & 7) == 7) n_cut++;
  endtask

  initial begin
    bit ex[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    ex = '{0,0,0,0,0,0,1,1,1,1,1,0,0,0,0,0};
    stream(ex);
    checks++;
    if (got16.size() != 3 || got16[0] != 6 || got16[1] != 16'h8005 || got16[2] != 5) begin
      failures++; $display("FAIL worked example");
    end
    for (int s = 0; s < 40; s++) begin
      bit b[$];
      int n;
      n = int'($urandom_range(1, 300));
      b.delete();
      for (int k = 0; k < n; k++) b.push_back((s % 2) ? ($urandom_range(0, 1) == 1) : ($urandom_range(0, 49) == 0));
      stream(b);
    end
    checks++;
    if (n_cut == 0) begin failures++; $display("FAIL no full-length run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
