// rle_decoder_tb: random {bit, length} words (16-bit format, lengths up
// to 40) are fed with random gaps while the bit side applies random
// back-pressure; the bit stream must be the expansion of the words.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module rle_decoder_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic word_valid = 0, word_ready, bit_valid, bit_ready = 0, bit_out;
  logic [15:0] word = 0;
  rle_decoder #(.LEN_W(16)) dut (.*);
  bit expq[$];
  int nbits = 0;
  always @(negedge clk) bit_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (bit_valid && bit_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL extra bit"); end
    else if (bit_out !== expq.pop_front()) begin failures++; $display("FAIL bit %0d", nbits); end
    nbits++;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      bit b;
      int n;
      b = 1'($urandom_range(0, 1));
      n = int'($urandom_range(1, 40));
      for (int k = 0; k < n; k++) expq.push_back(b);
      @(negedge clk); word_valid = 1; word = {b, 15'(n)};
      @(posedge clk); while (!word_ready) @(posedge clk);
      @(negedge clk); word_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (200) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d bits missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
