// msb_split_tb: exhaustive over all 10-bit extended psums (BW_O = 8,
// EXT = 2): the stored byte must be {sign, 7 LSBs}, the MSBs the middle
// bits XOR the sign, and for every value in -128 .. 127 the MSBs are 0.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module msb_split_tb;
  int checks = 0, failures = 0;
  logic [9:0] q;
  logic [7:0] stored;
  logic [1:0] msbs;
  msb_split #(.BW_O(8), .EXT(2)) dut (.*);
  initial begin
    for (int v = -512; v < 512; v++) begin
      logic [9:0] b;
      b = 10'(v); q = b; #1;
      checks++;
      if (stored !== {b[9], b[6:0]} || msbs !== (b[8:7] ^ {2{b[9]}})) begin
        failures++; $display("FAIL v=%0d stored=%h msbs=%b", v, stored, msbs);
      end
      if (v >= -128 && v < 128) begin
        checks++;
        if (msbs !== 2'b00) begin failures++; $display("FAIL small v=%0d msbs=%b", v, msbs); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
