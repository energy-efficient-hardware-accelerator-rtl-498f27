// psum_recover_tb: for every 9-bit extended psum (EXT = 1) the stored byte
// and absolute MSB, formed here as {sign, 7 LSBs} and bit 7 XOR sign, must
// be rebuilt to the original value shifted left by `shift`.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module psum_recover_tb;
  int checks = 0, failures = 0;
  logic [7:0] stored;
  logic [0:0] msbs;
  logic [4:0] shift;
  logic signed [23:0] acc;
  psum_recover #(.BW_O(8), .EXT(1), .ACC_W(24)) dut (.*);
  initial begin
    for (int v = -256; v < 256; v++) begin
      logic [8:0] b;
      b = 9'(v);
      stored = {b[8], b[6:0]}; msbs = b[7] ^ b[8];
      for (int s = 0; s < 12; s += 5) begin
        shift = 5'(s); #1;
        checks++;
        if (acc !== 24'(longint'(v) <<< s)) begin failures++; $display("FAIL v=%0d s=%0d got %0d", v, s, acc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
