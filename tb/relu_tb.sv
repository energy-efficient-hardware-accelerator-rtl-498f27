// relu_tb: random and corner partial sums through the activation module,
// compared with round-half-up, ReLU and saturation to 0 .. 127 here.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module relu_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [23:0] psum;
  logic [4:0] shift;
  logic signed [7:0] fmap;
  relu #(.ACC_W(24), .DATA_W(8)) dut (.psum, .shift, .fmap);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint v, e;
      v = (n < 40) ? longint'(n * 37 - 700) : longint'($signed(24'($urandom)));
      psum = 24'(v); shift = 5'(n % 12);
      e = ref_round_sat(v, n % 12, 9);   // 9-bit signed covers 0..255 before the 127 clip
      if (e < 0) e = 0;
      if (e > 127) e = 127;
      #1;
      checks++;
      if (fmap !== 8'(e)) begin failures++; $display("FAIL psum=%0d shift=%0d got %0d exp %0d", v, shift, fmap, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
