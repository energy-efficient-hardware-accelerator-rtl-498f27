// psum_quantizer_tb: random accumulator values and shifts, compared with
// round-half-up and saturation to 9 bits; checks the exceeding-error flag.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module psum_quantizer_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, n_exc = 0;
  logic signed [23:0] acc;
  logic [4:0] shift;
  logic signed [8:0] q;
  logic exceed;
  psum_quantizer #(.ACC_W(24), .QW(9)) dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint v, e, r;
      v = (n % 2) ? longint'($signed(24'($urandom))) : longint'(int'($urandom_range(0, 8000)) - 4000);
      acc = 24'(v); shift = 5'(n % 10);
      e = ref_round_sat(v, n % 10, 9);
      r = (n % 10 == 0) ? v : ((v + (longint'(1) << (n % 10 - 1))) >>> (n % 10));
      #1;
      checks++;
      if (q !== 9'(e) || exceed !== (r != e)) begin
        failures++; $display("FAIL acc=%0d shift=%0d got %0d/%b exp %0d", v, shift, q, exceed, e);
      end
      if (exceed) n_exc++;
    end
    checks++;
    if (n_exc == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
