// tmx_indicator_tb: exhaustive check of the zero and outlier indicators
// for all 256 8-bit values against the 4-bit signed range -8 .. 7.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module tmx_indicator_tb;
  int checks = 0, failures = 0;
  logic signed [7:0] value;
  logic zero, outlier;
  tmx_indicator #(.DATA_W(8), .NB(4)) dut (.value, .zero, .outlier);
  initial begin
    for (int v = -128; v < 128; v++) begin
      value = 8'(v);
      #1;
      checks++;
      if (zero !== (v == 0) || outlier !== (v > 7 || v < -8)) begin
        failures++;
        $display("FAIL v=%0d zero=%b outlier=%b", v, zero, outlier);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
