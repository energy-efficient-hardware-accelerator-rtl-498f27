// approx_addsub_tb: checks the approximate adder/subtractor.
//  - the worked example N = 8, AP = 4: 0110_1111 + 0001_1111 = 0111_1111
//    (127 instead of 142, an error of 2^4 - 1);
//  - AP = 0 is an exact adder/subtractor;
//  - N = 28, AP = 11: random add/sub against the bit-level reference
//    model, and for additions an error within 0 .. 2^AP - 1 below exact.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module approx_addsub_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a8, b8, s8, e8;
  logic sub8 = 0;
  logic [27:0] a, b, s0, s11;
  logic sub;
  approx_addsub #(.N(8),  .AP(4))  u8  (.a(a8), .b(b8), .sub(sub8), .sum(s8));
  approx_addsub #(.N(8),  .AP(0))  u8e (.a(a8), .b(b8), .sub(sub8), .sum(e8));
  approx_addsub #(.N(28), .AP(0))  u0  (.a, .b, .sub, .sum(s0));
  approx_addsub #(.N(28), .AP(11)) u11 (.a, .b, .sub, .sum(s11));
  initial begin
    a8 = 8'b0110_1111; b8 = 8'b0001_1111; #1;
    checks++; if (s8 !== 8'd127) begin failures++; $display("FAIL example got %0d", s8); end
    checks++; if (e8 !== 8'd142) begin failures++; $display("FAIL exact example got %0d", e8); end
    for (int n = 0; n < 5000; n++) begin
      longint unsigned ex, r;
      a = 28'($urandom); b = 28'($urandom); sub = $urandom_range(0, 1);
      #1;
      ex = sub ? (longint'(a) - longint'(b)) & 28'hFFFFFFF : (longint'(a) + longint'(b)) & 28'hFFFFFFF;
      checks++;
      if (s0 !== 28'(ex)) begin failures++; $display("FAIL exact %0h %0h sub=%b got %0h", a, b, sub, s0); end
      r = ref_approx_addsub(a, b, sub, 28, 11);
      checks++;
      if (s11 !== 28'(r)) begin failures++; $display("FAIL approx %0h %0h sub=%b got %0h exp %0h", a, b, sub, s11, r); end
      if (!sub) begin
        longint unsigned d;
        d = (ex - longint'(s11)) & 28'hFFFFFFF;
        checks++;
        if (d > 2047) begin failures++; $display("FAIL error %0d above 2^AP-1", d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
