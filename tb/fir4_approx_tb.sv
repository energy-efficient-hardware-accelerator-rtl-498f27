// fir4_approx_tb: runs an exact instance (AP = 0) and the default
// approximate instance (AP = 11 / 16 / 14) on the same random unsigned input
// sequence. The exact output must equal 105 x[n] + 831 x[n-1] +
// 621 x[n-2] + 815 x[n-3]; the approximate output must equal a model
// built here from the same adder graph with the reference approximate
// adder. Also reports the minimum accuracy (1 - |err| / |ref|).
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module fir4_approx_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, v0, v1;
  logic [14:0] x = 0;
  logic signed [27:0] y0, y1;
  fir4_approx #(.AP1(0), .AP2(0), .AP3(0)) u_exact (.clk, .rst_n, .in_valid, .x, .out_valid(v0), .y(y0));
  fir4_approx u_apx (.clk, .rst_n, .in_valid, .x, .out_valid(v1), .y(y1));

  localparam longint M = 64'hFFFFFFF;
  function automatic longint unsigned ad(input longint unsigned p, input longint unsigned q, input bit s, input int ap);
    return ref_approx_addsub(p & M, q & M, s, 28, ap);
  endfunction
  function automatic longint sx(input longint unsigned v); return longint'(v << 36) >>> 36; endfunction

  initial begin
    longint xs [$];
    longint unsigned p105[$], p831[$], p621[$], p815[$];
    real acc_min = 100.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      longint xi, e, ea;
      longint unsigned xe, x15, x129, x105, x831, x621, x815;
      xi = (n < 4) ? 0 : longint'($urandom_range(0, 32767));
      xs.push_front(xi);
      xe   = longint'(xi) & M;
      x15  = ad(xe << 4, xe, 1, 11);  x129 = ad(xe << 7, xe, 0, 11);
      x105 = ad(x15 << 3, x15, 1, 16); x831 = ad(x15 << 6, x129, 1, 16);
      x621 = ad(x831, x105 << 1, 1, 14); x815 = ad(x831, xe << 4, 1, 14);
      p105.push_front(x105); p831.push_front(x831); p621.push_front(x621); p815.push_front(x815);
      @(negedge clk); in_valid = 1; x = 15'(xi);
      @(negedge clk); in_valid = 0;
      if (n >= 3) begin
        e  = 105 * xs[0] + 831 * xs[1] + 621 * xs[2] + 815 * xs[3];
        ea = sx((p105[0] + p831[1] + p621[2] + p815[3]) & M);
        checks++;
        if (y0 !== 28'(e)) begin failures++; $display("FAIL exact n=%0d got %0d exp %0d", n, y0, e); end
        checks++;
        if (y1 !== 28'(ea)) begin failures++; $display("FAIL approx n=%0d got %0d exp %0d", n, y1, ea); end
        if (e != 0) begin
          real acc;
          acc = 100.0 * (1.0 - ((ea > e) ? real'(ea - e) : real'(e - ea)) / ((e < 0) ? real'(-e) : real'(e)));
          if (acc < acc_min) acc_min = acc;
        end
      end
      checks++;
      if (!v0 || !v1) begin failures++; $display("FAIL out_valid missing"); end
    end
    $display("minimum accuracy of the approximate filter: %0.2f %%", acc_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
