// clt_accel_tb: runs the channel-loop-tiling-aware accelerator with three
// partial-sum extensions side by side: the default one fraction bit
// (IP_EXT = 0, FP_EXT = 1), two fraction bits, and one integer plus one
// fraction bit. Each instance gets the same kind of layers (see
// clt_accel_run) and is checked tile by tile against a model of the store
// and recover scheme. The total error of the final outputs against an
// untiled convolution is printed per extension. The extension options
// follow the published method; the choice of these three is this
// testbench's.
module clt_accel_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bit f [3];
  int c [3], fl [3], ex [3], mw [3];
  longint er [3];
  clt_accel_run #(.IP_EXT(0), .FP_EXT(1)) r0 (.clk, .rst_n, .finished(f[0]), .checks(c[0]), .failures(fl[0]),
                                             .n_exceed(ex[0]), .n_multiword(mw[0]), .err_total(er[0]));
  clt_accel_run #(.IP_EXT(0), .FP_EXT(2)) r1 (.clk, .rst_n, .finished(f[1]), .checks(c[1]), .failures(fl[1]),
                                             .n_exceed(ex[1]), .n_multiword(mw[1]), .err_total(er[1]));
  clt_accel_run #(.IP_EXT(1), .FP_EXT(1)) r2 (.clk, .rst_n, .finished(f[2]), .checks(c[2]), .failures(fl[2]),
                                             .n_exceed(ex[2]), .n_multiword(mw[2]), .err_total(er[2]));
  int checks = 0, failures = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (f[0] && f[1] && f[2]);
    for (int i = 0; i < 3; i++) begin
      checks += c[i]; failures += fl[i];
      $display("extension %0d: exceeding errors %0d, tiles with several MSB words %0d, total |error| vs untiled %0d",
               i, ex[i], mw[i], er[i]);
      checks++;
      if (ex[i] == 0 || mw[i] == 0) begin failures++; $display("FAIL extension %0d: mechanism not exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
