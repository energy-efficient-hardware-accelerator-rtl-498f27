// clt_pe_tb: random IFM / weight streams into the eight MACs of one PE,
// with loads of random initial values between runs; every accumulator is
// compared with init + sum(ifm * wgt[m]) computed here.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module clt_pe_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [7:0]  ifm = 0;
  logic signed [7:0]  wgt [8];
  logic en = 0, load = 0;
  logic signed [23:0] init [8];
  logic signed [23:0] acc [8];
  clt_pe #(.NMAC(8)) dut (.*);
  initial begin
    longint expv [8];
    for (int m = 0; m < 8; m++) begin wgt[m] = 0; init[m] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      load = 1;
      for (int m = 0; m < 8; m++) begin init[m] = 24'(int'($urandom_range(0, 200000)) - 100000); expv[m] = init[m]; end
      @(negedge clk); load = 0;
      for (int c = 0; c < 64; c++) begin
        ifm = 8'($urandom); en = ($urandom_range(0, 4) != 0);
        for (int m = 0; m < 8; m++) begin
          wgt[m] = 8'($urandom);
          if (en) expv[m] += longint'(ifm) * longint'(wgt[m]);
        end
        @(negedge clk);
      end
      en = 0;
      for (int m = 0; m < 8; m++) begin
        checks++;
        if (acc[m] !== 24'(expv[m])) begin failures++; $display("FAIL run %0d mac %0d got %0d exp %0d", r, m, acc[m], expv[m]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
