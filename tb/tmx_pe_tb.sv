// tmx_pe_tb: loads the PE's IFM and weight buffers with random operands
// (a mix of zeros, small values and outliers, with indicators computed
// here), runs dot products with and without zero skipping, onto a given
// initial psum and onto the PSUM buffer entry, and checks the PSUM buffer
// value and the cycle count: 1 start cycle plus 1 / 2 / 4 cycles per pair
// (1 per pair with a zero operand when skipping). Also counts how often
// each mechanism (outlier pair, double outlier, zero skip) occurred.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module tmx_pe_tb;
  localparam int DEPTH = 256;
  int checks = 0, failures = 0;
  int n_out1 = 0, n_out2 = 0, n_skip = 0;
  longint tot_mult = 0, tot_skip = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ifm_we = 0, wgt_we = 0, ifm_zero, ifm_outlier, wgt_zero, wgt_outlier;
  logic [7:0]  ifm_waddr, wgt_waddr, ifm_wdata, wgt_wdata;
  logic        start = 0, psum_init = 0, zero_skip = 0, busy, done;
  logic [8:0]  len = 0;
  logic [3:0]  psum_addr = 0, psum_raddr = 0;
  logic signed [23:0] psum_in = 0, psum_rdata;
  logic [31:0] mult_cycles, skip_count;

  tmx_pe #(.BUF_DEPTH(DEPTH)) dut (.*);

  int ival [DEPTH], wval [DEPTH];
  function automatic bit outl(input int v); return v > 7 || v < -8; endfunction
  function automatic int rnd_val(input int mode);
    int r = int'($urandom_range(0, 99));
    if (r < 25) return 0;
    if (r < 25 + mode) return int'($urandom_range(0, 255)) - 128;
    return int'($urandom_range(0, 15)) - 8;
  endfunction

  task automatic fill(input int mode);
    for (int i = 0; i < DEPTH; i++) begin
      ival[i] = rnd_val(mode); wval[i] = rnd_val(mode);
      @(negedge clk);
      ifm_we = 1; ifm_waddr = 8'(i); ifm_wdata = 8'(ival[i]); ifm_zero = (ival[i] == 0); ifm_outlier = outl(ival[i]);
      wgt_we = 1; wgt_waddr = 8'(i); wgt_wdata = 8'(wval[i]); wgt_zero = (wval[i] == 0); wgt_outlier = outl(wval[i]);
    end
    @(negedge clk); ifm_we = 0; wgt_we = 0;
  endtask

  task automatic run(input int n, input bit zs, input bit init_sel, input int init, input int addr,
                     input longint base);
    longint expv = init_sel ? init : base;
    int exp_cyc = 1, cyc = 0;
    for (int i = 0; i < n; i++) begin
      expv += ival[i] * wval[i];
      if (zs && (ival[i] == 0 || wval[i] == 0)) begin exp_cyc += 1; n_skip++; tot_skip++; end
      else begin
        exp_cyc += (outl(ival[i]) ? 2 : 1) * (outl(wval[i]) ? 2 : 1);
        tot_mult += (outl(ival[i]) ? 2 : 1) * (outl(wval[i]) ? 2 : 1);
        if (outl(ival[i]) && outl(wval[i])) n_out2++;
        else if (outl(ival[i]) || outl(wval[i])) n_out1++;
      end
    end
    @(negedge clk);
    start = 1; len = 9'(n); zero_skip = zs; psum_init = init_sel; psum_in = 24'(init); psum_addr = 4'(addr);
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    psum_raddr = 4'(addr); #1;
    checks++;
    if (psum_rdata !== 24'(expv)) begin failures++; $display("FAIL psum=%0d exp=%0d", psum_rdata, expv); end
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL cycles=%0d exp=%0d", cyc, exp_cyc); end
    checks++;
    if (mult_cycles != 32'(tot_mult) || skip_count != 32'(tot_skip)) begin
      failures++; $display("FAIL counters mult=%0d/%0d skip=%0d/%0d", mult_cycles, tot_mult, skip_count, tot_skip);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fill(10);
    run(256, 0, 1, 0, 0, 0);
    run(256, 1, 1, 12345, 1, 0);
    run(17, 0, 1, -77, 2, 0);
    // accumulate onto the PSUM buffer entry written by the previous run
    begin
      longint prev = -77;
      for (int i = 0; i < 17; i++) prev += ival[i] * wval[i];
      run(40, 1, 0, 0, 2, prev);
    end
    fill(60);
    run(200, 0, 1, 5, 3, 0);
    run(200, 1, 1, 5, 4, 0);
    run(1, 0, 1, 0, 5, 0);
    checks++;
    if (n_out1 == 0 || n_out2 == 0 || n_skip == 0) begin failures++; $display("FAIL mechanism not exercised"); end
    $display("outlier pairs: single %0d double %0d, zero skips %0d", n_out1, n_out2, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
