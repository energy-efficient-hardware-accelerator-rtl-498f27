// tmx_indexer_tb: steps the indexing module through the four indicator
// combinations and compares the sequence of operand parts and shifts with
// the expected partial-product schedule (1, 2, 2 and 4 steps; shifts of
// 0 / 4 / 4 / 8 for two outliers).
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module tmx_indexer_tb;
  import tmx_pkg::*;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst_n = 0, advance = 0, ifm_out = 0, wgt_out = 0, last;
  part_e ip, wp;
  logic [3:0] shift;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  tmx_indexer #(.NB(4)) dut (.clk, .rst_n, .advance, .ifm_out, .wgt_out,
                             .ifm_part(ip), .wgt_part(wp), .shift, .last);

  task automatic expect_step(input part_e e_ip, input part_e e_wp, input int e_sh, input bit e_last);
    checks++;
    if (ip !== e_ip || wp !== e_wp || shift !== 4'(e_sh) || last !== e_last) begin
      failures++;
      $display("FAIL io=%b wo=%b got %0d %0d sh=%0d last=%b exp %0d %0d sh=%0d last=%b",
               ifm_out, wgt_out, ip, wp, shift, last, e_ip, e_wp, e_sh, e_last);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    advance = 1;
    // no outlier: one narrow step
    ifm_out = 0; wgt_out = 0; #1;
    expect_step(PART_NARROW, PART_NARROW, 0, 1); @(posedge clk); #1;
    // IFM outlier only: lo, hi
    ifm_out = 1; wgt_out = 0; #1;
    expect_step(PART_LO, PART_NARROW, 0, 0); @(posedge clk); #1;
    expect_step(PART_HI, PART_NARROW, 4, 1); @(posedge clk); #1;
    // WGT outlier only
    ifm_out = 0; wgt_out = 1; #1;
    expect_step(PART_NARROW, PART_LO, 0, 0); @(posedge clk); #1;
    expect_step(PART_NARROW, PART_HI, 4, 1); @(posedge clk); #1;
    // both outliers: four steps, shifts 0, 4, 4, 8
    ifm_out = 1; wgt_out = 1; #1;
    expect_step(PART_LO, PART_LO, 0, 0); @(posedge clk); #1;
    expect_step(PART_HI, PART_LO, 4, 0); @(posedge clk); #1;
    expect_step(PART_LO, PART_HI, 4, 0); @(posedge clk); #1;
    expect_step(PART_HI, PART_HI, 8, 1); @(posedge clk); #1;
    // holding (advance = 0) keeps the step
    ifm_out = 1; wgt_out = 0; #1;
    advance = 0; @(posedge clk); #1;
    expect_step(PART_LO, PART_NARROW, 0, 0);
    advance = 1; @(posedge clk); #1;
    expect_step(PART_HI, PART_NARROW, 4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
