// tmx_mac_tb: drives the time-multiplexed MAC with the partial-product
// schedule of random 8-bit operand pairs (narrow, low/high halves) and
// checks that the accumulator ends at init + sum of the full products.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module tmx_mac_tb;
  import tmx_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] ifm, wgt;
  part_e ip, wp;
  logic [3:0] shift;
  logic en, load;
  logic signed [23:0] acc_in, acc, acc_next;
  always #5 clk = ~clk;
  tmx_mac #(.DATA_W(8), .NB(4), .ACC_W(24)) dut (.clk, .rst_n, .ifm, .wgt, .ifm_part(ip), .wgt_part(wp),
    .shift, .en, .load, .acc_in, .acc, .acc_next);

  function automatic bit is_out(input int v); return v > 7 || v < -8; endfunction

  initial begin
    longint expv;
    en = 0; load = 0; acc_in = 0; ifm = 0; wgt = 0; ip = PART_NARROW; wp = PART_NARROW; shift = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 200; trial++) begin
      int init;
      init = int'($urandom_range(0, 2000)) - 1000;
      @(negedge clk); load = 1; acc_in = 24'(init); en = 0;
      @(negedge clk); load = 0;
      expv = init;
      for (int n = 0; n < 8; n++) begin
        int a, b;
        bit ao, bo;
        a = (trial % 3 == 0) ? int'($urandom_range(0, 255)) - 128 : int'($urandom_range(0, 15)) - 8;
        b = (trial % 2 == 0) ? int'($urandom_range(0, 255)) - 128 : int'($urandom_range(0, 15)) - 8;
        ao = is_out(a); bo = is_out(b);
        expv += a * b;
        ifm = 8'(a); wgt = 8'(b); en = 1;
        for (int s = 0; s < (ao ? 2 : 1) * (bo ? 2 : 1); s++) begin
          bit ih, wh;
          ih = ao && (s % 2 == 1);
          wh = bo && (ao ? (s / 2 == 1) : (s == 1));
          ip = ao ? (ih ? PART_HI : PART_LO) : PART_NARROW;
          wp = bo ? (wh ? PART_HI : PART_LO) : PART_NARROW;
          shift = 4'((ih ? 4 : 0) + (wh ? 4 : 0));
          @(negedge clk);
        end
      end
      en = 0;
      checks++;
      if (acc !== 24'(expv)) begin
        failures++;
        $display("FAIL trial %0d acc=%0d exp=%0d", trial, acc, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
