// sdp_ram_tb: random writes and reads against a shadow array; checks the
// one-cycle read latency, read-before-write on an address collision, and
// that the read register holds its value while read enable is low.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module sdp_ram_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0, wdata = 0, rdata;
  sdp_ram #(.DEPTH(256), .WIDTH(8)) dut (.*);
  byte unsigned shadow [256];
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 8'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      byte unsigned expv;
      bit hold;
      @(negedge clk);
      hold = (n % 7 == 3);
      expv = rdata;
      raddr = 8'($urandom); re = !hold;
      we = $urandom_range(0, 1); waddr = (n % 5 == 0) ? raddr : 8'($urandom); wdata = 8'($urandom);
      if (!hold) expv = shadow[raddr];
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      checks++;
      if (rdata !== expv) begin failures++; $display("FAIL addr %0d got %0h exp %0h", raddr, rdata, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
