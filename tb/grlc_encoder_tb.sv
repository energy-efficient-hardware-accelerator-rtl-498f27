// grlc_encoder_tb: feeds packets of random 2x3 tiles (sparse and dense,
// including long runs of zero tiles and a trailing zero run) with random
// back-pressure on the output, and compares the byte stream with the
// GRLC reference encoding. Counts headers that cut a long zero run.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module grlc_encoder_tb;
  import grlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, long_runs = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tile_valid = 0, tile_ready, tile_last = 0, out_valid, out_ready = 0, out_eop;
  tile_t tile = '0;
  logic [7:0] out_byte;
  grlc_encoder dut (.*);

  bytes_q got;
  always @(posedge clk) if (out_valid && out_ready) begin
    got.push_back(out_byte);
    if (out_byte == 8'hC0) long_runs++;
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic packet(input int ntiles, input int density);
    byte unsigned tiles[$][6];
    bytes_q expq;
    got.delete();
    for (int t = 0; t < ntiles; t++) begin
      byte unsigned tl [6];
      bit zt = ($urandom_range(0, 99) < 100 - density);
      for (int i = 0; i < 6; i++) tl[i] = (zt || $urandom_range(0, 1)) ? 8'd0 : 8'($urandom_range(1, 255));
      tiles.push_back(tl);
    end
    expq = ref_grlc_encode(tiles);
    for (int t = 0; t < ntiles; t++) begin
      @(negedge clk);
      tile_valid = 1; tile_last = (t == ntiles - 1);
      for (int i = 0; i < 6; i++) tile[i] = tiles[t][i];
      @(posedge clk); while (!tile_ready) @(posedge clk);
    end
    @(negedge clk); tile_valid = 0; tile_last = 0;
    while (got.size() == 0 || got[$] != 8'h00 || got.size() < expq.size()) @(posedge clk);
    @(posedge clk);
    checks++;
    if (got != expq) begin
      failures++;
      $display("FAIL packet: got %0d bytes, expected %0d", got.size(), expq.size());
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 30; p++) packet(int'($urandom_range(1, 60)), (p % 3 == 0) ? 10 : (p % 3 == 1) ? 50 : 95);
    checks++;
    if (long_runs == 0) begin failures++; $display("FAIL no long zero run was coded"); end
    $display("long zero runs coded: %0d", long_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
