// grlc_decoder_tb: encodes random tile packets with the reference GRLC
// encoder, streams the bytes into the decoder with random gaps and random
// tile back-pressure, and checks every restored tile, the tile count
// (including zero tiles implied after the end of packet) and `done`.
// Expected values follow the published behaviour of the design where it
// gives one and the choices stated in the RTL headers elsewhere; stimulus,
// sizes and the checking method are this testbench's own.
module grlc_decoder_tb;
  import grlc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, in_ready, tile_valid, tile_ready = 0, done;
  logic [15:0] total_tiles = 0;
  logic [7:0] in_byte = 0;
  tile_t tile;
  grlc_decoder dut (.*);

  byte unsigned tiles[$][6];
  int ntile_out;
  always @(negedge clk) tile_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (tile_valid && tile_ready) begin
    checks++;
    if (ntile_out >= tiles.size()) begin failures++; $display("FAIL extra tile"); end
    else for (int i = 0; i < 6; i++)
      if (tile[i] !== tiles[ntile_out][i]) begin
        failures++; $display("FAIL tile %0d elem %0d got %0h exp %0h", ntile_out, i, tile[i], tiles[ntile_out][i]); break;
      end
    ntile_out++;
  end

  task automatic packet(input int ntiles, input int density);
    bytes_q s;
    tiles.delete(); ntile_out = 0;
    for (int t = 0; t < ntiles; t++) begin
      byte unsigned tl [6];
      bit zt = ($urandom_range(0, 99) < 100 - density) || (t > ntiles - 3);
      for (int i = 0; i < 6; i++) tl[i] = (zt || $urandom_range(0, 1)) ? 8'd0 : 8'($urandom_range(1, 255));
      tiles.push_back(tl);
    end
    s = ref_grlc_encode(tiles);
    @(negedge clk); start = 1; total_tiles = 16'(ntiles);
    @(negedge clk); start = 0;
    foreach (s[k]) begin
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      in_valid = 1; in_byte = s[k];
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    while (!done) @(posedge clk);
    checks++;
    if (ntile_out != ntiles) begin failures++; $display("FAIL %0d tiles out, expected %0d", ntile_out, ntiles); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 30; p++) packet(int'($urandom_range(3, 60)), (p % 3 == 0) ? 10 : (p % 3 == 1) ? 50 : 95);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
