// sdp_ram: simple dual-port on-chip memory (one write, one read port).
// Used for the global buffer of the TMx accelerator and for the output and
// compressed-MSB buffers of the tiling-aware accelerator. The read is
// synchronous: `rdata` holds mem[raddr] from the cycle after `re`. A write
// and a read of the same address in one cycle return the old data. The
// contents are not reset.
// The published design names the buffers and their 8-bit data width; depth,
// port arrangement and read latency are this design's choices.
module sdp_ram #(
  parameter int DEPTH = 16384,
  parameter int WIDTH = 8,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
