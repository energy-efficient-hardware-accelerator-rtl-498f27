// clt_pe: processing element of the channel-loop-tiling-aware accelerator.
// NMAC multiply-accumulators share one BW_I-bit input feature-map value per
// cycle; each has its own BW_F-bit weight, so one PE advances NMAC output
// channels of one output pixel per cycle. `load` sets every accumulator to
// its `init` value (bias, or a partial sum recovered from an earlier channel
// tile); `en` adds ifm*wgt[m]. ACC_W is wider than BW_I + BW_F so the
// accumulation of a tile cannot overflow. Accumulators are registered.
// Eight MACs per PE follow the design; the IFM broadcast is a choice here.
module clt_pe #(
  parameter int NMAC  = 8,
  parameter int BW_I  = 8,
  parameter int BW_F  = 8,
  parameter int ACC_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [BW_I-1:0]  ifm,
  input  logic signed [BW_F-1:0]  wgt  [NMAC],
  input  logic                    en,
  input  logic                    load,
  input  logic signed [ACC_W-1:0] init [NMAC],
  output logic signed [ACC_W-1:0] acc  [NMAC]
);
  for (genvar m = 0; m < NMAC; m++) begin : g_mac
    logic signed [BW_I+BW_F-1:0] prod;
    assign prod = ifm * wgt[m];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   acc[m] <= '0;
      else if (load) acc[m] <= init[m];
      else if (en)  acc[m] <= acc[m] + ACC_W'(prod);
    end
  end
endmodule
