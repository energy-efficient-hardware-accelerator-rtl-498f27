// tmx_indexer: indexing module of the TMx PE.
// For one IFM x WGT operand pair it steps through the partial products the
// narrow multiplier must form: one step when neither operand is an outlier
// (both used whole), two when one is (its low and high halves), four when
// both are. Each step names the part of each operand and the left shift of
// the product (NB per high half, as in the 4 / 4 / 8 shifts of the outlier
// case). The step order lo*lo, hi*lo, lo*hi, hi*hi is this design's choice.
// Timing: `start` presents a pair; the first step is output in the same
// cycle (combinational on the indicators and the internal step counter);
// each following cycle with `advance` moves to the next step; `last` marks
// the final step of the pair.
module tmx_indexer
  import tmx_pkg::*;
#(
  parameter int NB = 4,
  localparam int SH_W = $clog2(2*NB+1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            advance,   // the current step is consumed this cycle
  input  logic            ifm_out,   // outlier indicators of the current pair
  input  logic            wgt_out,
  output part_e           ifm_part,
  output part_e           wgt_part,
  output logic [SH_W-1:0] shift,
  output logic            last
);
  logic [1:0] step;  // bit0: IFM half, bit1: WGT half

  always_comb begin
    logic ih, wh;
    ih = ifm_out & step[0];
    wh = wgt_out & (ifm_out ? step[1] : step[0]);
    ifm_part = ifm_out ? (ih ? PART_HI : PART_LO) : PART_NARROW;
    wgt_part = wgt_out ? (wh ? PART_HI : PART_LO) : PART_NARROW;
    shift    = SH_W'((ih ? NB : 0) + (wh ? NB : 0));
    unique case ({ifm_out, wgt_out})
      2'b00:   last = 1'b1;
      2'b11:   last = (step == 2'd3);
      default: last = (step == 2'd1);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              step <= '0;
    else if (advance & last) step <= '0;
    else if (advance)        step <= step + 2'd1;
  end
endmodule
