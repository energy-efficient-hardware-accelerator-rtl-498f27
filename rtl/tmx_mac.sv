// tmx_mac: time-multiplexed multiply-accumulate of the TMx PE.
// One narrow signed multiplier of (NB+1) x (NB+1) bits forms one partial
// product per cycle from the operand parts chosen by the indexing module;
// the product is shifted left by `shift` and added to the accumulator.
// A non-outlier pair completes in one cycle; outlier pairs take two or four
// cycles. The extra sign bit of the multiplier (NB+1 instead of NB) lets the
// unsigned low half and the signed high half share it - this design's choice.
// `load` sets the accumulator to `acc_in` (psum mux); `en` accumulates.
// `load` has priority. `acc` is registered; `acc_next` is the value it takes.
module tmx_mac
  import tmx_pkg::*;
#(
  parameter int DATA_W = 8,
  parameter int NB     = 4,
  parameter int ACC_W  = 24,
  localparam int SH_W  = $clog2(2*NB+1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DATA_W-1:0] ifm,
  input  logic signed [DATA_W-1:0] wgt,
  input  part_e                   ifm_part,
  input  part_e                   wgt_part,
  input  logic [SH_W-1:0]         shift,
  input  logic                    en,
  input  logic                    load,
  input  logic signed [ACC_W-1:0] acc_in,
  output logic signed [ACC_W-1:0] acc,
  output logic signed [ACC_W-1:0] acc_next
);
  function automatic logic signed [NB:0] pick(input logic signed [DATA_W-1:0] v, input part_e p);
    unique case (p)
      PART_LO: return {1'b0, v[NB-1:0]};
      PART_HI: return (NB+1)'(v >>> NB);
      default: return {v[NB-1], v[NB-1:0]};
    endcase
  endfunction

  logic signed [NB:0]      a, b;
  logic signed [2*NB+1:0]  prod;
  logic signed [ACC_W-1:0] prod_sh;

  always_comb begin
    a        = pick(ifm, ifm_part);
    b        = pick(wgt, wgt_part);
    prod     = a * b;
    prod_sh  = ACC_W'(prod) <<< shift;
    acc_next = load ? acc_in : (en ? acc + prod_sh : acc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc_next;
  end
endmodule
