// fir4_approx: four-tap multiplier-less FIR filter with approximate adders.
//   y[n] = 105*x[n] + 831*x[n-1] + 621*x[n-2] + 815*x[n-3]
// The multiplier block forms the four constant products from shifts and
// six adder/subtractors found by common subexpression elimination:
//   adder step 1:  x15  = (x << 4) - x          x129 = (x << 7) + x
//   adder step 2:  x105 = (x15 << 3) - x15      x831 = (x15 << 6) - x129
//   adder step 3:  x621 = x831 - (x105 << 1)    x815 = x831 - (x << 4)
// Every adder of step s is an approx_addsub with AP = APs; the defaults
// {11, 16, 14} are the configuration selected for this filter by a
// delay/accuracy search, and AP1 = AP2 = AP3 = 0 gives the exact filter.
// The products feed a transposed delay line whose adders are exact.
// Input: IN_W-bit unsigned sample (a pixel-like value) with `in_valid`;
// output: OUT_W-bit two's complement,
// registered, `out_valid` one cycle after `in_valid`. The coefficients,
// adder graph, widths and AP values follow the design; the unsigned input,
// the exact delay-line adders and the output register are choices here.
module fir4_approx #(
  parameter int IN_W  = 15,
  parameter int OUT_W = 28,
  parameter int AP1   = 11,
  parameter int AP2   = 16,
  parameter int AP3   = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);
  localparam int N = OUT_W;
  logic [N-1:0] xe, x15, x129, x105, x831, x621, x815;
  assign xe = N'(x);

  approx_addsub #(.N(N), .AP(AP1)) u_a15  (.a(xe << 4),   .b(xe),        .sub(1'b1), .sum(x15));
  approx_addsub #(.N(N), .AP(AP1)) u_a129 (.a(xe << 7),   .b(xe),        .sub(1'b0), .sum(x129));
  approx_addsub #(.N(N), .AP(AP2)) u_a105 (.a(x15 << 3),  .b(x15),       .sub(1'b1), .sum(x105));
  approx_addsub #(.N(N), .AP(AP2)) u_a831 (.a(x15 << 6),  .b(x129),      .sub(1'b1), .sum(x831));
  approx_addsub #(.N(N), .AP(AP3)) u_a621 (.a(x831),      .b(x105 << 1), .sub(1'b1), .sum(x621));
  approx_addsub #(.N(N), .AP(AP3)) u_a815 (.a(x831),      .b(xe << 4),   .sub(1'b1), .sum(x815));

  // transposed form: y = h0*x[n] + z^-1(h1*x + z^-1(h2*x + z^-1(h3*x)))
  logic [N-1:0] r1, r2, r3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0; r2 <= '0; r3 <= '0; y <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        r3 <= x815;
        r2 <= r3 + x621;
        r1 <= r2 + x831;
        y  <= signed'(r1 + x105);
      end
    end
  end
endmodule
