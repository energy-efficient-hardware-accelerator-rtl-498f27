// approx_addsub: accuracy-configurable approximate adder/subtractor.
// The N-bit result is split at AP: bits N-1..AP come from an exact adder;
// bits AP-1..0 from an approximate part in which a carry-generator chain
// runs from the MSB of the part down to its LSB. Generator k is set when
// generator k+1 is set or when A[k] and B[k] are both 1; the sum bit is 1
// where the generator is set, else A[k] + B[k] (which cannot carry there).
// So once both operands have a 1 in the same position, that bit and all
// lower bits read 1. No carry leaves the approximate part, so the error is
// at most 2^AP - 1. Subtraction XORs B with `sub` (one's complement) and,
// because that carry-in would land in the approximate part, adds no +1,
// except when AP = 0, where the circuit is an ordinary exact
// adder/subtractor. AP = 0 .. N. Combinational.
module approx_addsub #(
  parameter int N  = 28,
  parameter int AP = 0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] sum
);
  logic [N-1:0] bn;
  assign bn = b ^ {N{sub}};

  if (AP == 0) begin : g_exact
    assign sum = a + bn + N'(sub);
  end else begin : g_approx
    logic [AP:0] c;   // c[AP] is the grounded input of the top generator
    always_comb begin
      c[AP] = 1'b0;
      for (int k = AP - 1; k >= 0; k--) begin
        c[k]   = c[k+1] | (a[k] & bn[k]);
        sum[k] = c[k] ? 1'b1 : (a[k] ^ bn[k]);
      end
    end
    if (AP < N) begin : g_acc
      assign sum[N-1:AP] = a[N-1:AP] + bn[N-1:AP];
    end
  end
endmodule
