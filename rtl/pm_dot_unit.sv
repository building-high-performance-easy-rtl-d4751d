// pm_dot_unit: L-lane multiply and adder tree of the matrix kernels.
//
// dot = sum over t of (a[t] * b[t]) >>> FRAC, in W-bit two's complement
// arithmetic that wraps on overflow. FRAC = 0 gives plain integer
// products; FRAC > 0 treats the words as fixed-point numbers with FRAC
// fraction bits (each product is rescaled before the sum, truncating towards
// minus infinity). Purely combinational: the kernel registers around it.
// The document's kernels compute in single-precision floating point; the
// fixed-point arithmetic is this design's substitute.
module pm_dot_unit #(
  parameter int unsigned L    = 16,
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 0
) (
  input  logic [W-1:0] a [L],
  input  logic [W-1:0] b [L],
  output logic [W-1:0] dot
);

  always_comb begin
    logic signed [2*W-1:0] prod;
    logic [W-1:0] sum;
    sum = '0;
    for (int t = 0; t < L; t++) begin
      prod = $signed(a[t]) * $signed(b[t]);
      sum  = sum + W'(prod >>> FRAC);
    end
    dot = sum;
  end

endmodule
