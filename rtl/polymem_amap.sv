// polymem_amap: the "A" module of the PolyMem, the in-bank address function.
//
// Every p x q aligned block of the N x M matrix puts exactly one element in
// each bank, so the address inside a bank is the index of that block in
// row-major order:  A(i, j) = (i / p) * (M / q) + j / q.
// Each bank therefore holds N*M/(p*q) words. This is the standard PRF
// addressing; it reproduces the bank layout of the 6x6, 1x3 RoCo example of
// the design. It requires p | N and q | M. Purely combinational.
module polymem_amap #(
  parameter int unsigned P = 2,
  parameter int unsigned Q = 8,
  parameter int unsigned N = 96,
  parameter int unsigned M = 96,
  localparam int unsigned L  = P * Q,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned JW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned D  = (N * M) / L,
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1
) (
  input  logic [IW-1:0] ei   [L],
  input  logic [JW-1:0] ej   [L],
  output logic [AW-1:0] addr [L]
);

  always_comb begin
    for (int k = 0; k < L; k++)
      addr[k] = AW'((int'(ei[k]) / P) * (M / Q) + int'(ej[k]) / Q);
  end

endmodule
