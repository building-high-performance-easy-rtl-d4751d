// polymem_mmap: the "m" module of the PolyMem, the module-assignment function.
//
// For each of the p*q element coordinates of an access it returns the bank
// that holds the element. Banks form a p x q grid M_vh; the bank number is
// v*Q + h. The functions per scheme (integer division and modulo):
//   ReO   v = i % p                 h = j % q
//   ReRo  v = (i + j/q) % p         h = j % q
//   ReCo  v = i % p                 h = (i/p + j) % q
//   RoCo  v = (i + j/q) % p         h = (i/p + j) % q
//   ReTr  p<q: v = i % p            h = (j + (i/p)*p) % q
//         p>q: v = (i + (j/q)*q) % p h = j % q   (p == q: as ReO)
// These are the Polymorphic Register File mapping functions, the ones PolyMem
// reuses; the RoCo 1x3 placement they give matches the worked 6x6 example of
// the design (row access at element 8 and column access at element 23 both
// conflict-free). Purely combinational.
module polymem_mmap
  import polymem_pkg::*;
#(
  parameter int unsigned P = 2,
  parameter int unsigned Q = 8,
  parameter int unsigned N = 96,
  parameter int unsigned M = 96,
  parameter scheme_e SCHEME = SCHEME_ROCO,
  localparam int unsigned L  = P * Q,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned JW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned BW = (L > 1) ? $clog2(L) : 1
) (
  input  logic [IW-1:0] ei   [L],
  input  logic [JW-1:0] ej   [L],
  output logic [BW-1:0] bank [L]
);

  always_comb begin
    logic [31:0] ii, jj, v, h;
    for (int k = 0; k < L; k++) begin
      ii = int'(ei[k]);
      jj = int'(ej[k]);
      case (SCHEME)
        SCHEME_RERO: begin v = (ii + jj / Q) % P; h = jj % Q;            end
        SCHEME_RECO: begin v = ii % P;            h = (ii / P + jj) % Q; end
        SCHEME_ROCO: begin v = (ii + jj / Q) % P; h = (ii / P + jj) % Q; end
        SCHEME_RETR: begin
          if (P < Q)      begin v = ii % P;                h = (jj + (ii / P) * P) % Q; end
          else if (P > Q) begin v = (ii + (jj / Q) * Q) % P; h = jj % Q;              end
          else            begin v = ii % P;                h = jj % Q;                  end
        end
        default:     begin v = ii % P;            h = jj % Q;            end
      endcase
      bank[k] = BW'(v * Q + h);
    end
  end

endmodule
