// polymem_agu: address generation unit (AGU) of the PolyMem.
//
// From the anchor coordinates (i, j) of a parallel access and its access type
// it produces the matrix coordinates of all p*q elements of the access, in the
// order the user sees them (lane k = k-th element of the shape):
//   rectangle (i + k/q, j + k%q)   row (i, j + k)      column (i + k, j)
//   main diag (i + k, j + k)       sec. diag (i + k, j - k)
//   transposed rectangle (i + k/p, j + k%p)
// Lane k is flagged out_of_range when its element lies outside the N x M
// matrix. Purely combinational. The shapes follow the access types of the
// PolyMem/PRF (i + alpha, j + beta in the block diagram); the lane order of
// the rectangles (row-major) and the out_of_range flag are this design's own
// choices.
module polymem_agu
  import polymem_pkg::*;
#(
  parameter int unsigned P  = 2,
  parameter int unsigned Q  = 8,
  parameter int unsigned N  = 96,
  parameter int unsigned M  = 96,
  localparam int unsigned L  = P * Q,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned JW = (M > 1) ? $clog2(M) : 1
) (
  input  logic [IW-1:0] i,
  input  logic [JW-1:0] j,
  input  access_e       acc,
  output logic [IW-1:0] ei [L],
  output logic [JW-1:0] ej [L],
  output logic [L-1:0]  out_of_range
);

  always_comb begin
    logic signed [31:0] di, dj, ii, jj;
    for (int k = 0; k < L; k++) begin
      case (acc)
        ACC_RE:  begin di = k / Q; dj = k % Q; end
        ACC_RO:  begin di = 0;     dj = k;     end
        ACC_CO:  begin di = k;     dj = 0;     end
        ACC_MD:  begin di = k;     dj = k;     end
        ACC_SD:  begin di = k;     dj = -k;    end
        ACC_TR:  begin di = k / P; dj = k % P; end
        default: begin di = k / Q; dj = k % Q; end
      endcase
      ii = int'(i) + di;
      jj = int'(j) + dj;
      out_of_range[k] = (ii >= int'(N)) || (jj < 0) || (jj >= int'(M));
      ei[k] = IW'(ii);
      ej[k] = JW'(jj);
    end
  end

endmodule
