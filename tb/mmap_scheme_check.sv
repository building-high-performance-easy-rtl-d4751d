// mmap_scheme_check: exhaustive conflict-freedom check of one polymem_mmap
// build, used by tb_polymem_mmap. For every access type the scheme
// supports and every anchor whose elements all lie in the matrix, the p*q
// elements must fall in p*q different banks (RoCo rectangles: only anchors
// with i % P == 0 or j % Q == 0). It also checks that a shape the scheme
// does not support conflicts somewhere, so the map is not trivially
// conflict-free, and that the bank numbers stay below p*q.
module mmap_scheme_check
  import polymem_pkg::*;
#(
  parameter scheme_e SCHEME = SCHEME_ROCO,
  parameter int unsigned P = 2,
  parameter int unsigned Q = 4,
  parameter int unsigned N = 8,
  parameter int unsigned M = 16,
  parameter int unsigned START = 1
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int L = P * Q, IW = $clog2(N), JW = $clog2(M), BW = $clog2(L);
  logic [IW-1:0] ei [L];
  logic [JW-1:0] ej [L];
  logic [BW-1:0] bank [L];

  polymem_mmap #(.P(P), .Q(Q), .N(N), .M(M), .SCHEME(SCHEME)) dut (.*);

  function automatic bit shape(int a, int k, int i, int j, output int ci, output int cj);
    case (a)
      0: begin ci = i + k / Q; cj = j + k % Q; end
      1: begin ci = i;         cj = j + k;     end
      2: begin ci = i + k;     cj = j;         end
      3: begin ci = i + k;     cj = j + k;     end
      4: begin ci = i + k;     cj = j - k;     end
      default: begin ci = i + k / P; cj = j + k % P; end
    endcase
    return ci < N && cj >= 0 && cj < M;
  endfunction

  initial begin
    int unsupported_conflicts;
    done = 0; checks = 0; failures = 0; unsupported_conflicts = 0;
    #(START);
    for (int a = 0; a < 6; a++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++) begin
          bit in_mat, sup;
          int ci, cj;
          logic [L-1:0] seen;
          in_mat = 1;
          for (int k = 0; k < L; k++) begin
            in_mat &= shape(a, k, i, j, ci, cj);
            ei[k] = IW'(ci); ej[k] = JW'(cj);
          end
          if (!in_mat) continue;
          #1;
          seen = '0;
          for (int k = 0; k < L; k++) begin
            checks++;
            if (int'(bank[k]) >= L) failures++;
            seen[bank[k]] = 1'b1;
          end
          sup = scheme_supports(SCHEME, access_e'(a));
          if (SCHEME == SCHEME_ROCO && a == 0 && i % P != 0 && j % Q != 0) sup = 0;
          if (sup) begin
            checks++;
            if (seen != '1) begin
              failures++;
              if (failures < 5) $display("FAIL scheme %0d acc %0d (%0d,%0d) banks %b", SCHEME, a, i, j, seen);
            end
          end else if (seen != '1) unsupported_conflicts++;
        end
    checks++;
    if (unsupported_conflicts == 0) begin failures++; $display("FAIL scheme %0d: no shape ever conflicts", SCHEME); end
    done = 1;
  end
endmodule
