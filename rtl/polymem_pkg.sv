// polymem_pkg: shared types and helper functions of the polymorphic parallel
// memory (PolyMem).
//
// A PolyMem stores a 2D matrix in p x q memory banks so that one access can
// read or write p*q elements of a chosen shape in a single cycle. The
// arrangement of the data over the banks is fixed at build time by the
// "scheme"; each scheme makes a subset of the access shapes ("access types")
// conflict-free, i.e. every element of the access falls in a different bank.
//
//   scheme  conflict-free access types
//   ReO     rectangle (p x q)
//   ReRo    rectangle, row (1 x pq), main and secondary diagonal
//   ReCo    rectangle, column (pq x 1), main and secondary diagonal
//   RoCo    row, column, rectangle
//   ReTr    rectangle, transposed rectangle (q x p)
//
// The scheme list and the access types follow the published PolyMem/PRF
// scheme table. The numeric encodings, and the order in which a scheme's
// access types are listed by scheme_access(), are choices of this design.
package polymem_pkg;

  typedef enum logic [2:0] {
    SCHEME_REO  = 3'd0,
    SCHEME_RERO = 3'd1,
    SCHEME_RECO = 3'd2,
    SCHEME_ROCO = 3'd3,
    SCHEME_RETR = 3'd4
  } scheme_e;

  // Access shapes, anchored at (i, j):
  //   ACC_RE  p x q rectangle, (i + k/q, j + k%q)
  //   ACC_RO  1 x pq row,      (i, j + k)
  //   ACC_CO  pq x 1 column,   (i + k, j)
  //   ACC_MD  main diagonal,   (i + k, j + k)
  //   ACC_SD  secondary diag., (i + k, j - k)
  //   ACC_TR  q x p rectangle, (i + k/p, j + k%p)
  typedef enum logic [2:0] {
    ACC_RE = 3'd0,
    ACC_RO = 3'd1,
    ACC_CO = 3'd2,
    ACC_MD = 3'd3,
    ACC_SD = 3'd4,
    ACC_TR = 3'd5
  } access_e;

  // Operations of the matrix kernel (pm_matrix_kernel):
  //   OP_MM1  OUT = B x C
  //   OP_MM2  OUT = B x C, then OUT = C x B (mirrored pair)
  //   OP_POW  A := A x A, repeated h times (A to the power 2^h)
  typedef enum logic [1:0] {
    OP_MM1 = 2'd0,
    OP_MM2 = 2'd1,
    OP_POW = 2'd2
  } mat_op_e;

  // Number of access types a scheme supports conflict-free.
  function automatic int unsigned scheme_num_access(scheme_e s);
    case (s)
      SCHEME_REO:  return 1;
      SCHEME_RERO: return 4;
      SCHEME_RECO: return 4;
      SCHEME_ROCO: return 3;
      SCHEME_RETR: return 2;
      default:     return 1;
    endcase
  endfunction

  // The idx-th access type supported by scheme s (idx < scheme_num_access(s)).
  function automatic access_e scheme_access(scheme_e s, int unsigned idx);
    case (s)
      SCHEME_RERO: case (idx)
                     0: return ACC_RE;
                     1: return ACC_RO;
                     2: return ACC_MD;
                     default: return ACC_SD;
                   endcase
      SCHEME_RECO: case (idx)
                     0: return ACC_RE;
                     1: return ACC_CO;
                     2: return ACC_MD;
                     default: return ACC_SD;
                   endcase
      SCHEME_ROCO: case (idx)
                     0: return ACC_RO;
                     1: return ACC_CO;
                     default: return ACC_RE;
                   endcase
      SCHEME_RETR: case (idx)
                     0: return ACC_RE;
                     default: return ACC_TR;
                   endcase
      default:     return ACC_RE;
    endcase
  endfunction

  // True when scheme s lists access type a.
  function automatic bit scheme_supports(scheme_e s, access_e a);
    for (int unsigned k = 0; k < scheme_num_access(s); k++)
      if (scheme_access(s, k) == a) return 1'b1;
    return 1'b0;
  endfunction

endpackage
