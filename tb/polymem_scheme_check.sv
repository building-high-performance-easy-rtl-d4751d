// polymem_scheme_check: test sequence for one polymem build (one scheme and
// one bank grid), used by tb_polymem.
//
// It keeps its own copy of the matrix and works out every expected lane value
// from the access shape alone (no bank mapping), so the check is independent
// of the memory's internals. Steps: fill the matrix with single-element
// writes (mask = lane 0); overwrite random blocks with masked block writes of
// every supported access type; read random blocks of every supported type,
// back to back, and compare lane by lane one cycle later; check that a
// conflicting and an out-of-range access raise req_err; check a port-1 read
// (when NRP > 1) in the same cycle as a port-0 read.
// Valid anchors: every element in the matrix and, for RoCo rectangles,
// i % P == 0 or j % Q == 0 (the conflict-free condition of that shape).
module polymem_scheme_check
  import polymem_pkg::*;
#(
  parameter scheme_e SCHEME = SCHEME_ROCO,
  parameter int unsigned P   = 2,
  parameter int unsigned Q   = 4,
  parameter int unsigned N   = 8,
  parameter int unsigned M   = 16,
  parameter int unsigned W   = 16,
  parameter int unsigned NRP = 2,
  parameter int unsigned NOPS = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned L  = P * Q;
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned JW = (M > 1) ? $clog2(M) : 1;

  logic          req_valid [NRP];
  logic [IW-1:0] req_i     [NRP];
  logic [JW-1:0] req_j     [NRP];
  access_e       req_acc   [NRP];
  logic          req_we;
  logic [L-1:0]  req_mask;
  logic [W-1:0]  req_wdata [L];
  logic          req_err   [NRP];
  logic          rsp_valid [NRP];
  logic [W-1:0]  rsp_data  [NRP][L];

  polymem #(.W(W), .P(P), .Q(Q), .N(N), .M(M), .SCHEME(SCHEME), .NRP(NRP)) dut (.*);

  logic [W-1:0] ref_m [N][M];

  function automatic void coord(access_e a, int k, int i, int j, output int ci, output int cj);
    case (a)
      ACC_RE: begin ci = i + k / Q; cj = j + k % Q; end
      ACC_RO: begin ci = i;         cj = j + k;     end
      ACC_CO: begin ci = i + k;     cj = j;         end
      ACC_MD: begin ci = i + k;     cj = j + k;     end
      ACC_SD: begin ci = i + k;     cj = j - k;     end
      default: begin ci = i + k / P; cj = j + k % P; end
    endcase
  endfunction

  function automatic bit valid_anchor(access_e a, int i, int j);
    int ci, cj;
    for (int k = 0; k < L; k++) begin
      coord(a, k, i, j, ci, cj);
      if (ci < 0 || ci >= N || cj < 0 || cj >= M) return 0;
    end
    if (SCHEME == SCHEME_ROCO && a == ACC_RE && (i % P != 0) && (j % Q != 0)) return 0;
    return 1;
  endfunction

  task automatic pick(access_e a, output int i, output int j);
    do begin
      i = $urandom_range(N - 1);
      j = $urandom_range(M - 1);
    end while (!valid_anchor(a, i, j));
  endtask

  task automatic idle();
    for (int p = 0; p < NRP; p++) req_valid[p] = 1'b0;
    req_we = 1'b0;
  endtask

  task automatic expect_lanes(int p, access_e a, int i, int j, string what);
    int ci, cj;
    checks++;
    if (!rsp_valid[p]) begin
      failures++;
      $display("FAIL %s: rsp_valid low (scheme %0d)", what, SCHEME);
    end
    for (int k = 0; k < L; k++) begin
      coord(a, k, i, j, ci, cj);
      checks++;
      if (rsp_data[p][k] !== ref_m[ci][cj]) begin
        failures++;
        $display("FAIL %s scheme %0d acc %0d (%0d,%0d) lane %0d: got %h exp %h",
                 what, SCHEME, a, i, j, k, rsp_data[p][k], ref_m[ci][cj]);
      end
    end
  endtask

  initial begin
    int i, j, ci, cj, pi1, pj1;
    access_e a, pa1;
    logic [L-1:0] mask;
    done = 0; checks = 0; failures = 0;
    idle();
    req_mask = '0;
    for (int k = 0; k < L; k++) req_wdata[k] = '0;
    for (int p = 0; p < NRP; p++) begin req_i[p] = '0; req_j[p] = '0; req_acc[p] = ACC_RE; end
    @(posedge rst_n);
    @(posedge clk);
    // 1. fill with single-element writes through lane 0
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++) begin
        ref_m[r][c] = W'($urandom);
        req_valid[0] <= 1'b1; req_we <= 1'b1; req_mask <= L'(1);
        req_i[0] <= IW'(r); req_j[0] <= JW'(c); req_acc[0] <= ACC_RO;
        req_wdata[0] <= ref_m[r][c];
        @(posedge clk);
      end
    // 2. masked block writes of every supported type
    for (int n = 0; n < NOPS / 2; n++) begin
      a = scheme_access(SCHEME, n % scheme_num_access(SCHEME));
      pick(a, i, j);
      mask = L'({$urandom, $urandom});
      req_valid[0] <= 1'b1; req_we <= 1'b1; req_mask <= mask;
      req_i[0] <= IW'(i); req_j[0] <= JW'(j); req_acc[0] <= a;
      for (int k = 0; k < L; k++) begin
        logic [W-1:0] d;
        d = W'($urandom);
        req_wdata[k] <= d;
        coord(a, k, i, j, ci, cj);
        if (mask[k]) ref_m[ci][cj] = d;
      end
      #1;
      checks++;
      if (req_err[0]) begin failures++; $display("FAIL write err scheme %0d acc %0d (%0d,%0d)", SCHEME, a, i, j); end
      @(posedge clk);
    end
    req_we <= 1'b0; req_valid[0] <= 1'b0;
    @(posedge clk);
    // 3. back-to-back reads on port 0 (and port 1), checked one cycle later
    for (int n = 0; n < NOPS; n++) begin
      a = scheme_access(SCHEME, $urandom_range(scheme_num_access(SCHEME) - 1));
      pick(a, i, j);
      req_valid[0] <= 1'b1; req_we <= 1'b0;
      req_i[0] <= IW'(i); req_j[0] <= JW'(j); req_acc[0] <= a;
      if (NRP > 1) begin
        pa1 = scheme_access(SCHEME, $urandom_range(scheme_num_access(SCHEME) - 1));
        pick(pa1, pi1, pj1);
        req_valid[NRP-1] <= 1'b1;
        req_i[NRP-1] <= IW'(pi1); req_j[NRP-1] <= JW'(pj1); req_acc[NRP-1] <= pa1;
      end
      #1;
      checks++;
      if (req_err[0]) begin failures++; $display("FAIL read err scheme %0d acc %0d (%0d,%0d)", SCHEME, a, i, j); end
      @(posedge clk);
      #1;
      expect_lanes(0, a, i, j, "read");
      if (NRP > 1) expect_lanes(NRP-1, pa1, pi1, pj1, "read port 1");
    end
    idle();
    // 4. error flag: a conflicting access and an out-of-range access
    req_valid[0] <= 1'b1; req_we <= 1'b0;
    case (SCHEME)
      SCHEME_ROCO: begin req_acc[0] <= ACC_RE; req_i[0] <= IW'(1); req_j[0] <= JW'(1); end
      SCHEME_RERO: begin req_acc[0] <= ACC_CO; req_i[0] <= '0; req_j[0] <= '0; end
      default:     begin req_acc[0] <= ACC_RO; req_i[0] <= '0; req_j[0] <= '0; end
    endcase
    #1; @(posedge clk); #1;
    checks++;
    if (!req_err[0]) begin failures++; $display("FAIL conflict not flagged, scheme %0d", SCHEME); end
    req_acc[0] <= scheme_access(SCHEME, 0); req_i[0] <= IW'(N - 1); req_j[0] <= JW'(M - 1);
    @(posedge clk); #1;
    checks++;
    if (!req_err[0]) begin failures++; $display("FAIL out of range not flagged, scheme %0d", SCHEME); end
    idle();
    @(posedge clk);
    done = 1;
  end
endmodule
