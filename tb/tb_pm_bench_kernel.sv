// tb_pm_bench_kernel: self-checking testbench of the microbenchmark kernel at
// its default size (96 x 96 words of 64 bits, 2 x 8 banks, RoCo, 3072 reads,
// 50 result blocks). It streams a random matrix and random valid anchors in
// (with random gaps), drains the result stream under random back-pressure and
// compares every word with the value read from its own copy of the matrix
// along the access shape of the chunk the read belongs to. It checks that the
// read phase takes N_READS + 1 cycles (one block read per cycle) and that no
// read is flagged. A second run plants some conflicting RoCo rectangle
// anchors and checks that err_count counts exactly those.
module tb_pm_bench_kernel;
  import polymem_pkg::*;
  localparam int W = 64, DIM = 96, P = 2, Q = 8, L = P * Q;
  localparam int NR = 3072, NRB = 50;
  localparam scheme_e S = SCHEME_ROCO;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid, s_ready, m_valid, m_ready, m_last, done;
  logic [W-1:0] s_data, m_data;
  logic [31:0] read_cycles, err_count;

  pm_bench_kernel dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] mat [DIM][DIM];
  int ai [NR], aj [NR];
  access_e at [NR];
  logic [W-1:0] got [$];
  bit got_last [$];

  // output monitor and random back-pressure
  always @(posedge clk) begin
    if (m_valid && m_ready) begin got.push_back(m_data); got_last.push_back(m_last); end
    m_ready <= ($urandom_range(2) != 0);
  end

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

  task automatic send(logic [W-1:0] d);
    s_valid <= 1'b1; s_data <= d;
    do @(posedge clk); while (!s_ready);
    if ($urandom_range(3) == 0) begin
      s_valid <= 1'b0;
      @(posedge clk);
    end
  endtask

  task automatic run(int n_bad);
    int nt, chunk, ci, cj, bad, idx;
    nt = scheme_num_access(S);
    chunk = NR / nt;
    for (int r = 0; r < DIM; r++) for (int c = 0; c < DIM; c++) mat[r][c] = {$urandom, $urandom};
    bad = 0;
    for (int n = 0; n < NR; n++) begin
      at[n] = scheme_access(S, (n / chunk < nt) ? n / chunk : nt - 1);
      if (at[n] == ACC_RE && bad < n_bad && n % 7 == 0) begin
        ai[n] = 2 * $urandom_range(40) + 1; aj[n] = 8 * $urandom_range(9) + 3;   // unaligned: conflicts
        bad++;
      end else
        forever begin
          ai[n] = $urandom_range(DIM - 1); aj[n] = $urandom_range(DIM - 1);
          coord(at[n], L - 1, ai[n], aj[n], ci, cj);
          if (ci >= DIM || cj >= DIM) continue;
          if (at[n] == ACC_RE && ai[n] % P != 0 && aj[n] % Q != 0) continue;
          break;
        end
    end
    for (int r = 0; r < DIM; r++) for (int c = 0; c < DIM; c++) send(mat[r][c]);
    for (int n = 0; n < NR; n++) begin send(W'(ai[n])); send(W'(aj[n])); end
    s_valid <= 1'b0;
    // results: slot s holds the last read r with r % NRB == s
    wait (done);
    @(posedge clk);
    checks++;
    if (got.size() != NRB * L) begin failures++; $display("FAIL %0d words out", got.size()); end
    for (int s = 0; s < NRB; s++) begin
      idx = ((NR - 1 - s) / NRB) * NRB + s;
      for (int k = 0; k < L && s * L + k < got.size(); k++) begin
        if (!(at[idx] == ACC_RE && (ai[idx] % P != 0) && (aj[idx] % Q != 0))) begin
          coord(at[idx], k, ai[idx], aj[idx], ci, cj);
          checks++;
          if (got[s * L + k] !== mat[ci][cj]) begin
            failures++;
            $display("FAIL slot %0d lane %0d read %0d: got %h exp %h", s, k, idx, got[s * L + k], mat[ci][cj]);
          end
        end
        checks++;
        if (got_last[s * L + k] !== (s == NRB - 1 && k == L - 1)) begin failures++; $display("FAIL m_last"); end
      end
    end
    got.delete(); got_last.delete();
    checks++;
    if (read_cycles != NR + 1) begin failures++; $display("FAIL read_cycles %0d exp %0d", read_cycles, NR + 1); end
    checks++;
    if (err_count != n_bad) begin failures++; $display("FAIL err_count %0d exp %0d", err_count, n_bad); end
    $display("run: read phase %0d cycles for %0d block reads, %0d flagged", read_cycles, NR, err_count);
  endtask

  initial begin
    s_valid = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(0);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog state=%0d row=%0d col=%0d n_coord=%0d", dut.state, dut.row, dut.col, dut.n_coord);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
