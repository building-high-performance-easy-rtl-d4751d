// bench_scheme_check: one full microbenchmark experiment on a
// pm_bench_kernel built with the given scheme, used by tb_pm_bench_schemes.
// A random matrix and random anchors valid for each chunk's access type go
// in; the result blocks coming out are compared with the testbench's own
// copy of the matrix read along the access shape; the read phase must last
// N_READS + 1 cycles and no read may be flagged.
module bench_scheme_check
  import polymem_pkg::*;
#(
  parameter scheme_e SCHEME = SCHEME_RERO,
  parameter int DIM = 96,
  parameter int P = 2,
  parameter int Q = 8,
  parameter int NR = 3072,
  parameter int NRB = 50
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_chk,
  output int   checks,
  output int   failures
);
  localparam int W = 64, L = P * Q;

  logic s_valid, s_ready, m_valid, m_ready, m_last, done;
  logic [W-1:0] s_data, m_data;
  logic [31:0] read_cycles, err_count;

  pm_bench_kernel #(.W(W), .DIM(DIM), .P(P), .Q(Q), .SCHEME(SCHEME), .N_READS(NR),
                    .N_RESULTS_BLOCKS(NRB)) dut (.*);

  logic [W-1:0] mat [DIM][DIM];
  int ai [NR], aj [NR];
  access_e at [NR];
  logic [W-1:0] got [$];

  always @(posedge clk) begin
    if (m_valid && m_ready) got.push_back(m_data);
    m_ready <= ($urandom_range(3) != 0);
  end

  function automatic bit coord(access_e a, int k, int i, int j, output int ci, output int cj);
    case (a)
      ACC_RE: begin ci = i + k / Q; cj = j + k % Q; end
      ACC_RO: begin ci = i;         cj = j + k;     end
      ACC_CO: begin ci = i + k;     cj = j;         end
      ACC_MD: begin ci = i + k;     cj = j + k;     end
      ACC_SD: begin ci = i + k;     cj = j - k;     end
      default: begin ci = i + k / P; cj = j + k % P; end
    endcase
    return ci >= 0 && ci < DIM && cj >= 0 && cj < DIM;
  endfunction

  task automatic send(logic [W-1:0] d);
    s_valid <= 1'b1; s_data <= d;
    do @(posedge clk); while (!s_ready);
  endtask

  initial begin
    int nt, chunk, ci, cj, idx;
    bit ok;
    done_chk = 0; checks = 0; failures = 0;
    s_valid = 0; s_data = '0;
    nt = scheme_num_access(SCHEME);
    chunk = NR / nt;
    for (int r = 0; r < DIM; r++) for (int c = 0; c < DIM; c++) mat[r][c] = {$urandom, $urandom};
    for (int n = 0; n < NR; n++) begin
      at[n] = scheme_access(SCHEME, (n / chunk < nt) ? n / chunk : nt - 1);
      do begin
        ai[n] = $urandom_range(DIM - 1); aj[n] = $urandom_range(DIM - 1);
        ok = 1;
        for (int k = 0; k < L; k++) ok &= coord(at[n], k, ai[n], aj[n], ci, cj);
        if (SCHEME == SCHEME_ROCO && at[n] == ACC_RE && ai[n] % P != 0 && aj[n] % Q != 0) ok = 0;
      end while (!ok);
    end
    @(posedge rst_n);
    @(posedge clk);
    for (int r = 0; r < DIM; r++) for (int c = 0; c < DIM; c++) send(mat[r][c]);
    for (int n = 0; n < NR; n++) begin send(W'(ai[n])); send(W'(aj[n])); end
    s_valid <= 1'b0;
    wait (done);
    @(posedge clk);
    checks++;
    if (got.size() != NRB * L) begin failures++; $display("FAIL scheme %0d: %0d words", SCHEME, got.size()); end
    for (int s = 0; s < NRB; s++) begin
      idx = ((NR - 1 - s) / NRB) * NRB + s;
      for (int k = 0; k < L && s * L + k < got.size(); k++) begin
        void'(coord(at[idx], k, ai[idx], aj[idx], ci, cj));
        checks++;
        if (got[s * L + k] !== mat[ci][cj]) begin
          failures++;
          if (failures < 5) $display("FAIL scheme %0d slot %0d lane %0d", SCHEME, s, k);
        end
      end
    end
    checks += 2;
    if (read_cycles != NR + 1) begin failures++; $display("FAIL scheme %0d read_cycles %0d", SCHEME, read_cycles); end
    if (err_count != 0) begin failures++; $display("FAIL scheme %0d err_count %0d", SCHEME, err_count); end
    $display("scheme %0d: %0d block reads of %0d access types in %0d cycles", SCHEME, NR, nt, read_cycles);
    done_chk = 1;
  end
endmodule
