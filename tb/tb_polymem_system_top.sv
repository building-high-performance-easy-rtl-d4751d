// tb_polymem_system_top: end-to-end testbench of polymem_system_top at its
// full default size. Both kernels run at the same time:
//   - the microbenchmark kernel gets a random 96 x 96 matrix and 3072 anchors
//     (a few of them deliberately conflicting), performs its read phase and
//     returns 50 result blocks, checked against a model of the matrix; the
//     read phase must take 3073 cycles;
//   - the matrix kernel runs B x C, the mirrored pair B x C / C x B and A
//     squared once (h = 1) on random 96 x 96 integer matrices; every output
//     word is checked against a plain SystemVerilog product and each product
//     must take 96^3/16 + 1 cycles;
//   - the tiled matrix-power kernel squares a random 256 x 256 integer
//     matrix once on its 2 x 2 grid of 2 x 2-bank PolyMems; every output
//     word is checked and the squaring must take 256^3/16 + 1 cycles.
// It also counts how often each mechanism of the design happened: each
// access type of the benchmark, single-element masked writes, full block
// writes (copy-back), two-port reads, the mirrored product, all-tile parallel reads of the
// tiled kernel, flagged
// conflicts, input gaps and output back-pressure; one that never happened
// counts as a failure.
module tb_polymem_system_top;
  import polymem_pkg::*;
  localparam int DIM = 96, BL = 16, ML = 16, NR = 3072, NRB = 50, NBAD = 3;
  localparam int PROD_CYC = DIM * DIM * DIM / ML + 1;
  localparam int TDIM = 256, TB = 2, TL = 4;
  localparam int TPROD_CYC = TDIM * TDIM * TDIM / (TB * TB * TL) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bench_s_valid, bench_s_ready, bench_m_valid, bench_m_ready, bench_m_last, bench_done;
  logic [63:0] bench_s_data, bench_m_data;
  logic [31:0] bench_read_cycles, bench_err_count;
  logic mat_cmd_valid, mat_cmd_ready, mat_s_valid, mat_s_ready, mat_m_valid, mat_m_ready, mat_m_last, mat_done;
  mat_op_e mat_cmd_op;
  logic [7:0] mat_cmd_iters;
  logic [31:0] mat_s_data, mat_m_data, mat_compute_cycles, mat_err_count;
  logic pow_cmd_valid, pow_cmd_ready, pow_s_valid, pow_s_ready, pow_m_valid, pow_m_ready, pow_m_last, pow_done;
  logic [7:0] pow_cmd_iters;
  logic [31:0] pow_s_data, pow_m_data, pow_compute_cycles, pow_err_count;

  polymem_system_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- mechanism counters ----------------
  int n_acc [6];
  int n_single_wr, n_block_wr, n_dual_rd, n_mirror, n_conflict, n_in_gap, n_backpressure, n_pow_iter, n_grid_rd;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_bench.u_mem.req_valid[0] && !dut.u_bench.u_mem.req_we)
      n_acc[dut.u_bench.u_mem.req_acc[0]]++;
    if (dut.u_bench.u_mem.req_valid[0] && dut.u_bench.u_mem.req_we && dut.u_bench.u_mem.req_mask == 16'h0001)
      n_single_wr++;
    if (dut.u_mat.u_x.req_valid[0] && dut.u_mat.u_x.req_we && dut.u_mat.u_x.req_mask == 16'hffff)
      n_block_wr++;
    if (dut.u_mat.u_x.req_valid[0] && dut.u_mat.u_x.req_valid[1]) n_dual_rd++;
    if (dut.u_mat.u_y.req_valid[0] && !dut.u_mat.u_y.req_we && dut.u_mat.u_y.req_acc[0] == ACC_RO) n_mirror++;
    if (dut.u_bench.u_mem.req_err[0]) n_conflict++;
    if (!bench_s_valid && bench_s_ready) n_in_gap++;
    if ((bench_m_valid && !bench_m_ready) || (mat_m_valid && !mat_m_ready) || (pow_m_valid && !pow_m_ready)) n_backpressure++;
    if (dut.u_pow.g_ti[0].g_tk[0].u_tile.req_valid[1] && dut.u_pow.g_ti[0].g_tk[1].u_tile.req_valid[1] &&
        dut.u_pow.g_ti[1].g_tk[0].u_tile.req_valid[1] && dut.u_pow.g_ti[1].g_tk[1].u_tile.req_valid[1] &&
        (dut.u_pow.g_ti[0].g_tk[0].u_tile.req_valid[0] || dut.u_pow.g_ti[1].g_tk[0].u_tile.req_valid[0]))
      n_grid_rd++;
    if (dut.u_mat.state == 3'd5 && dut.u_mat.r == 0 && dut.u_mat.c == 0) n_pow_iter++;
  end

  // ---------------- benchmark kernel ----------------
  logic [63:0] bmat [DIM][DIM];
  int ai [NR], aj [NR];
  access_e at [NR];
  logic [63:0] bgot [$];
  bit bgot_last [$];

  always @(posedge clk) begin
    if (bench_m_valid && bench_m_ready) begin bgot.push_back(bench_m_data); bgot_last.push_back(bench_m_last); end
    bench_m_ready <= ($urandom_range(2) != 0);
  end

  function automatic void bcoord(access_e a, int k, int i, int j, output int ci, output int cj);
    case (a)
      ACC_RE: begin ci = i + k / 8; cj = j + k % 8; end
      ACC_RO: begin ci = i;         cj = j + k;     end
      default: begin ci = i + k;    cj = j;         end
    endcase
  endfunction

  function automatic bit bad_re(int n);
    return at[n] == ACC_RE && (ai[n] % 2 != 0) && (aj[n] % 8 != 0);
  endfunction

  task automatic bsend(logic [63:0] d);
    bench_s_valid <= 1'b1; bench_s_data <= d;
    do @(posedge clk); while (!bench_s_ready);
    if ($urandom_range(3) == 0) begin bench_s_valid <= 1'b0; @(posedge clk); end
  endtask

  task automatic bench_run();
    int ci, cj, idx, bad;
    bad = 0;
    for (int r = 0; r < DIM; r++) for (int c = 0; c < DIM; c++) bmat[r][c] = {$urandom, $urandom};
    for (int n = 0; n < NR; n++) begin
      at[n] = scheme_access(SCHEME_ROCO, n / (NR / 3));
      if (at[n] == ACC_RE && bad < NBAD && n % 11 == 0) begin
        ai[n] = 2 * $urandom_range(40) + 1; aj[n] = 8 * $urandom_range(9) + 5; bad++;
      end else
        forever begin
          ai[n] = $urandom_range(DIM - 1); aj[n] = $urandom_range(DIM - 1);
          bcoord(at[n], BL - 1, ai[n], aj[n], ci, cj);
          if (ci >= DIM || cj >= DIM || bad_re(n)) continue;
          break;
        end
    end
    for (int r = 0; r < DIM; r++) for (int c = 0; c < DIM; c++) bsend(bmat[r][c]);
    for (int n = 0; n < NR; n++) begin bsend(64'(ai[n])); bsend(64'(aj[n])); end
    bench_s_valid <= 1'b0;
    wait (bench_done);
    @(posedge clk);
    checks++;
    if (bgot.size() != NRB * BL) begin failures++; $display("FAIL bench: %0d words", bgot.size()); end
    for (int s = 0; s < NRB; s++) begin
      idx = ((NR - 1 - s) / NRB) * NRB + s;
      for (int k = 0; k < BL && s * BL + k < bgot.size(); k++) begin
        if (!bad_re(idx)) begin
          bcoord(at[idx], k, ai[idx], aj[idx], ci, cj);
          checks++;
          if (bgot[s * BL + k] !== bmat[ci][cj]) begin
            failures++; $display("FAIL bench slot %0d lane %0d", s, k);
          end
        end
        checks++;
        if (bgot_last[s * BL + k] !== (s == NRB - 1 && k == BL - 1)) begin failures++; $display("FAIL bench m_last"); end
      end
    end
    checks++;
    if (bench_read_cycles != NR + 1) begin failures++; $display("FAIL bench read_cycles %0d", bench_read_cycles); end
    checks++;
    if (bench_err_count != NBAD) begin failures++; $display("FAIL bench err_count %0d", bench_err_count); end
    $display("bench: %0d block reads in %0d cycles", NR, bench_read_cycles);
  endtask

  // ---------------- matrix kernel ----------------
  typedef logic [31:0] mat_t [DIM][DIM];
  mat_t ma, mb, me;
  logic [31:0] mgot [$];
  bit mgot_last [$];

  always @(posedge clk) begin
    if (mat_m_valid && mat_m_ready) begin mgot.push_back(mat_m_data); mgot_last.push_back(mat_m_last); end
    mat_m_ready <= ($urandom_range(3) != 0);
  end

  function automatic mat_t mul(mat_t x, mat_t y);
    mat_t z;
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        logic [31:0] s;
        s = '0;
        for (int k = 0; k < DIM; k++) s += x[i][k] * y[k][j];
        z[i][j] = s;
      end
    return z;
  endfunction

  task automatic msend(logic [31:0] d);
    mat_s_valid <= 1'b1; mat_s_data <= d;
    do @(posedge clk); while (!mat_s_ready);
  endtask

  task automatic mcompare(mat_t e, int base, string what);
    for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) begin
      checks++;
      if (mgot[base + i * DIM + j] !== e[i][j]) begin
        failures++;
        if (failures < 10) $display("FAIL %s (%0d,%0d)", what, i, j);
      end
    end
    checks++;
    if (mgot_last[base + DIM * DIM - 1] !== 1'b1) begin failures++; $display("FAIL m_last %s", what); end
  endtask

  task automatic mat_run(mat_op_e op, int h);
    int nprod;
    mgot.delete(); mgot_last.delete();
    mat_cmd_valid <= 1'b1; mat_cmd_op <= op; mat_cmd_iters <= 8'(h);
    do @(posedge clk); while (!mat_cmd_ready);
    mat_cmd_valid <= 1'b0;
    for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) ma[i][j] = 32'($urandom_range(200)) - 100;
    for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) mb[i][j] = 32'($urandom_range(200)) - 100;
    for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) msend(ma[i][j]);
    if (op != OP_POW) for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) msend(mb[i][j]);
    mat_s_valid <= 1'b0;
    wait (mat_done);
    @(posedge clk);
    case (op)
      OP_MM1: begin me = mul(ma, mb); mcompare(me, 0, "B x C"); nprod = 1; end
      OP_MM2: begin
        me = mul(ma, mb); mcompare(me, 0, "B x C");
        me = mul(mb, ma); mcompare(me, DIM * DIM, "C x B");
        nprod = 2;
      end
      default: begin
        me = ma;
        for (int n = 0; n < h; n++) me = mul(me, me);
        mcompare(me, 0, "A^2"); nprod = h;
      end
    endcase
    checks++;
    if (mat_compute_cycles != nprod * PROD_CYC) begin
      failures++; $display("FAIL compute_cycles %0d exp %0d", mat_compute_cycles, nprod * PROD_CYC);
    end
    checks++;
    if (mat_err_count != 0) begin failures++; $display("FAIL mat err_count"); end
    $display("matrix op %0d: %0d product(s) in %0d cycles", op, nprod, mat_compute_cycles);
  endtask

  // ---------------- tiled matrix-power kernel ----------------
  typedef logic [31:0] tmat_t [TDIM][TDIM];
  tmat_t ta, te;
  logic [31:0] tgot [$];
  bit tgot_last [$];

  always @(posedge clk) begin
    if (pow_m_valid && pow_m_ready) begin tgot.push_back(pow_m_data); tgot_last.push_back(pow_m_last); end
    pow_m_ready <= ($urandom_range(4) != 0);
  end

  task automatic pow_run();
    pow_cmd_valid <= 1'b1; pow_cmd_iters <= 8'd1;
    do @(posedge clk); while (!pow_cmd_ready);
    pow_cmd_valid <= 1'b0;
    for (int i = 0; i < TDIM; i++) for (int j = 0; j < TDIM; j++) ta[i][j] = 32'($urandom_range(200)) - 100;
    for (int i = 0; i < TDIM; i++) for (int j = 0; j < TDIM; j++) begin
      pow_s_valid <= 1'b1; pow_s_data <= ta[i][j];
      do @(posedge clk); while (!pow_s_ready);
    end
    pow_s_valid <= 1'b0;
    wait (pow_done);
    @(posedge clk);
    for (int i = 0; i < TDIM; i++)
      for (int j = 0; j < TDIM; j++) begin
        logic [31:0] s;
        s = '0;
        for (int k = 0; k < TDIM; k++) s += ta[i][k] * ta[k][j];
        te[i][j] = s;
      end
    checks++;
    if (tgot.size() != TDIM * TDIM) begin failures++; $display("FAIL pow: %0d words", tgot.size()); end
    for (int i = 0; i < TDIM; i++) for (int j = 0; j < TDIM; j++)
      if (i * TDIM + j < tgot.size()) begin
        checks++;
        if (tgot[i * TDIM + j] !== te[i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL pow (%0d,%0d)", i, j);
        end
      end
    checks++;
    if (tgot_last.size() != TDIM * TDIM || tgot_last[TDIM * TDIM - 1] !== 1'b1) begin failures++; $display("FAIL pow m_last"); end
    checks++;
    if (pow_compute_cycles != TPROD_CYC) begin
      failures++; $display("FAIL pow compute_cycles %0d exp %0d", pow_compute_cycles, TPROD_CYC);
    end
    checks++;
    if (pow_err_count != 0) begin failures++; $display("FAIL pow err_count"); end
    $display("tiled power: 1 squaring of %0d x %0d in %0d cycles", TDIM, TDIM, pow_compute_cycles);
  endtask

  initial begin
    bench_s_valid = 0; bench_s_data = '0;
    mat_cmd_valid = 0; mat_cmd_op = OP_MM1; mat_cmd_iters = 0; mat_s_valid = 0; mat_s_data = '0;
    pow_cmd_valid = 0; pow_cmd_iters = 0; pow_s_valid = 0; pow_s_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      bench_run();
      begin
        mat_run(OP_MM1, 0);
        mat_run(OP_MM2, 0);
        mat_run(OP_POW, 1);
      end
      pow_run();
    join
    begin
      string names [6] = '{"rectangle read", "row read", "column read", "main diagonal read",
                           "secondary diagonal read", "transposed read"};
      for (int a = 0; a < 3; a++) begin
        access_e t;
        t = scheme_access(SCHEME_ROCO, a);
        $display("mechanism %s: %0d", names[t], n_acc[t]);
        checks++; if (n_acc[t] == 0) begin failures++; $display("FAIL never: %s", names[t]); end
      end
    end
    $display("mechanism single-element masked write: %0d", n_single_wr);
    $display("mechanism full block write (copy-back): %0d", n_block_wr);
    $display("mechanism two-port read: %0d", n_dual_rd);
    $display("mechanism mirrored product read (C by rows): %0d", n_mirror);
    $display("mechanism flagged conflict: %0d", n_conflict);
    $display("mechanism input gap: %0d", n_in_gap);
    $display("mechanism output back-pressure: %0d", n_backpressure);
    $display("mechanism power iteration copy-back: %0d", n_pow_iter);
    $display("mechanism all-tile parallel read (tiled kernel): %0d", n_grid_rd);
    checks += 9;
    if (n_grid_rd == 0) begin failures++; $display("FAIL never: all-tile read"); end
    if (n_single_wr == 0) begin failures++; $display("FAIL never: single write"); end
    if (n_block_wr == 0) begin failures++; $display("FAIL never: block write"); end
    if (n_dual_rd == 0) begin failures++; $display("FAIL never: two-port read"); end
    if (n_mirror == 0) begin failures++; $display("FAIL never: mirrored product"); end
    if (n_conflict == 0) begin failures++; $display("FAIL never: conflict"); end
    if (n_in_gap == 0) begin failures++; $display("FAIL never: input gap"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL never: back-pressure"); end
    if (n_pow_iter == 0) begin failures++; $display("FAIL never: power copy-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
