// tiled_power_check: one pm_tiled_power_kernel instance with its checker,
// used by tb_pm_tiled_power_kernel to run several grid shapes at once.
// For each of the NRUN squaring counts in HS (8 bits each, low byte first)
// it streams in a random DIM x DIM matrix, waits for done, compares every
// output word and m_last against A^(2^h) computed in plain SystemVerilog
// with the kernel's fixed-point rule (each product shifted right by FRAC,
// W-bit wrap; h = 0 counts as 1), checks compute_cycles against
// DIM^3/(B*B*P*Q) + 1 cycles per squaring and that no access was flagged.
// Input gaps and output back-pressure are random. done_chk rises when all
// runs are over; checks and failures hold the totals.
module tiled_power_check
  import polymem_pkg::*;
#(
  parameter int DIM  = 32,
  parameter int P    = 2,
  parameter int Q    = 2,
  parameter int B    = 2,
  parameter int FRAC = 8,
  parameter int NRUN = 3,
  parameter logic [23:0] HS = {8'd3, 8'd1, 8'd0}
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_chk,
  output int   checks,
  output int   failures
);
  localparam int W = 32, L = P * Q;
  localparam int PROD_CYC = DIM * DIM * DIM / (B * B * L) + 1;


  logic cmd_valid, cmd_ready, s_valid, s_ready, m_valid, m_ready, m_last, done;
  logic [7:0] cmd_iters;
  logic [W-1:0] s_data, m_data;
  logic [31:0] compute_cycles, err_count;

  pm_tiled_power_kernel #(.W(W), .DIM(DIM), .P(P), .Q(Q), .B(B), .FRAC(FRAC)) dut (.*);

  typedef logic [W-1:0] mat_t [DIM][DIM];
  mat_t a, b, e;
  logic [W-1:0] got [$];
  bit got_last [$];

  always @(posedge clk) begin
    if (m_valid && m_ready) begin got.push_back(m_data); got_last.push_back(m_last); end
    m_ready <= ($urandom_range(3) != 0);
  end

  function automatic mat_t mul(mat_t x, mat_t y);
    mat_t z;
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        logic [W-1:0] s;
        s = '0;
        for (int k = 0; k < DIM; k++)
          s += W'((longint'($signed(x[i][k])) * longint'($signed(y[k][j]))) >>> FRAC);
        z[i][j] = s;
      end
    return z;
  endfunction

  task automatic send(logic [W-1:0] d);
    s_valid <= 1'b1; s_data <= d;
    do @(posedge clk); while (!s_ready);
    if ($urandom_range(4) == 0) begin s_valid <= 1'b0; @(posedge clk); end
  endtask

  task automatic rand_mat(output mat_t m);
    for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++)
      m[i][j] = W'($signed($urandom_range(1023)) - 512);
  endtask

  task automatic compare(mat_t exp_m, int base, string what);
    for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) begin
      int n;
      n = base + i * DIM + j;
      checks++;
      if (got[n] !== exp_m[i][j]) begin
        failures++;
        if (failures < 10) $display("FAIL %s (%0d,%0d): got %h exp %h", what, i, j, got[n], exp_m[i][j]);
      end
      checks++;
      if (got_last[n] !== (i == DIM - 1 && j == DIM - 1)) begin failures++; $display("FAIL m_last %s", what); end
    end
  endtask

  task automatic run(int h);
    int nprod;
    got.delete(); got_last.delete();
    @(posedge clk);
    cmd_valid <= 1'b1; cmd_iters <= 8'(h);
    do @(posedge clk); while (!cmd_ready);
    cmd_valid <= 1'b0;
    rand_mat(a);
    for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) send(a[i][j]);
    s_valid <= 1'b0;
    wait (done);
    @(posedge clk);
    nprod = (h == 0) ? 1 : h;
    e = a;
    for (int n = 0; n < nprod; n++) e = mul(e, e);
    compare(e, 0, "A^(2^h)");
    checks++;
    if (got.size() != DIM * DIM) begin failures++; $display("FAIL %0d words out", got.size()); end
    checks++;
    if (compute_cycles != nprod * PROD_CYC) begin
      failures++; $display("FAIL compute_cycles %0d exp %0d", compute_cycles, nprod * PROD_CYC);
    end
    checks++;
    if (err_count != 0) begin failures++; $display("FAIL err_count %0d", err_count); end
    $display("h=%0d: %0d squarings in %0d cycles", h, nprod, compute_cycles);
  endtask

  initial begin
    cmd_valid = 0; cmd_iters = 0; s_valid = 0; s_data = '0;
    checks = 0; failures = 0; done_chk = 1'b0;
    wait (rst_n);
    for (int n = 0; n < NRUN; n++) run(int'(HS[8*n +: 8]));
    done_chk = 1'b1;
  end
endmodule
