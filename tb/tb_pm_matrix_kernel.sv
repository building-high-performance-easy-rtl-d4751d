// tb_pm_matrix_kernel: self-checking testbench of the matrix kernel. Two
// sizes run side by side through matrix_check, each against a software
// model with a cycle-count check (DIM^3/(P*Q) + 1 cycles per product):
//   - DIM = 32, 2 x 2 banks, 8 fraction bits: OP_MM1, OP_MM2 and OP_POW
//     (h = 2), the small matrix-multiplication configuration;
//   - DIM = 384, 4 x 4 banks: one squaring (OP_POW, h = 1), one of the
//     eight of the single-PolyMem 384 x 384 matrix-power workload at full
//     size (3538945 cycles).
module tb_pm_matrix_kernel;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NI = 2;
  logic done [NI];
  int c [NI], f [NI];
  int checks = 0, failures = 0;

  matrix_check #(.DIM(32), .P(2), .Q(2), .FRAC(8), .ALL_OPS(1'b1))
    u0 (.clk, .rst_n, .done_chk(done[0]), .checks(c[0]), .failures(f[0]));
  matrix_check #(.DIM(384), .P(4), .Q(4), .FRAC(0), .ALL_OPS(1'b0))
    u1 (.clk, .rst_n, .done_chk(done[1]), .checks(c[1]), .failures(f[1]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    for (int n = 0; n < NI; n++) begin checks += c[n]; failures += f[n]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4500000) @(posedge clk);
    for (int n = 0; n < NI; n++) begin checks += c[n]; failures += f[n]; end
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
