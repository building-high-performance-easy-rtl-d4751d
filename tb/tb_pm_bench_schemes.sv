// tb_pm_bench_schemes: the microbenchmark workload (96 x 96 words of 64 bits,
// 2 x 8 banks, 3072 reads, 50 result blocks) run on kernels built with each
// of the five schemes, all at the same time. ReRo and ReCo reads include
// both diagonals; ReTr reads include the transposed 8 x 2 rectangle.
module tb_pm_bench_schemes;
  import polymem_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NI = 5;
  logic done [NI];
  int c [NI], f [NI];
  int checks, failures;

  bench_scheme_check #(.SCHEME(SCHEME_REO))  u0 (.clk, .rst_n, .done_chk(done[0]), .checks(c[0]), .failures(f[0]));
  bench_scheme_check #(.SCHEME(SCHEME_RERO)) u1 (.clk, .rst_n, .done_chk(done[1]), .checks(c[1]), .failures(f[1]));
  bench_scheme_check #(.SCHEME(SCHEME_RECO)) u2 (.clk, .rst_n, .done_chk(done[2]), .checks(c[2]), .failures(f[2]));
  bench_scheme_check #(.SCHEME(SCHEME_ROCO)) u3 (.clk, .rst_n, .done_chk(done[3]), .checks(c[3]), .failures(f[3]));
  bench_scheme_check #(.SCHEME(SCHEME_RETR)) u4 (.clk, .rst_n, .done_chk(done[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    checks = 0; failures = 0;
    for (int n = 0; n < NI; n++) begin checks += c[n]; failures += f[n]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    checks = 0; failures = 1;
    for (int n = 0; n < NI; n++) begin checks += c[n]; failures += f[n]; end
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
