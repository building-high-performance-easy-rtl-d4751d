// tb_pm_tiled_power_kernel: self-checking testbench of the tiled matrix-power
// kernel. Three grid shapes run side by side through tiled_power_check,
// each against a software model with a cycle-count check:
//   - DIM = 32, p = q = b = 2, 8 fraction bits, h = 0 (counted as 1), 1, 3;
//   - DIM = 32, p = q = 1, b = 4 (single-bank tiles), h = 1;
//   - DIM = 384, p = q = b = 2, h = 1: one of the eight squarings of the
//     384 x 384 matrix-power workload at full size (3538945 cycles).
module tb_pm_tiled_power_kernel;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NI = 3;
  logic done [NI];
  int c [NI], f [NI];
  int checks = 0, failures = 0;

  tiled_power_check #(.DIM(32), .P(2), .Q(2), .B(2), .FRAC(8), .NRUN(3), .HS({8'd3, 8'd1, 8'd0}))
    u0 (.clk, .rst_n, .done_chk(done[0]), .checks(c[0]), .failures(f[0]));
  tiled_power_check #(.DIM(32), .P(1), .Q(1), .B(4), .FRAC(8), .NRUN(1), .HS(24'd1))
    u1 (.clk, .rst_n, .done_chk(done[1]), .checks(c[1]), .failures(f[1]));
  tiled_power_check #(.DIM(384), .P(2), .Q(2), .B(2), .FRAC(0), .NRUN(1), .HS(24'd1))
    u2 (.clk, .rst_n, .done_chk(done[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
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
