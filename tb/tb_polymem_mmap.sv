// tb_polymem_mmap: checks the module-assignment function of every scheme:
// exhaustive conflict-freedom of the supported shapes (mmap_scheme_check) on
// 2 x 4 and 4 x 2 bank grids and on the 2 x 8 RoCo grid of the benchmark,
// plus the 1 x 3 RoCo example: a 6 x 6 matrix where the row access starting
// at element 8 (position (1,1)) and the column access starting at element 23
// (position (3,4)) each use all three banks.
module tb_polymem_mmap;
  import polymem_pkg::*;
  localparam int NI = 8;
  logic done [NI];
  int c [NI], f [NI];
  int checks, failures;

  mmap_scheme_check #(.SCHEME(SCHEME_REO))  u0 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  mmap_scheme_check #(.SCHEME(SCHEME_RERO)) u1 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  mmap_scheme_check #(.SCHEME(SCHEME_RECO)) u2 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  mmap_scheme_check #(.SCHEME(SCHEME_ROCO)) u3 (.done(done[3]), .checks(c[3]), .failures(f[3]));
  mmap_scheme_check #(.SCHEME(SCHEME_RETR)) u4 (.done(done[4]), .checks(c[4]), .failures(f[4]));
  mmap_scheme_check #(.SCHEME(SCHEME_RETR), .P(4), .Q(2), .N(16), .M(8)) u5 (.done(done[5]), .checks(c[5]), .failures(f[5]));
  mmap_scheme_check #(.SCHEME(SCHEME_RERO), .P(4), .Q(2), .N(16), .M(8)) u6 (.done(done[6]), .checks(c[6]), .failures(f[6]));
  mmap_scheme_check #(.SCHEME(SCHEME_ROCO), .P(2), .Q(8), .N(32), .M(32)) u7 (.done(done[7]), .checks(c[7]), .failures(f[7]));

  // the 1 x 3 RoCo example
  logic [2:0] ei [3];
  logic [2:0] ej [3];
  logic [1:0] bank [3];
  polymem_mmap #(.P(1), .Q(3), .N(6), .M(6), .SCHEME(SCHEME_ROCO)) u_ex (.*);

  initial begin
    int ex_checks, ex_fail;
    ex_checks = 0; ex_fail = 0;
    for (int k = 0; k < 3; k++) begin ei[k] = 3'd1; ej[k] = 3'(1 + k); end
    #1;
    ex_checks++;
    if (bank[0] == bank[1] || bank[0] == bank[2] || bank[1] == bank[2]) begin ex_fail++; $display("FAIL example row"); end
    for (int k = 0; k < 3; k++) begin ei[k] = 3'(3 + k); ej[k] = 3'd4; end
    #1;
    ex_checks++;
    if (bank[0] == bank[1] || bank[0] == bank[2] || bank[1] == bank[2]) begin ex_fail++; $display("FAIL example column"); end
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7]);
    checks = ex_checks; failures = ex_fail;
    for (int n = 0; n < NI; n++) begin checks += c[n]; failures += f[n]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
