// tb_polymem: self-checking testbench of the polymorphic parallel memory.
// Runs polymem_scheme_check on every scheme (2 x 4 banks, 8 x 16 matrix,
// two read ports), on ReTr with a tall 4 x 2 grid, and on the default
// 2 x 8 bank RoCo build holding 96 x 96 words of 64 bits.
module tb_polymem;
  import polymem_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NI = 7;
  logic done [NI];
  int   c    [NI];
  int   f    [NI];

  polymem_scheme_check #(.SCHEME(SCHEME_REO))  u0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  polymem_scheme_check #(.SCHEME(SCHEME_RERO)) u1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  polymem_scheme_check #(.SCHEME(SCHEME_RECO)) u2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  polymem_scheme_check #(.SCHEME(SCHEME_ROCO)) u3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  polymem_scheme_check #(.SCHEME(SCHEME_RETR)) u4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  polymem_scheme_check #(.SCHEME(SCHEME_RETR), .P(4), .Q(2), .N(16), .M(8)) u5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));
  polymem_scheme_check #(.SCHEME(SCHEME_ROCO), .P(2), .Q(8), .N(96), .M(96), .W(64), .NRP(1), .NOPS(400))
    u6 (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]));

  int checks, failures;

  task automatic report();
    checks = 0; failures = 0;
    for (int n = 0; n < NI; n++) begin checks += c[n]; failures += f[n]; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(posedge clk) begin
    bit all;
    all = 1;
    for (int n = 0; n < NI; n++) all &= done[n];
    if (all && rst_n) begin
      report();
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    report();
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
