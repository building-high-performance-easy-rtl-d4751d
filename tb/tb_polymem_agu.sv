// tb_polymem_agu: checks the AGU's element coordinates and out-of-range
// flags for every access type at every anchor of an 8 x 16 matrix with
// 2 x 4 lanes, against the shapes written out directly in the testbench.
module tb_polymem_agu;
  import polymem_pkg::*;
  localparam int P = 2, Q = 4, N = 8, M = 16, L = P * Q;
  logic [2:0] i;
  logic [3:0] j;
  access_e acc;
  logic [2:0] ei [L];
  logic [3:0] ej [L];
  logic [L-1:0] out_of_range;
  int checks = 0, failures = 0;

  polymem_agu #(.P(P), .Q(Q), .N(N), .M(M)) dut (.*);

  initial begin
    for (int a = 0; a < 6; a++)
      for (int ii = 0; ii < N; ii++)
        for (int jj = 0; jj < M; jj++) begin
          acc = access_e'(a); i = 3'(ii); j = 4'(jj);
          #1;
          for (int k = 0; k < L; k++) begin
            int ci, cj; bit o;
            case (a)
              0: begin ci = ii + k / Q; cj = jj + k % Q; end
              1: begin ci = ii;         cj = jj + k;     end
              2: begin ci = ii + k;     cj = jj;         end
              3: begin ci = ii + k;     cj = jj + k;     end
              4: begin ci = ii + k;     cj = jj - k;     end
              default: begin ci = ii + k / P; cj = jj + k % P; end
            endcase
            o = ci >= N || cj < 0 || cj >= M;
            checks++;
            if (out_of_range[k] !== o || (!o && (ei[k] !== 3'(ci) || ej[k] !== 4'(cj)))) begin
              failures++;
              if (failures < 10) $display("FAIL acc %0d (%0d,%0d) lane %0d: got (%0d,%0d,%b) exp (%0d,%0d,%b)",
                                          a, ii, jj, k, ei[k], ej[k], out_of_range[k], ci, cj, o);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
