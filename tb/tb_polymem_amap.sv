// tb_polymem_amap: checks the in-bank address function.
//  1. 1 x 3 banks, 6 x 6 matrix: each bank holds 12 words and the address
//     of (i, j) is the row-major index of its 1 x 3 block, 2*i + j/3 (the
//     bank layout of the RoCo example: elements 1, 4, 7, 10, ... in turn).
//  2. Every scheme's bank map together with this address function places
//     each element of a 2 x 8 / 32 x 32 and of a 2 x 4 / 8 x 16 matrix in
//     its own (bank, address) slot, all addresses below N*M/(p*q).
module tb_polymem_amap;
  import polymem_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0] xi [3], xj [3];
  logic [3:0] xa [3];
  polymem_amap #(.P(1), .Q(3), .N(6), .M(6)) u_ex (.ei(xi), .ej(xj), .addr(xa));

  localparam int P = 2, Q = 8, N = 32, M = 32, L = 16, D = N * M / L;
  logic [4:0] ei [L], ej [L];
  logic [5:0] addr [L];
  logic [3:0] bk [5][L];
  polymem_amap #(.P(P), .Q(Q), .N(N), .M(M)) dut (.*);
  for (genvar s = 0; s < 5; s++) begin : g_s
    polymem_mmap #(.P(P), .Q(Q), .N(N), .M(M), .SCHEME(scheme_e'(s))) u_m (.ei(ei), .ej(ej), .bank(bk[s]));
  end

  initial begin
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j += 3) begin
        for (int k = 0; k < 3; k++) begin xi[k] = 3'(i); xj[k] = 3'(j + k); end
        #1;
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (xa[k] !== 4'(2 * i + j / 3)) begin
            failures++; $display("FAIL example (%0d,%0d): %0d", i, j + k, xa[k]);
          end
        end
      end
    for (int s = 0; s < 5; s++) begin
      bit used [L][D];
      for (int b = 0; b < L; b++) for (int a = 0; a < D; a++) used[b][a] = 0;
      for (int i = 0; i < N; i++) begin
        for (int k = 0; k < L; k++) ei[k] = 5'(i);
        for (int j0 = 0; j0 < M; j0 += L) begin
          for (int k = 0; k < L; k++) ej[k] = 5'(j0 + k);
          #1;
          for (int k = 0; k < L; k++) begin
            checks++;
            if (int'(addr[k]) >= D || used[bk[s][k]][addr[k]]) begin
              failures++;
              if (failures < 10) $display("FAIL scheme %0d (%0d,%0d) bank %0d addr %0d reused", s, i, j0 + k, bk[s][k], addr[k]);
            end else used[bk[s][k]][addr[k]] = 1;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
