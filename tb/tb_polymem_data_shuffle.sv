// tb_polymem_data_shuffle: random lane/bank permutations through both
// directions of the data shuffle: bank b must receive wdata[bank_sel[b]],
// lane k must receive bank_rdata[lane_bank[k]].
module tb_polymem_data_shuffle;
  localparam int L = 16, W = 64;
  logic [W-1:0] wdata [L], bank_wdata [L], bank_rdata [L], rdata [L];
  logic [3:0] bank_sel [L], lane_bank [L];
  int checks = 0, failures = 0;

  polymem_data_shuffle #(.L(L), .W(W)) dut (.*);

  initial begin
    int perm [L];
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < L; k++) perm[k] = k;
      perm.shuffle();
      for (int k = 0; k < L; k++) begin
        wdata[k] = {$urandom, $urandom};
        bank_rdata[k] = {$urandom, $urandom};
        bank_sel[k] = 4'(perm[k]);
        lane_bank[perm[k]] = 4'(k);
      end
      #1;
      for (int k = 0; k < L; k++) begin
        checks += 2;
        if (bank_wdata[k] !== wdata[perm[k]]) begin failures++; $display("FAIL write bank %0d", k); end
        if (rdata[perm[k]] !== bank_rdata[k]) begin failures++; $display("FAIL read lane %0d", perm[k]); end
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
