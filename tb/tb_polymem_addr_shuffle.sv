// tb_polymem_addr_shuffle: drives the address crossbar with random
// permutations of the 16 banks (every lane enabled, and random lane masks)
// and checks per bank the forwarded address, the lane index and the hit bit;
// then makes two enabled lanes name the same bank and expects conflict,
// and checks that the same clash on a masked-off lane is ignored.
module tb_polymem_addr_shuffle;
  localparam int L = 16, AW = 10;
  logic [3:0] bank [L];
  logic [AW-1:0] addr [L];
  logic [L-1:0] lane_en;
  logic [AW-1:0] bank_addr [L];
  logic [3:0] bank_sel [L];
  logic [L-1:0] bank_hit;
  logic conflict;
  int checks = 0, failures = 0;

  polymem_addr_shuffle #(.L(L), .AW(AW)) dut (.*);

  initial begin
    int perm [L];
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < L; k++) perm[k] = k;
      perm.shuffle();
      for (int k = 0; k < L; k++) begin bank[k] = 4'(perm[k]); addr[k] = AW'($urandom); end
      lane_en = (n % 2 == 0) ? '1 : L'($urandom);
      #1;
      checks++;
      if (conflict) begin failures++; $display("FAIL false conflict"); end
      for (int k = 0; k < L; k++) begin
        checks++;
        if (bank_hit[perm[k]] !== lane_en[k] ||
            (lane_en[k] && (bank_addr[perm[k]] !== addr[k] || bank_sel[perm[k]] !== 4'(k)))) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d bank %0d", k, perm[k]);
        end
      end
      // clash lanes 3 and 9
      bank[9] = bank[3];
      lane_en = '1;
      #1;
      checks++;
      if (!conflict) begin failures++; $display("FAIL conflict missed"); end
      lane_en[9] = 1'b0;
      #1;
      checks++;
      if (conflict) begin failures++; $display("FAIL masked lane counted"); end
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
