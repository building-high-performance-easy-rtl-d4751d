// tb_polymem_bank: a 576 x 64-bit bank with two ports. Random writes on
// port 0 mixed with random reads on both ports, checked against a model one
// cycle later, including reads of the word written in the same cycle
// (read-first: the old word comes back).
module tb_polymem_bank;
  localparam int D = 576, W = 64, NRP = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [W-1:0] wdata;
  logic [9:0] raddr [NRP];
  logic [W-1:0] rdata [NRP];
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  polymem_bank #(.D(D), .W(W), .NRP(NRP)) dut (.*);

  initial begin
    logic [W-1:0] exp0, exp1;
    we = 1;
    for (int a = 0; a < D; a++) begin
      raddr[0] <= 10'(a); raddr[1] <= '0; wdata <= {$urandom, $urandom};
      @(posedge clk); #1;
      model[a] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      raddr[0] <= 10'($urandom_range(D - 1));
      raddr[1] <= (n % 5 == 0) ? raddr[0] : 10'($urandom_range(D - 1));
      we <= ($urandom_range(1) == 0);
      wdata <= {$urandom, $urandom};
      #1;
      exp0 = model[raddr[0]]; exp1 = model[raddr[1]];
      @(posedge clk); #1;
      if (we) model[raddr[0]] = wdata;
      checks += 2;
      if (rdata[0] !== exp0) begin failures++; if (failures < 10) $display("FAIL port 0 n=%0d", n); end
      if (rdata[1] !== exp1) begin failures++; if (failures < 10) $display("FAIL port 1 n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
