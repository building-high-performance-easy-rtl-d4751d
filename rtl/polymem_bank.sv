// polymem_bank: one memory bank (M_vh) of the PolyMem, a block-RAM style
// memory of D words of W bits.
//
// Port 0 reads or writes; ports 1..NRP-1 only read. Reads are synchronous:
// rdata[p] holds the word at raddr[p] of the previous cycle (one cycle of
// latency, like an FPGA block RAM with its output register off). A read of
// the word being written in the same cycle returns the old word
// (read-first). The memory is not reset. The number of ports is a build-time
// choice, as the document allows the number of read/write ports to be
// configured; the read-first behaviour is this design's choice.
module polymem_bank #(
  parameter int unsigned D   = 576,
  parameter int unsigned W   = 64,
  parameter int unsigned NRP = 1,
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr [NRP],  // raddr[0] is also the write address
  output logic [W-1:0]  rdata [NRP]
);

  logic [W-1:0] mem [D];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NRP; p++) rdata[p] <= mem[raddr[p]];
    if (we) mem[raddr[0]] <= wdata;
  end

endmodule
