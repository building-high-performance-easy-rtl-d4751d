// polymem_data_shuffle: Read/Write Data Shuffle of the PolyMem.
//
// Write direction: bank b receives the data of the lane the address shuffle
// assigned to it, bank_wdata[b] = wdata[bank_sel[b]].
// Read direction: lane k receives the word read from the bank that holds its
// element, rdata[k] = bank_rdata[lane_bank[k]]. lane_bank must be the bank
// map of the access whose data is coming back, i.e. delayed by the bank read
// latency (the "Read Delay" path of the block diagram); the caller does
// that. Both directions are plain p*q-to-1 multiplexers per output, so the
// user always sees the elements in the order of the access shape.
module polymem_data_shuffle #(
  parameter int unsigned L = 16,
  parameter int unsigned W = 64,
  localparam int unsigned BW = (L > 1) ? $clog2(L) : 1
) (
  // write direction
  input  logic [W-1:0]  wdata      [L],
  input  logic [BW-1:0] bank_sel   [L],
  output logic [W-1:0]  bank_wdata [L],
  // read direction
  input  logic [W-1:0]  bank_rdata [L],
  input  logic [BW-1:0] lane_bank  [L],
  output logic [W-1:0]  rdata      [L]
);

  always_comb begin
    for (int b = 0; b < L; b++) bank_wdata[b] = wdata[bank_sel[b]];
    for (int k = 0; k < L; k++) rdata[k] = bank_rdata[lane_bank[k]];
  end

endmodule
