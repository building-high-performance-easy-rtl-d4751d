// polymem_addr_shuffle: Read/Write Address Shuffle of the PolyMem.
//
// The AGU/m/A stage produces, for every lane k of an access, the bank that
// holds element k (bank[k]) and its address inside that bank (addr[k]). This
// crossbar turns that lane-ordered view into a bank-ordered one: for every
// bank b it finds the enabled lane whose element lives in b and forwards that
// lane's address (bank_addr[b]), its index (bank_sel[b], used by the data
// shuffle to route write data) and a hit bit (bank_hit[b], used as the bank
// write enable for writes). An access is conflict-free when no two enabled
// lanes name the same bank; otherwise conflict is raised and the highest
// numbered lane wins the bank. Lanes with lane_en low (masked-off lanes of a
// masked write) take no bank. Purely combinational, a p*q x p*q crossbar.
// The conflict output is this design's own addition.
module polymem_addr_shuffle #(
  parameter int unsigned L  = 16,
  parameter int unsigned AW = 10,
  localparam int unsigned BW = (L > 1) ? $clog2(L) : 1
) (
  input  logic [BW-1:0] bank      [L],
  input  logic [AW-1:0] addr      [L],
  input  logic [L-1:0]  lane_en,
  output logic [AW-1:0] bank_addr [L],
  output logic [BW-1:0] bank_sel  [L],
  output logic [L-1:0]  bank_hit,
  output logic          conflict
);

  always_comb begin
    conflict = 1'b0;
    for (int b = 0; b < L; b++) begin
      bank_addr[b] = '0;
      bank_sel[b]  = '0;
      bank_hit[b]  = 1'b0;
      for (int k = 0; k < L; k++) begin
        if (lane_en[k] && (int'(bank[k]) == b)) begin
          if (bank_hit[b]) conflict = 1'b1;
          bank_hit[b]  = 1'b1;
          bank_addr[b] = addr[k];
          bank_sel[b]  = BW'(k);
        end
      end
    end
  end

endmodule
