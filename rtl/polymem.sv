// polymem: polymorphic parallel memory.
//
// Holds an N x M matrix of W-bit words in P x Q memory banks. Every cycle each
// access port can read (and port 0 can alternatively write) P*Q elements whose
// shape is chosen at run time by an access type (rectangle, row, column, main
// or secondary diagonal, transposed rectangle) anchored at (i, j). The
// build-time SCHEME decides how elements are spread over the banks and so
// which shapes are conflict-free (see polymem_pkg); with a supported shape
// any anchor works, aligned or not (RoCo rectangles: see README).
//
// Datapath per port, as in the PRF block diagram: AGU (element coordinates)
// -> m (bank of each element) and A (address in the bank) -> address shuffle
// (per-bank address, bank write enables) -> banks; write data goes through
// the data shuffle into bank order, read data comes back through the data
// shuffle into lane order using the bank map delayed by one cycle (the "read
// delay").
//
// Interface (per port p):
//   req_valid[p], req_i[p], req_j[p], req_acc[p]   access request
//   req_we, req_mask, req_wdata                     port 0 only: write enable,
//        per-lane write mask (write_block_masked; all ones = write_block;
//        only lane 0 set = single-element write) and lane-ordered data
//   req_err[p]    combinational: the request touches a bank twice or an
//                 element outside the matrix (masked-off lanes are ignored)
//   rsp_valid[p], rsp_data[p][k]  read data, lane k = k-th element of the
//                 shape, one cycle after the request. A single-element read
//                 is any read, using lane 0.
// Timing: one access per port per cycle, read latency 1 cycle, fully
// pipelined. Port 0 reads or writes; ports 1..NRP-1 only read. A read and a
// write of the same element in the same cycle return the old value.
// The request/response signalling, the error flag and read latency are this
// design's choices; the lane-ordered interface follows the read_block /
// write_block / write_block_masked methods of the HLS library.
module polymem
  import polymem_pkg::*;
#(
  parameter int unsigned W   = 64,
  parameter int unsigned P   = 2,
  parameter int unsigned Q   = 8,
  parameter int unsigned N   = 96,
  parameter int unsigned M   = 96,
  parameter scheme_e SCHEME  = SCHEME_ROCO,
  parameter int unsigned NRP = 1,
  localparam int unsigned L  = P * Q,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned JW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned BW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned D  = (N * M) / L,
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid [NRP],
  input  logic [IW-1:0] req_i     [NRP],
  input  logic [JW-1:0] req_j     [NRP],
  input  access_e       req_acc   [NRP],
  input  logic          req_we,
  input  logic [L-1:0]  req_mask,
  input  logic [W-1:0]  req_wdata [L],
  output logic          req_err   [NRP],
  output logic          rsp_valid [NRP],
  output logic [W-1:0]  rsp_data  [NRP][L]
);

  initial begin
    assert (N % P == 0 && M % Q == 0)
      else $error("polymem: P must divide N and Q must divide M");
  end

  logic [AW-1:0] bank_addr [NRP][L];
  logic [L-1:0]  bank_hit0;
  logic [W-1:0]  bank_wdata [L];
  logic [W-1:0]  bank_rdata [NRP][L];

  for (genvar p = 0; p < NRP; p++) begin : g_port
    logic [IW-1:0] ei [L];
    logic [JW-1:0] ej [L];
    logic [L-1:0]  oob;
    logic [BW-1:0] lbank [L];
    logic [AW-1:0] laddr [L];
    logic [L-1:0]  lane_en;
    logic [BW-1:0] bsel [L];
    logic [L-1:0]  bhit;
    logic          conflict;
    logic [BW-1:0] lbank_q [L];   // read delay of the bank map
    logic [W-1:0]  rd_lane [L];
    logic [W-1:0]  shuf_wdata [L];

    polymem_agu #(.P(P), .Q(Q), .N(N), .M(M)) u_agu (
      .i(req_i[p]), .j(req_j[p]), .acc(req_acc[p]),
      .ei(ei), .ej(ej), .out_of_range(oob));

    polymem_mmap #(.P(P), .Q(Q), .N(N), .M(M), .SCHEME(SCHEME)) u_m (
      .ei(ei), .ej(ej), .bank(lbank));

    polymem_amap #(.P(P), .Q(Q), .N(N), .M(M)) u_a (
      .ei(ei), .ej(ej), .addr(laddr));

    // Only port 0 writes, and only its masked lanes take part in a write.
    assign lane_en = (p == 0 && req_we) ? req_mask : '1;

    polymem_addr_shuffle #(.L(L), .AW(AW)) u_ash (
      .bank(lbank), .addr(laddr), .lane_en(lane_en),
      .bank_addr(bank_addr[p]), .bank_sel(bsel), .bank_hit(bhit),
      .conflict(conflict));

    assign req_err[p] = req_valid[p] && (conflict || |(oob & lane_en));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rsp_valid[p] <= 1'b0;
        for (int k = 0; k < L; k++) lbank_q[k] <= '0;
      end else begin
        rsp_valid[p] <= req_valid[p] && !(p == 0 && req_we);
        lbank_q      <= lbank;
      end
    end

    if (p == 0) begin : g_wr
      assign bank_hit0 = bhit;
    end

    // The write half of the port-0 shuffle feeds the banks; the other ports
    // use only the read half.
    polymem_data_shuffle #(.L(L), .W(W)) u_dsh (
      .wdata(req_wdata), .bank_sel(bsel), .bank_wdata(shuf_wdata),
      .bank_rdata(bank_rdata[p]), .lane_bank(lbank_q), .rdata(rd_lane));

    if (p == 0) begin : g_wdata
      assign bank_wdata = shuf_wdata;
    end

    assign rsp_data[p] = rd_lane;
  end

  for (genvar b = 0; b < L; b++) begin : g_bank
    logic [AW-1:0] ra [NRP];
    logic [W-1:0]  rd [NRP];
    for (genvar p = 0; p < NRP; p++) begin : g_p
      assign ra[p] = bank_addr[p][b];
      assign bank_rdata[p][b] = rd[p];
    end
    polymem_bank #(.D(D), .W(W), .NRP(NRP)) u_bank (
      .clk(clk),
      .we(req_valid[0] && req_we && bank_hit0[b]),
      .wdata(bank_wdata[b]),
      .raddr(ra), .rdata(rd));
  end

endmodule
