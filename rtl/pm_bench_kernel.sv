// pm_bench_kernel: read-bandwidth microbenchmark kernel around one PolyMem.
//
// It is the "computational kernel" of the measurement set-up: a memory
// filled from an input stream (phase 1), a burst of parallel block reads
// (phase 2, the part whose bandwidth is measured) and a result buffer whose
// blocks are sent back on an output stream (phase 3). The phases never
// overlap.
//   phase 1  s_data carries DIM*DIM matrix words in row-major order, written
//            one element per cycle (masked single-element writes), then
//            2*N_READS words holding the read anchors i0, j0, i1, j1, ...
//            (integer in the low bits of the word).
//   phase 2  N_READS block reads, one per cycle, back to back. The reads are
//            split into equal chunks, one per access type the scheme
//            supports, in the order of polymem_pkg::scheme_access(); chunk
//            = N_READS / (number of types), any remainder goes to the last
//            type. Read r lands in result slot r mod N_RESULTS_BLOCKS.
//   phase 3  the N_RESULTS_BLOCKS result blocks go out on m_data, slot 0
//            first, lane 0 first within a block; m_last marks the final word.
// Streams are valid/ready (AXI-Stream style, a word moves when both are
// high). After phase 3 the kernel waits for the next phase-1 stream.
// read_cycles counts the cycles of phase 2, from the first read request to
// the last read response (N_READS + 1 when nothing stalls); err_count counts
// reads the memory flagged as conflicting or out of range.
// The phase structure, the counts and the Table-2 sizes follow the
// benchmark; the slot rule, the word format of the anchors, the stream
// handshake and the two counters are this design's choices.
module pm_bench_kernel
  import polymem_pkg::*;
#(
  parameter int unsigned W      = 64,
  parameter int unsigned DIM    = 96,
  parameter int unsigned P      = 2,
  parameter int unsigned Q      = 8,
  parameter scheme_e     SCHEME = SCHEME_ROCO,
  parameter int unsigned N_READS = 3072,
  parameter int unsigned N_RESULTS_BLOCKS = 50,
  localparam int unsigned L   = P * Q,
  localparam int unsigned CW  = (DIM > 1) ? $clog2(DIM) : 1,
  localparam int unsigned RW  = $clog2(N_READS + 1),
  localparam int unsigned SW  = (N_RESULTS_BLOCKS > 1) ? $clog2(N_RESULTS_BLOCKS) : 1,
  localparam int unsigned OW  = $clog2(N_RESULTS_BLOCKS * L + 1),
  localparam int unsigned LW  = (L > 1) ? $clog2(L) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [W-1:0] s_data,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [W-1:0] m_data,
  output logic         m_last,
  output logic         done,         // one-cycle pulse at the end of phase 3
  output logic [31:0]  read_cycles,
  output logic [31:0]  err_count
);

  localparam int unsigned NT    = scheme_num_access(SCHEME);
  localparam int unsigned CHUNK = N_READS / NT;

  typedef enum logic [2:0] {S_LOAD, S_COORD, S_READ, S_DRAIN, S_OUT} state_e;
  state_e state;

  // ---- the parallel memory, one access port ----
  logic          req_valid [1];
  logic [CW-1:0] req_i     [1];
  logic [CW-1:0] req_j     [1];
  access_e       req_acc   [1];
  logic          req_we;
  logic [L-1:0]  req_mask;
  logic [W-1:0]  req_wdata [L];
  logic          req_err   [1];
  logic          rsp_valid [1];
  logic [W-1:0]  rsp_data  [1][L];

  polymem #(.W(W), .P(P), .Q(Q), .N(DIM), .M(DIM), .SCHEME(SCHEME), .NRP(1)) u_mem (
    .clk, .rst_n, .req_valid, .req_i, .req_j, .req_acc, .req_we, .req_mask,
    .req_wdata, .req_err, .rsp_valid, .rsp_data);

  // ---- anchor store and result buffer ----
  logic [CW-1:0] coord_i [N_READS];
  logic [CW-1:0] coord_j [N_READS];
  logic [W-1:0]  result  [N_RESULTS_BLOCKS][L];

  logic [CW-1:0] row, col;        // phase-1 fill position
  logic          coord_half;      // 0: next word is i, 1: next word is j
  logic [RW-1:0] n_issued, n_coord, type_chunk_cnt;
  logic [$clog2(NT+1)-1:0] type_idx;
  logic [SW-1:0] wr_slot, out_slot;
  logic [LW-1:0] out_lane;
  logic [OW-1:0] n_out;

  wire issue = (state == S_READ);
  wire s_fire = s_valid && s_ready;
  wire m_fire = m_valid && m_ready;

  assign s_ready = (state == S_LOAD) || (state == S_COORD);

  always_comb begin
    req_valid[0] = 1'b0;
    req_we       = 1'b0;
    req_mask     = '0;
    req_i[0]     = row;
    req_j[0]     = col;
    req_acc[0]   = ACC_RE;
    for (int k = 0; k < L; k++) req_wdata[k] = s_data;
    if (state == S_LOAD) begin
      req_valid[0] = s_valid;
      req_we       = 1'b1;
      req_mask     = L'(1);
    end else if (issue) begin
      req_valid[0] = 1'b1;
      req_i[0]     = coord_i[n_issued];
      req_j[0]     = coord_j[n_issued];
      req_acc[0]   = scheme_access(SCHEME, 32'(type_idx));
    end
  end

  assign m_valid = (state == S_OUT);
  assign m_data  = result[out_slot][out_lane];
  assign m_last  = (state == S_OUT) && (n_out == OW'(N_RESULTS_BLOCKS * L - 1));

  always_ff @(posedge clk) begin
    if (state == S_COORD && s_fire) begin
      if (!coord_half) coord_i[n_coord] <= CW'(s_data);
      else             coord_j[n_coord] <= CW'(s_data);
    end
    if (rsp_valid[0]) result[wr_slot] <= rsp_data[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      row <= '0; col <= '0; coord_half <= 1'b0;
      n_issued <= '0; n_coord <= '0; type_idx <= '0; type_chunk_cnt <= '0;
      wr_slot <= '0; out_slot <= '0; out_lane <= '0; n_out <= '0;
      read_cycles <= '0; err_count <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (rsp_valid[0])
        wr_slot <= (wr_slot == SW'(N_RESULTS_BLOCKS - 1)) ? '0 : wr_slot + 1'b1;
      case (state)
        S_LOAD: if (s_fire) begin
          if (col == CW'(DIM - 1)) begin
            col <= '0;
            if (row == CW'(DIM - 1)) begin
              row <= '0;
              state <= S_COORD;
            end else row <= row + 1'b1;
          end else col <= col + 1'b1;
        end
        S_COORD: if (s_fire) begin
          coord_half <= ~coord_half;
          if (coord_half) begin
            if (n_coord == RW'(N_READS - 1)) begin
              n_coord <= '0;
              state <= S_READ;
              read_cycles <= '0;
              err_count <= '0;
              n_issued <= '0; type_idx <= '0; type_chunk_cnt <= '0; wr_slot <= '0;
            end else n_coord <= n_coord + 1'b1;
          end
        end
        S_READ: begin
          read_cycles <= read_cycles + 1;
          if (req_err[0]) err_count <= err_count + 1;
          n_issued <= n_issued + 1'b1;
          if (type_chunk_cnt == RW'(CHUNK - 1) && type_idx != ($bits(type_idx))'(NT - 1)) begin
            type_chunk_cnt <= '0;
            type_idx <= type_idx + 1'b1;
          end else type_chunk_cnt <= type_chunk_cnt + 1'b1;
          if (n_issued == RW'(N_READS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          // the last response arrives in this cycle
          read_cycles <= read_cycles + 1;
          state <= S_OUT;
          out_slot <= '0; out_lane <= '0; n_out <= '0;
        end
        S_OUT: if (m_fire) begin
          n_out <= n_out + 1'b1;
          if (out_lane == LW'(L - 1)) begin
            out_lane <= '0;
            out_slot <= out_slot + 1'b1;
          end else out_lane <= out_lane + 1'b1;
          if (m_last) begin
            state <= S_LOAD;
            done <= 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
