// pm_matrix_kernel: matrix multiplication and matrix power on PolyMem.
//
// Two DIM x DIM matrices live in two RoCo PolyMems of P x Q banks, X (B, or
// A for the power) and Y (C). Because RoCo serves rows and columns alike,
// one engine computes every product a row-times-column at a time: each cycle
// it reads a P*Q-element row block of the left matrix and the matching
// column block of the right matrix, multiplies them lane by lane, sums the
// lanes (pm_dot_unit) and accumulates; after DIM/(P*Q) blocks the element is
// written into the result buffer T (DIM x DIM words, stored as rows of P*Q
// words, i.e. partitioned along the second dimension).
//   OP_MM1  load B then C from s_data (row-major); T = B x C; stream T out.
//   OP_MM2  as OP_MM1, then T = C x B and stream it out as well. C x B reads
//           C by rows and B by columns: the same memories, other shapes.
//   OP_POW  load A; h times: T = A x A (X read by rows on port 0 and by
//           columns on port 1 in the same cycle), then copy T back into X
//           with full row block writes; stream the final A^(2^h) out.
//           h = cmd_iters; 0 is treated as 1.
// Interface: cmd_valid/cmd_ready start an operation (accepted when idle);
// s_* and m_* are valid/ready streams, m_last marks the last word of each
// result matrix; done pulses when the operation has finished. err_count
// counts memory accesses flagged as conflicting (none for valid sizes).
// compute_cycles counts the cycles spent in the product loops of the last
// operation: DIM*DIM*DIM/(P*Q) + 1 per product, one block pair per cycle.
// Arithmetic is W-bit fixed point with FRAC fraction bits (see pm_dot_unit).
// The algorithms (row/column block reads, result buffer, copy-back) follow
// the matrix-multiplication and Markov-chain kernels of the design; the
// command/stream interface, the fixed-point arithmetic in place of floating
// point and the single block pair per cycle are this design's choices.
module pm_matrix_kernel
  import polymem_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned DIM  = 96,
  parameter int unsigned P    = 4,
  parameter int unsigned Q    = 4,
  parameter int unsigned FRAC = 0,
  localparam int unsigned L   = P * Q,
  localparam int unsigned NB  = DIM / L,           // blocks per row
  localparam int unsigned CW  = (DIM > 1) ? $clog2(DIM) : 1,
  localparam int unsigned BKW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned LW  = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned TW  = (DIM * NB > 1) ? $clog2(DIM * NB) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  output logic         cmd_ready,
  input  mat_op_e      cmd_op,
  input  logic [7:0]   cmd_iters,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [W-1:0] s_data,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [W-1:0] m_data,
  output logic         m_last,
  output logic         done,
  output logic [31:0]  compute_cycles,
  output logic [31:0]  err_count      // accesses flagged by a memory (expected 0)
);

  initial begin
    assert (DIM % L == 0) else $error("pm_matrix_kernel: P*Q must divide DIM");
  end

  typedef enum logic [2:0] {M_IDLE, M_LOAD_X, M_LOAD_Y, M_COMP, M_DRAIN, M_COPY, M_OUT} mstate_e;
  typedef enum logic [1:0] {PR_XY, PR_YX, PR_XX} prod_e;

  mstate_e state;
  mat_op_e op;
  prod_e   prod;
  logic [7:0] iters, iter;

  // ---- memories ----
  logic          x_valid [2], y_valid [1];
  logic [CW-1:0] x_i [2], x_j [2], y_i [1], y_j [1];
  access_e       x_acc [2], y_acc [1];
  logic          x_we, y_we;
  logic [L-1:0]  x_mask, y_mask;
  logic [W-1:0]  x_wdata [L], y_wdata [L];
  logic          x_err [2], y_err [1];
  logic          x_rv [2], y_rv [1];
  logic [W-1:0]  x_rd [2][L], y_rd [1][L];

  polymem #(.W(W), .P(P), .Q(Q), .N(DIM), .M(DIM), .SCHEME(SCHEME_ROCO), .NRP(2)) u_x (
    .clk, .rst_n, .req_valid(x_valid), .req_i(x_i), .req_j(x_j), .req_acc(x_acc),
    .req_we(x_we), .req_mask(x_mask), .req_wdata(x_wdata), .req_err(x_err),
    .rsp_valid(x_rv), .rsp_data(x_rd));

  polymem #(.W(W), .P(P), .Q(Q), .N(DIM), .M(DIM), .SCHEME(SCHEME_ROCO), .NRP(1)) u_y (
    .clk, .rst_n, .req_valid(y_valid), .req_i(y_i), .req_j(y_j), .req_acc(y_acc),
    .req_we(y_we), .req_mask(y_mask), .req_wdata(y_wdata), .req_err(y_err),
    .rsp_valid(y_rv), .rsp_data(y_rd));

  // result buffer T, rows of L words
  logic [W-1:0] tbuf [DIM * NB][L];

  // ---- counters ----
  logic [CW-1:0]  r, c;            // load / copy / output position
  logic [BKW-1:0] kb;              // block index of the product loop
  logic [CW-1:0]  ci, cj;          // output element of the product loop
  // pipeline register: request issued last cycle
  logic           p_valid, p_first, p_last;
  logic [CW-1:0]  p_i, p_j;
  logic [W-1:0]   acc;

  wire s_fire = s_valid && s_ready;
  wire m_fire = m_valid && m_ready;
  wire [CW-1:0] kcol = CW'(kb) * CW'(L);

  assign cmd_ready = (state == M_IDLE);
  assign s_ready   = (state == M_LOAD_X) || (state == M_LOAD_Y);
  assign m_valid   = (state == M_OUT);
  assign m_data    = tbuf[TW'(r) * TW'(NB) + TW'(c / CW'(L))][LW'(c % CW'(L))];
  assign m_last    = m_valid && (r == CW'(DIM - 1)) && (c == CW'(DIM - 1));

  // ---- request multiplexing ----
  always_comb begin
    x_valid[0] = 1'b0; x_valid[1] = 1'b0; y_valid[0] = 1'b0;
    x_i[0] = r; x_j[0] = c; x_i[1] = '0; x_j[1] = '0; y_i[0] = r; y_j[0] = c;
    x_acc[0] = ACC_RO; x_acc[1] = ACC_CO; y_acc[0] = ACC_RO;
    x_we = 1'b0; y_we = 1'b0;
    x_mask = L'(1); y_mask = L'(1);
    for (int k = 0; k < L; k++) begin
      x_wdata[k] = s_data;
      y_wdata[k] = s_data;
    end
    case (state)
      M_LOAD_X: begin x_valid[0] = s_valid; x_we = 1'b1; end
      M_LOAD_Y: begin y_valid[0] = s_valid; y_we = 1'b1; end
      M_COMP: begin
        case (prod)
          PR_XY: begin
            x_valid[0] = 1'b1; x_i[0] = ci;   x_j[0] = kcol; x_acc[0] = ACC_RO;
            y_valid[0] = 1'b1; y_i[0] = kcol; y_j[0] = cj;   y_acc[0] = ACC_CO;
          end
          PR_YX: begin
            y_valid[0] = 1'b1; y_i[0] = ci;   y_j[0] = kcol; y_acc[0] = ACC_RO;
            x_valid[0] = 1'b1; x_i[0] = kcol; x_j[0] = cj;   x_acc[0] = ACC_CO;
          end
          default: begin
            x_valid[0] = 1'b1; x_i[0] = ci;   x_j[0] = kcol; x_acc[0] = ACC_RO;
            x_valid[1] = 1'b1; x_i[1] = kcol; x_j[1] = cj;   x_acc[1] = ACC_CO;
          end
        endcase
      end
      M_COPY: begin
        x_valid[0] = 1'b1; x_we = 1'b1; x_mask = '1;
        x_i[0] = r; x_j[0] = c; x_acc[0] = ACC_RO;
        x_wdata = tbuf[TW'(r) * TW'(NB) + TW'(c / CW'(L))];
      end
      default: ;
    endcase
  end

  // ---- dot product of the returning blocks ----
  logic [W-1:0] row_v [L], col_v [L], dot, sum;
  always_comb begin
    case (prod)
      PR_XY:   begin row_v = x_rd[0]; col_v = y_rd[0]; end
      PR_YX:   begin row_v = y_rd[0]; col_v = x_rd[0]; end
      default: begin row_v = x_rd[0]; col_v = x_rd[1]; end
    endcase
  end
  pm_dot_unit #(.L(L), .W(W), .FRAC(FRAC)) u_dot (.a(row_v), .b(col_v), .dot(dot));
  assign sum = p_first ? dot : acc + dot;

  always_ff @(posedge clk) begin
    if (p_valid && p_last)
      tbuf[TW'(p_i) * TW'(NB) + TW'(p_j / CW'(L))][LW'(p_j % CW'(L))] <= sum;
  end

  // ---- control ----
  task automatic start_product(prod_e pr);
    prod <= pr;
    ci <= '0; cj <= '0; kb <= '0;
    state <= M_COMP;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE; op <= OP_MM1; prod <= PR_XY;
      iters <= '0; iter <= '0;
      r <= '0; c <= '0; kb <= '0; ci <= '0; cj <= '0;
      p_valid <= 1'b0; p_first <= 1'b0; p_last <= 1'b0; p_i <= '0; p_j <= '0;
      acc <= '0; done <= 1'b0; compute_cycles <= '0; err_count <= '0;
    end else begin
      done <= 1'b0;
      if (x_err[0] || x_err[1] || y_err[0]) err_count <= err_count + 1;
      p_valid <= (state == M_COMP);
      p_first <= (kb == '0);
      p_last  <= (kb == BKW'(NB - 1));
      p_i <= ci; p_j <= cj;
      if (p_valid) acc <= sum;
      case (state)
        M_IDLE: if (cmd_valid) begin
          op <= cmd_op;
          iters <= (cmd_iters == 0) ? 8'd1 : cmd_iters;
          iter <= '0;
          r <= '0; c <= '0;
          compute_cycles <= '0;
          err_count <= '0;
          state <= M_LOAD_X;
        end
        M_LOAD_X, M_LOAD_Y: if (s_fire) begin
          if (c == CW'(DIM - 1)) begin
            c <= '0;
            if (r == CW'(DIM - 1)) begin
              r <= '0;
              if (state == M_LOAD_X && op != OP_POW) state <= M_LOAD_Y;
              else start_product((op == OP_POW) ? PR_XX : PR_XY);
            end else r <= r + 1'b1;
          end else c <= c + 1'b1;
        end
        M_COMP: begin
          compute_cycles <= compute_cycles + 1;
          if (kb == BKW'(NB - 1)) begin
            kb <= '0;
            if (cj == CW'(DIM - 1)) begin
              cj <= '0;
              if (ci == CW'(DIM - 1)) begin
                ci <= '0;
                state <= M_DRAIN;
              end else ci <= ci + 1'b1;
            end else cj <= cj + 1'b1;
          end else kb <= kb + 1'b1;
        end
        M_DRAIN: begin
          // the last block pair is summed and written in this cycle
          compute_cycles <= compute_cycles + 1;
          r <= '0; c <= '0;
          state <= (op == OP_POW) ? M_COPY : M_OUT;
        end
        M_COPY: begin
          if (c == CW'(DIM - L)) begin
            c <= '0;
            if (r == CW'(DIM - 1)) begin
              r <= '0;
              if (iter + 8'd1 < iters) begin
                iter <= iter + 8'd1;
                start_product(PR_XX);
              end else state <= M_OUT;
            end else r <= r + 1'b1;
          end else c <= c + CW'(L);
        end
        M_OUT: if (m_fire) begin
          if (c == CW'(DIM - 1)) begin
            c <= '0;
            if (r == CW'(DIM - 1)) begin
              r <= '0;
              if (op == OP_MM2 && prod == PR_XY) start_product(PR_YX);
              else begin
                state <= M_IDLE;
                done <= 1'b1;
              end
            end else r <= r + 1'b1;
          end else c <= c + 1'b1;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
