// pm_tiled_power_kernel: matrix power on a B x B grid of PolyMems.
//
// The DIM x DIM matrix A is cut into B x B square tiles of DB = DIM/B
// elements a side; tile (I, K) lives in its own RoCo PolyMem of P x Q banks.
// Squaring works one output row i at a time (I = i / DB, il = i % DB): for
// a local column jl and a block kb of P*Q elements it reads, in one cycle,
//   - the row segment (il, kb*P*Q) of every tile (I, K), K = 0..B-1, port 0;
//   - the column segment (kb*P*Q, jl) of every tile (K, J), port 1;
// forms the B*B dot products row(I,K) . col(K,J), sums them over K and so
// advances the B output elements (i, J*DB + jl), J = 0..B-1, by P*Q terms
// each. B*B row-column products of P*Q lanes run in parallel, and a squaring
// takes DIM*DB*DB/(P*Q) + 1 cycles. Results go to a buffer T (rows of P*Q
// words) and are copied back into the tiles with full row-block writes
// before the next squaring; after h squarings (h = cmd_iters, 0 counts as
// 1) T, which then equals A^(2^h), is streamed out row-major.
// With P = Q = 1 each tile is a single plain memory (no parallel access).
// Interface and timing as pm_matrix_kernel: cmd_valid/cmd_ready start an
// operation (A is then streamed in row-major on s_*), m_* carries the
// result, done pulses at the end, compute_cycles counts the product-loop
// cycles, err_count counts flagged memory accesses.
// The tiling, the B^2 parallel products and the reduction follow the
// multi-PolyMem Markov-chain variant; the exact loop order, the stream
// interface and the fixed-point arithmetic (instead of floating point) are
// this design's choices.
module pm_tiled_power_kernel
  import polymem_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned DIM  = 256,
  parameter int unsigned P    = 2,
  parameter int unsigned Q    = 2,
  parameter int unsigned B    = 2,
  parameter int unsigned FRAC = 0,
  localparam int unsigned L   = P * Q,
  localparam int unsigned DB  = DIM / B,         // tile side
  localparam int unsigned NBT = DB / L,          // blocks per tile row
  localparam int unsigned NBR = DIM / L,         // blocks per matrix row
  localparam int unsigned CW  = (DIM > 1) ? $clog2(DIM) : 1,
  localparam int unsigned TCW = (DB > 1) ? $clog2(DB) : 1,
  localparam int unsigned BKW = (NBT > 1) ? $clog2(NBT) : 1,
  localparam int unsigned LW  = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned GW  = (B > 1) ? $clog2(B) : 1,
  localparam int unsigned TW  = (DIM * NBR > 1) ? $clog2(DIM * NBR) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  output logic         cmd_ready,
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
  output logic [31:0]  err_count
);

  initial begin
    assert (DIM % B == 0 && DB % L == 0) else $error("pm_tiled_power_kernel: B must divide DIM and P*Q the tile side");
  end

  typedef enum logic [2:0] {T_IDLE, T_LOAD, T_COMP, T_DRAIN, T_COPY, T_OUT} tstate_e;
  tstate_e state;
  logic [7:0] iters, iter;

  // ---- tile memories ----
  logic          t_valid [B][B][2];
  logic [TCW-1:0] t_i    [B][B][2];
  logic [TCW-1:0] t_j    [B][B][2];
  access_e       t_acc   [B][B][2];
  logic          t_we    [B][B];
  logic [L-1:0]  t_mask;
  logic [W-1:0]  t_wdata [L];
  logic          t_err   [B][B][2];
  logic          t_rv    [B][B][2];
  logic [W-1:0]  t_rd    [B][B][2][L];
  logic [B*B*2-1:0] err_flat;

  for (genvar ti = 0; ti < B; ti++) begin : g_ti
    for (genvar tk = 0; tk < B; tk++) begin : g_tk
      polymem #(.W(W), .P(P), .Q(Q), .N(DB), .M(DB), .SCHEME(SCHEME_ROCO), .NRP(2)) u_tile (
        .clk, .rst_n, .req_valid(t_valid[ti][tk]), .req_i(t_i[ti][tk]), .req_j(t_j[ti][tk]),
        .req_acc(t_acc[ti][tk]), .req_we(t_we[ti][tk]), .req_mask(t_mask), .req_wdata(t_wdata),
        .req_err(t_err[ti][tk]), .rsp_valid(t_rv[ti][tk]), .rsp_data(t_rd[ti][tk]));
      assign err_flat[(ti * B + tk) * 2]     = t_err[ti][tk][0];
      assign err_flat[(ti * B + tk) * 2 + 1] = t_err[ti][tk][1];
    end
  end

  // result buffer T, rows of L words
  logic [W-1:0] tbuf [DIM * NBR][L];

  // ---- counters ----
  logic [CW-1:0]  r;               // load / copy / output row, product row i
  logic [CW-1:0]  c;               // load / output column, copy column (step L)
  logic [TCW-1:0] jl;              // local output column of the product loop
  logic [BKW-1:0] kb;              // block of the product loop
  logic           p_valid, p_first, p_last;
  logic [CW-1:0]  p_i;
  logic [TCW-1:0] p_jl;
  logic [W-1:0]   acc [B];

  wire s_fire = s_valid && s_ready;
  wire m_fire = m_valid && m_ready;
  wire [GW-1:0]  rI  = GW'(int'(r) / DB);          // tile row of r
  wire [TCW-1:0] rl  = TCW'(int'(r) % DB);         // local row of r
  wire [GW-1:0]  cJ  = GW'(int'(c) / DB);          // tile column of c
  wire [TCW-1:0] cl  = TCW'(int'(c) % DB);         // local column of c
  wire [TCW-1:0] kcol = TCW'(kb) * TCW'(L);

  assign cmd_ready = (state == T_IDLE);
  assign s_ready   = (state == T_LOAD);
  assign m_valid   = (state == T_OUT);
  assign m_data    = tbuf[TW'(r) * TW'(NBR) + TW'(c / CW'(L))][LW'(c % CW'(L))];
  assign m_last    = m_valid && (r == CW'(DIM - 1)) && (c == CW'(DIM - 1));

  always_comb begin
    t_mask = L'(1);
    for (int k = 0; k < L; k++) t_wdata[k] = s_data;
    for (int a = 0; a < B; a++)
      for (int b = 0; b < B; b++) begin
        t_we[a][b] = 1'b0;
        for (int p = 0; p < 2; p++) begin
          t_valid[a][b][p] = 1'b0;
          t_i[a][b][p] = rl;
          t_j[a][b][p] = cl;
          t_acc[a][b][p] = (p == 0) ? ACC_RO : ACC_CO;
        end
      end
    case (state)
      T_LOAD: begin
        t_valid[rI][cJ][0] = s_valid;
        t_we[rI][cJ] = 1'b1;
      end
      T_COMP: begin
        for (int a = 0; a < B; a++)
          for (int b = 0; b < B; b++) begin
            // column segments of every tile (K = a, J = b)
            t_valid[a][b][1] = 1'b1;
            t_i[a][b][1] = kcol;
            t_j[a][b][1] = jl;
            t_acc[a][b][1] = ACC_CO;
          end
        for (int b = 0; b < B; b++) begin
          // row segments of the tiles (I, K = b)
          t_valid[rI][b][0] = 1'b1;
          t_i[rI][b][0] = rl;
          t_j[rI][b][0] = kcol;
          t_acc[rI][b][0] = ACC_RO;
        end
      end
      T_COPY: begin
        t_valid[rI][cJ][0] = 1'b1;
        t_we[rI][cJ] = 1'b1;
        t_mask = '1;
        t_wdata = tbuf[TW'(r) * TW'(NBR) + TW'(c / CW'(L))];
      end
      default: ;
    endcase
  end

  // ---- B x B dot products, reduced over K ----
  logic [GW-1:0] p_I;
  logic [W-1:0]  dots [B][B];         // [K][J]
  logic [W-1:0]  red  [B];            // per J
  logic [W-1:0]  sum  [B];
  for (genvar k = 0; k < B; k++) begin : g_k
    for (genvar jj = 0; jj < B; jj++) begin : g_j
      pm_dot_unit #(.L(L), .W(W), .FRAC(FRAC)) u_dot (
        .a(t_rd[p_I][k][0]), .b(t_rd[k][jj][1]), .dot(dots[k][jj]));
    end
  end
  always_comb begin
    for (int jj = 0; jj < B; jj++) begin
      red[jj] = '0;
      for (int k = 0; k < B; k++) red[jj] = red[jj] + dots[k][jj];
      sum[jj] = p_first ? red[jj] : acc[jj] + red[jj];
    end
  end

  always_ff @(posedge clk) begin
    if (p_valid && p_last)
      for (int jj = 0; jj < B; jj++)
        tbuf[TW'(p_i) * TW'(NBR) + TW'((jj * DB + int'(p_jl)) / L)][LW'((jj * DB + int'(p_jl)) % L)] <= sum[jj];
  end

  // ---- control ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE; iters <= '0; iter <= '0;
      r <= '0; c <= '0; jl <= '0; kb <= '0;
      p_valid <= 1'b0; p_first <= 1'b0; p_last <= 1'b0; p_i <= '0; p_jl <= '0; p_I <= '0;
      for (int jj = 0; jj < B; jj++) acc[jj] <= '0;
      done <= 1'b0; compute_cycles <= '0; err_count <= '0;
    end else begin
      done <= 1'b0;
      if (|err_flat) err_count <= err_count + 1;
      p_valid <= (state == T_COMP);
      p_first <= (kb == '0);
      p_last  <= (kb == BKW'(NBT - 1));
      p_i <= r; p_jl <= jl; p_I <= rI;
      if (p_valid) for (int jj = 0; jj < B; jj++) acc[jj] <= sum[jj];
      case (state)
        T_IDLE: if (cmd_valid) begin
          iters <= (cmd_iters == 0) ? 8'd1 : cmd_iters;
          iter <= '0;
          r <= '0; c <= '0;
          compute_cycles <= '0; err_count <= '0;
          state <= T_LOAD;
        end
        T_LOAD: if (s_fire) begin
          if (c == CW'(DIM - 1)) begin
            c <= '0;
            if (r == CW'(DIM - 1)) begin
              r <= '0; jl <= '0; kb <= '0;
              state <= T_COMP;
            end else r <= r + 1'b1;
          end else c <= c + 1'b1;
        end
        T_COMP: begin
          compute_cycles <= compute_cycles + 1;
          if (kb == BKW'(NBT - 1)) begin
            kb <= '0;
            if (jl == TCW'(DB - 1)) begin
              jl <= '0;
              if (r == CW'(DIM - 1)) begin
                r <= '0;
                state <= T_DRAIN;
              end else r <= r + 1'b1;
            end else jl <= jl + 1'b1;
          end else kb <= kb + 1'b1;
        end
        T_DRAIN: begin
          compute_cycles <= compute_cycles + 1;
          r <= '0; c <= '0;
          state <= T_COPY;
        end
        T_COPY: begin
          if (c == CW'(DIM - L)) begin
            c <= '0;
            if (r == CW'(DIM - 1)) begin
              r <= '0;
              if (iter + 8'd1 < iters) begin
                iter <= iter + 8'd1;
                jl <= '0; kb <= '0;
                state <= T_COMP;
              end else state <= T_OUT;
            end else r <= r + 1'b1;
          end else c <= c + CW'(L);
        end
        T_OUT: if (m_fire) begin
          if (c == CW'(DIM - 1)) begin
            c <= '0;
            if (r == CW'(DIM - 1)) begin
              r <= '0;
              state <= T_IDLE;
              done <= 1'b1;
            end else r <= r + 1'b1;
          end else c <= c + 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
