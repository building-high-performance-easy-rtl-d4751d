// polymem_system_top: the on-chip side of a PolyMem accelerator.
//
// Three kernels built on the polymorphic parallel memory stand side by side,
// each with its own streams, as they would sit next to a host or soft
// processor that feeds them through a DMA engine:
//   bench_*  pm_bench_kernel: a 96 x 96 matrix of 64-bit words in a RoCo
//            PolyMem of 2 x 8 banks, 3072 back-to-back block reads, 50
//            result blocks (the read-bandwidth microbenchmark);
//   mat_*    pm_matrix_kernel: matrix multiplication (single and mirrored)
//            and matrix power on two 96 x 96 RoCo PolyMems of 4 x 4 banks;
//   pow_*    pm_tiled_power_kernel: matrix power (the Markov-chain kernel)
//            of a 256 x 256 matrix tiled over a 2 x 2 grid of RoCo
//            PolyMems of 2 x 2 banks (p = q = b = 2).
// The processor, DMA engine, timer and external DRAM are outside this RTL;
// their connections are the stream, command and status ports below. The
// sizes are the defaults of the kernels (the benchmark settings and the
// largest matrix-multiplication configuration, and the tiled configuration
// built for the 256 x 256 Markov-chain run). Clock and an asynchronous
// active-low reset are shared.
module polymem_system_top
  import polymem_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // microbenchmark kernel
  input  logic         bench_s_valid,
  output logic         bench_s_ready,
  input  logic [63:0]  bench_s_data,
  output logic         bench_m_valid,
  input  logic         bench_m_ready,
  output logic [63:0]  bench_m_data,
  output logic         bench_m_last,
  output logic         bench_done,
  output logic [31:0]  bench_read_cycles,
  output logic [31:0]  bench_err_count,
  // matrix kernel
  input  logic         mat_cmd_valid,
  output logic         mat_cmd_ready,
  input  mat_op_e      mat_cmd_op,
  input  logic [7:0]   mat_cmd_iters,
  input  logic         mat_s_valid,
  output logic         mat_s_ready,
  input  logic [31:0]  mat_s_data,
  output logic         mat_m_valid,
  input  logic         mat_m_ready,
  output logic [31:0]  mat_m_data,
  output logic         mat_m_last,
  output logic         mat_done,
  output logic [31:0]  mat_compute_cycles,
  output logic [31:0]  mat_err_count,
  // tiled matrix-power kernel
  input  logic         pow_cmd_valid,
  output logic         pow_cmd_ready,
  input  logic [7:0]   pow_cmd_iters,
  input  logic         pow_s_valid,
  output logic         pow_s_ready,
  input  logic [31:0]  pow_s_data,
  output logic         pow_m_valid,
  input  logic         pow_m_ready,
  output logic [31:0]  pow_m_data,
  output logic         pow_m_last,
  output logic         pow_done,
  output logic [31:0]  pow_compute_cycles,
  output logic [31:0]  pow_err_count
);

  pm_bench_kernel u_bench (
    .clk, .rst_n,
    .s_valid(bench_s_valid), .s_ready(bench_s_ready), .s_data(bench_s_data),
    .m_valid(bench_m_valid), .m_ready(bench_m_ready), .m_data(bench_m_data),
    .m_last(bench_m_last), .done(bench_done),
    .read_cycles(bench_read_cycles), .err_count(bench_err_count));

  pm_matrix_kernel u_mat (
    .clk, .rst_n,
    .cmd_valid(mat_cmd_valid), .cmd_ready(mat_cmd_ready),
    .cmd_op(mat_cmd_op), .cmd_iters(mat_cmd_iters),
    .s_valid(mat_s_valid), .s_ready(mat_s_ready), .s_data(mat_s_data),
    .m_valid(mat_m_valid), .m_ready(mat_m_ready), .m_data(mat_m_data),
    .m_last(mat_m_last), .done(mat_done),
    .compute_cycles(mat_compute_cycles), .err_count(mat_err_count));

  pm_tiled_power_kernel u_pow (
    .clk, .rst_n,
    .cmd_valid(pow_cmd_valid), .cmd_ready(pow_cmd_ready), .cmd_iters(pow_cmd_iters),
    .s_valid(pow_s_valid), .s_ready(pow_s_ready), .s_data(pow_s_data),
    .m_valid(pow_m_valid), .m_ready(pow_m_ready), .m_data(pow_m_data),
    .m_last(pow_m_last), .done(pow_done),
    .compute_cycles(pow_compute_cycles), .err_count(pow_err_count));

endmodule
