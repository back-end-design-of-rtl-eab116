// formal_hls_top: the three matrix-matrix multipliers of the formal cell
// library's worked example, side by side.
//
// All three compute C = A x B for N x N matrices of W-bit words, built only
// from the library's primitive cells (successor, projection, equality
// comparator) and the cells composed from them (add, pro, inner product):
//   m1_*  simultaneous recursion: N*N inner-product cells, all results at
//         once, fastest and largest;
//   m2_*  recursion on several variables: N pro cells and one add cell,
//         results one element at a time;
//   m3_*  fixed nesting: a chain of N inner-product cells, results one
//         element at a time.
// Each multiplier has its own control/ready handshake and operands; see
// the individual modules for timing. One clock and one asynchronous
// active-low reset are shared.
module formal_hls_top #(
  parameter int unsigned W = formal_pkg::DATA_W,
  parameter int unsigned N = formal_pkg::MAT_N
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // Multiplier 1: simultaneous recursion
  input  logic                       m1_control,
  input  logic [N-1:0][N-1:0][W-1:0] m1_a,
  input  logic [N-1:0][N-1:0][W-1:0] m1_b,
  output logic [N-1:0][N-1:0][W-1:0] m1_c,
  output logic                       m1_ready,
  // Multiplier 2: recursion with respect to several variables
  input  logic                       m2_control,
  input  logic [N-1:0][N-1:0][W-1:0] m2_a,
  input  logic [N-1:0][N-1:0][W-1:0] m2_b,
  output logic [W-1:0]               m2_out_data,
  output logic [$clog2(N+1)-1:0]     m2_out_row,
  output logic [$clog2(N+1)-1:0]     m2_out_col,
  output logic                       m2_read,
  output logic                       m2_ready,
  // Multiplier 3: fixed nesting
  input  logic                       m3_control,
  input  logic [N-1:0][N-1:0][W-1:0] m3_a,
  input  logic [N-1:0][N-1:0][W-1:0] m3_b,
  output logic [W-1:0]               m3_out_data,
  output logic [$clog2(N+1)-1:0]     m3_out_row,
  output logic [$clog2(N+1)-1:0]     m3_out_col,
  output logic                       m3_read,
  output logic                       m3_ready
);
  mm_simultaneous #(.W(W), .N(N)) u_m1 (
    .clk, .rst_n, .control(m1_control), .a(m1_a), .b(m1_b),
    .c(m1_c), .ready(m1_ready)
  );

  mm_several_vars #(.W(W), .N(N)) u_m2 (
    .clk, .rst_n, .control(m2_control), .a(m2_a), .b(m2_b),
    .out_data(m2_out_data), .out_row(m2_out_row), .out_col(m2_out_col),
    .read(m2_read), .ready(m2_ready)
  );

  mm_fixed_nesting #(.W(W), .N(N)) u_m3 (
    .clk, .rst_n, .control(m3_control), .a(m3_a), .b(m3_b),
    .out_data(m3_out_data), .out_row(m3_out_row), .out_col(m3_out_col),
    .read(m3_read), .ready(m3_ready)
  );
endmodule
