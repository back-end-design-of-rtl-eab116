// mm_simultaneous: matrix-matrix multiplier by simultaneous recursion
// (multiplier 1 of the worked example).
//
// N*N inner-product cells, one per element C[i][j], all run at once. A step
// counter (successor plus equality comparator against N) walks k from 0 to
// N-1. In step k every cell computes A[i][k] * B[k][j] + C[i][j]; its c
// operand is the cell's own accumulator register (the "p0" register fed back
// in the document's figures), cleared to zero when the operation starts.
// Projection cells pick A[i][k] from row i and B[k][j] from column j by the
// step number. When all cells are ready the accumulators take the new
// values, the counter steps, and the cells' control is dropped for one cycle
// so they reload. After N steps Ready rises with all N*N results valid at
// once: the parallel, fastest and largest of the three multipliers.
//
// Handshake: raise control and hold it; a and b must stay stable until
// ready. ready falls with control. The step time is that of the slowest
// cell, so the total is about the sum over k of max over (i,j) of the cell
// latencies (see inner_product), plus three cycles per step. Elements are
// W-bit unsigned, results modulo 2**W.
module mm_simultaneous #(
  parameter int unsigned W = formal_pkg::DATA_W,
  parameter int unsigned N = formal_pkg::MAT_N
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       control,
  input  logic [N-1:0][N-1:0][W-1:0] a,       // a[row][col]
  input  logic [N-1:0][N-1:0][W-1:0] b,       // b[row][col]
  output logic [N-1:0][N-1:0][W-1:0] c,       // c = a x b
  output logic                       ready
);
  localparam int unsigned KW = $clog2(N + 1);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic          active, gap;
  logic          load, count, eq;
  logic [KW-1:0] k;
  logic          k_carry;
  logic          ip_ctrl, all_ready;
  logic [N-1:0][N-1:0]        ip_ready;
  logic [N-1:0][N-1:0][W-1:0] ip_result;
  logic [N-1:0][N-1:0][W-1:0] acc;

  always_comb begin
    load      = control && !active;
    ip_ctrl   = control && active && !eq && !gap;
    all_ready = &ip_ready;
    count     = ip_ctrl && all_ready;
    ready     = control && active && eq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      gap    <= 1'b0;
      acc    <= '0;
    end else begin
      active <= control;
      gap    <= count;
      if (load)       acc <= '0;
      else if (count) acc <= ip_result;
    end
  end

  // Step counter k = 0 .. N.
  successor #(.W(KW)) u_step (
    .clk, .rst_n, .load, .count,
    .in('0), .andin(count), .andout(k_carry), .out(k)
  );

  eq_comparator #(.W(KW)) u_eq (.a(k), .b(KW'(N)), .eq);

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic [N-1:0][W-1:0] b_col;
      logic [W-1:0]        a_ik, b_kj;
      logic                a_rdy, b_rdy;

      for (genvar r = 0; r < N; r++) begin : g_bcol
        assign b_col[r] = b[r][j];
      end

      projection #(.W(W), .N_ARGS(N)) u_pa (
        .args(a[i]), .sel(SW'(k)), .control(ip_ctrl), .result(a_ik), .ready(a_rdy)
      );
      projection #(.W(W), .N_ARGS(N)) u_pb (
        .args(b_col), .sel(SW'(k)), .control(ip_ctrl), .result(b_kj), .ready(b_rdy)
      );

      inner_product #(.W(W)) u_ip (
        .clk, .rst_n, .control(a_rdy && b_rdy),
        .a(a_ik), .b(b_kj), .c(acc[i][j]),
        .result(ip_result[i][j]), .ready(ip_ready[i][j])
      );
    end
  end

  assign c = acc;
endmodule
