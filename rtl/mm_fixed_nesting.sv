// mm_fixed_nesting: matrix-matrix multiplier by a fixed number of nestings
// (multiplier 3 of the worked example).
//
// N inner-product cells in a chain compute one element C[i][j] at a time.
// Cell k forms A[i][k] * B[k][j] + (result of cell k-1), cell 0 adding
// zero; the Ready of each cell drives the Control of the next, so the
// partial sums ripple down the chain. The Ready of the last cell marks a
// finished element: it is shown on out_data with read high for one cycle,
// the element counter (successor plus equality comparator against N*N)
// steps, and the chain's control is dropped for one cycle so that it
// reloads for the next element. Elements leave in row-major order. After
// N*N elements ready rises. Smaller than the simultaneous multiplier, and
// slower, since the elements come out one after another.
//
// Handshake: raise control and hold it; a and b must stay stable until
// ready. ready falls with control. Elements are W-bit unsigned, results
// modulo 2**W. Per element the time is the sum of the N cell latencies
// (see inner_product) plus two cycles.
module mm_fixed_nesting #(
  parameter int unsigned W = formal_pkg::DATA_W,
  parameter int unsigned N = formal_pkg::MAT_N
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       control,
  input  logic [N-1:0][N-1:0][W-1:0] a,        // a[row][col]
  input  logic [N-1:0][N-1:0][W-1:0] b,        // b[row][col]
  output logic [W-1:0]               out_data, // element C[out_row][out_col]
  output logic [$clog2(N+1)-1:0]     out_row,
  output logic [$clog2(N+1)-1:0]     out_col,
  output logic                       read,     // out_data valid this cycle
  output logic                       ready     // all elements delivered
);
  localparam int unsigned EW = $clog2(N * N + 1);
  localparam int unsigned IW = $clog2(N + 1);

  logic          active, gap;
  logic          load, count, eq;
  logic [EW-1:0] e;
  logic          e_carry;
  logic [IW-1:0] i, j;
  logic          chain_ctrl;
  logic [N:0]          cell_ready;   // cell_ready[0] drives the first cell
  logic [N:0][W-1:0]   cell_sum;     // cell_sum[0] is the zero operand

  always_comb begin
    load          = control && !active;
    chain_ctrl    = control && active && !eq && !gap;
    cell_ready[0] = chain_ctrl;
    cell_sum[0]   = '0;
    read          = chain_ctrl && cell_ready[N];
    count         = read;
    ready         = control && active && eq;
    out_data      = cell_sum[N];
    out_row       = i;
    out_col       = j;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      gap    <= 1'b0;
      i      <= '0;
      j      <= '0;
    end else begin
      active <= control;
      gap    <= count;
      if (load) begin
        i <= '0;
        j <= '0;
      end else if (count) begin
        if (j == IW'(N - 1)) begin
          j <= '0;
          i <= (i == IW'(N - 1)) ? '0 : i + 1'b1;
        end else begin
          j <= j + 1'b1;
        end
      end
    end
  end

  // Element counter 0 .. N*N.
  successor #(.W(EW)) u_elem (
    .clk, .rst_n, .load, .count,
    .in('0), .andin(count), .andout(e_carry), .out(e)
  );

  eq_comparator #(.W(EW)) u_eq (.a(e), .b(EW'(N * N)), .eq);

  for (genvar k = 0; k < N; k++) begin : g_cell
    inner_product #(.W(W)) u_ip (
      .clk, .rst_n, .control(cell_ready[k]),
      .a(a[i][k]), .b(b[k][j]), .c(cell_sum[k]),
      .result(cell_sum[k+1]), .ready(cell_ready[k+1])
    );
  end
endmodule
