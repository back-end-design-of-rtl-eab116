// mm_several_vars: matrix-matrix multiplier by recursion with respect to
// several variables (multiplier 2 of the worked example).
//
// N pro cells and one add cell compute one element C[i][j] at a time. In
// the CALC phase pro cell k forms A[i][k] * B[k][j]; all N run in parallel
// and the phase ends when all are ready. In the SUM phase the single add
// cell folds the N products together, one add per product after the first:
// it counts P[s] increments starting from P[0] (first add) or from its own
// held result (later adds), picked by a projection cell. The element is
// then shown on out_data with read high for one cycle (EMIT), the element
// counter (successor plus equality comparator against N*N) steps, and the
// pro cells' control is dropped for one cycle (GAP) so they reload.
// Elements leave in row-major order; after N*N of them ready rises.
//
// Handshake: raise control and hold it; a and b must stay stable until
// ready. ready falls with control, and dropping control at any time aborts
// the operation. Elements are W-bit unsigned, results modulo 2**W. Per
// element the time is the slowest pro cell plus the N-1 adds (P[s]+3 cycles
// each) plus three cycles.
module mm_several_vars #(
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
  import formal_pkg::*;

  localparam int unsigned EW = $clog2(N * N + 1);
  localparam int unsigned IW = $clog2(N + 1);

  seq_state_t    st;
  logic          load, count, eq;
  logic [EW-1:0] e;
  logic          e_carry;
  logic [IW-1:0] i, j, s;
  logic          first_add, add_gap;
  logic          pro_ctrl, add_ctrl, add_ready, all_pro;
  logic [N-1:0]        pro_ready;
  logic [N-1:0][W-1:0] prod;
  logic [W-1:0]        add_result, add_start, sum;
  logic                mux_ready;

  always_comb begin
    load     = control && (st == SEQ_IDLE);
    pro_ctrl = control && (st == SEQ_CALC || st == SEQ_SUM || st == SEQ_EMIT);
    all_pro  = &pro_ready;
    add_ctrl = control && (st == SEQ_SUM) && !add_gap;
    read     = control && (st == SEQ_EMIT);
    count    = read;
    ready    = control && (st == SEQ_DONE);
    sum      = (N == 1) ? prod[0] : add_result;
    out_data = sum;
    out_row  = i;
    out_col  = j;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= SEQ_IDLE;
      i         <= '0;
      j         <= '0;
      s         <= '0;
      first_add <= 1'b1;
      add_gap   <= 1'b0;
    end else if (!control) begin
      st        <= SEQ_IDLE;
      add_gap   <= 1'b0;
    end else begin
      add_gap <= 1'b0;
      unique case (st)
        SEQ_IDLE: begin
          i  <= '0;
          j  <= '0;
          st <= SEQ_CALC;
        end
        SEQ_CALC: begin
          s         <= IW'(1);
          first_add <= 1'b1;
          if (all_pro) st <= (N == 1) ? SEQ_EMIT : SEQ_SUM;
        end
        SEQ_SUM: begin
          if (add_ctrl && add_ready) begin
            add_gap   <= 1'b1;
            first_add <= 1'b0;
            s         <= s + 1'b1;
            if (s == IW'(N - 1)) st <= SEQ_EMIT;
          end
        end
        SEQ_EMIT: begin
          if (j == IW'(N - 1)) begin
            j <= '0;
            i <= (i == IW'(N - 1)) ? '0 : i + 1'b1;
          end else begin
            j <= j + 1'b1;
          end
          st <= SEQ_GAP;
        end
        SEQ_GAP:  st <= eq ? SEQ_DONE : SEQ_CALC;
        SEQ_DONE: st <= SEQ_DONE;
        default:  st <= SEQ_IDLE;
      endcase
    end
  end

  // Element counter 0 .. N*N.
  successor #(.W(EW)) u_elem (
    .clk, .rst_n, .load, .count,
    .in('0), .andin(count), .andout(e_carry), .out(e)
  );

  eq_comparator #(.W(EW)) u_eq (.a(e), .b(EW'(N * N)), .eq);

  for (genvar k = 0; k < N; k++) begin : g_pro
    pro_unit #(.W(W)) u_pro (
      .clk, .rst_n, .control(pro_ctrl),
      .arg_m(a[i][k]), .arg_n(b[k][j]),
      .result(prod[k]), .ready(pro_ready[k])
    );
  end

  // Start value of the next add: the first product, then the running sum.
  projection #(.W(W), .N_ARGS(2)) u_mux (
    .args({add_result, prod[0]}), .sel(!first_add), .control(1'b1),
    .result(add_start), .ready(mux_ready)
  );

  add_unit #(.W(W)) u_add (
    .clk, .rst_n, .control(add_ctrl),
    .arg_m(prod[(N > 1) ? s : 0]), .arg_n(add_start),
    .result(add_result), .ready(add_ready)
  );
endmodule
