// pro_unit: m * n by primitive recursion on the add cell.
//
// A step counter (successor) starts at zero and an equality comparator
// stops the recursion when it reaches m. Each step runs the add cell once,
// adding n to the running product: the add cell's start value comes from a
// projection cell that picks zero on the first step and the add cell's own
// held result afterwards. So the product is n added to zero m times, as
// the document describes. Products are modulo 2**W.
//
// Handshake: as the add cell. Raise control and hold it; m and n must stay
// stable until ready. Between steps the add cell's control is dropped for
// one cycle so that it reloads. Latency from the first cycle with control
// high to ready: 1 + m*(n + 3) clock edges (the document counts m*n cycles,
// leaving out the per-step handshake). ready falls with control.
module pro_unit #(
  parameter int unsigned W = formal_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         control,
  input  logic [W-1:0] arg_m,    // number of additions
  input  logic [W-1:0] arg_n,    // addend
  output logic [W-1:0] result,
  output logic         ready
);
  logic         active;          // operation loaded
  logic         first;           // no add step finished yet
  logic         gap;             // add control held low this cycle
  logic         load, count, eq;
  logic [W-1:0] step;
  logic         step_carry;
  logic         add_ctrl, add_ready;
  logic [W-1:0] add_result, add_start;

  always_comb begin
    load     = control && !active;
    add_ctrl = control && active && !eq && !gap;
    count    = add_ctrl && add_ready;
    ready    = control && active && eq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      first  <= 1'b1;
      gap    <= 1'b0;
    end else begin
      active <= control;
      gap    <= count;
      if (load)       first <= 1'b1;
      else if (count) first <= 1'b0;
    end
  end

  // Step counter: how many times n has been added.
  successor #(.W(W)) u_step (
    .clk, .rst_n, .load, .count,
    .in('0), .andin(count), .andout(step_carry), .out(step)
  );

  eq_comparator #(.W(W)) u_eq (.a(step), .b(arg_m), .eq);

  // Start value of the next add: zero first, then the previous sum.
  logic proj_ready;
  projection #(.W(W), .N_ARGS(2)) u_mux (
    .args({add_result, {W{1'b0}}}), .sel(!first), .control(1'b1),
    .result(add_start), .ready(proj_ready)
  );

  add_unit #(.W(W)) u_add (
    .clk, .rst_n, .control(add_ctrl), .arg_m(arg_n), .arg_n(add_start),
    .result(add_result), .ready(add_ready)
  );

  assign result = add_start;
endmodule
