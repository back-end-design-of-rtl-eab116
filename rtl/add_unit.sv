// add_unit: m + n by primitive recursion on two successor cells.
//
// A counter (successor plus equality comparator, see counter_unit) starts
// at zero and a result successor starts at n; both count up together, one
// step per clock, and the comparator watching the counter stops them when
// it reaches m. The counter's busy (the inverted comparator output) drives
// count of the result successor, and its ready is Ready.
// This is the document's add cell; m = 0 works because the start values are
// loaded without increment (andin is low during load), which is this
// design's choice.
//
// Handshake (this design's reading of Control/Ready): raise control and
// keep it high. On the first cycle with control high the successors load m
// and n are sampled; they must then stay stable until ready. ready rises m+1
// clock edges after control was first seen high and stays high, with result
// = (m + n) mod 2**W held, until control drops; ready falls with control in
// the same cycle. Control must be low for at least one cycle between two
// operations. result keeps its value after control drops.
module add_unit #(
  parameter int unsigned W = formal_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         control,
  input  logic [W-1:0] arg_m,    // number of increments
  input  logic [W-1:0] arg_n,    // start value of the result
  output logic [W-1:0] result,
  output logic         ready
);
  logic         active;          // an operation has been loaded
  logic         load, count;
  logic [W-1:0] cnt;
  logic         res_carry;

  always_comb load = control && !active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        active <= 1'b0;
    else               active <= control;
  end

  // Counter: loaded with zero, counts until it equals m.
  counter_unit #(.W(W)) u_cnt (
    .clk, .rst_n, .control, .limit(arg_m), .value(cnt), .busy(count), .ready
  );

  // Result successor: loaded with n, incremented in step with the counter.
  successor #(.W(W)) u_res (
    .clk, .rst_n, .load, .count,
    .in(arg_n), .andin(count), .andout(res_carry), .out(result)
  );

  // Ready, once given, holds with a stable result while control stays high.
  a_ready_holds: assert property (@(posedge clk) disable iff (!rst_n)
    ready && control |=> (!control || (ready && $stable(result))));
endmodule
