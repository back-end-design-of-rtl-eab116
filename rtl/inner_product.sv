// inner_product: a * b + c by composition of a pro cell and an add cell.
//
// The pro cell forms a*b; its Ready drives the Control of the add cell,
// which then counts c increments starting from a*b. The add cell's Ready is
// the cell's Ready. This Ready-to-Control chaining is the document's way of
// composing cells. Results are modulo 2**W.
//
// Handshake: raise control and hold it; a, b, c must stay stable until
// ready. Latency from the first cycle with control high to ready:
// (1 + a*(b + 3)) + (c + 1) clock edges. ready falls with control, and
// result stays valid while control is high.
module inner_product #(
  parameter int unsigned W = formal_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         control,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] result,
  output logic         ready
);
  logic         pro_ready;
  logic [W-1:0] prod;

  pro_unit #(.W(W)) u_pro (
    .clk, .rst_n, .control, .arg_m(a), .arg_n(b),
    .result(prod), .ready(pro_ready)
  );

  add_unit #(.W(W)) u_add (
    .clk, .rst_n, .control(pro_ready), .arg_m(c), .arg_n(prod),
    .result, .ready
  );
endmodule
