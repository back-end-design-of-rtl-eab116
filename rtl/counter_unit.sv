// counter_unit: up-counter from zero to a bound (the library's counter).
//
// A successor cell with its output fed back (count mode) and an equality
// comparator against the bound: the counter loads zero on the first cycle
// with control high, then increments once per clock until value equals
// limit, where ready rises and counting stops. busy is high in the cycles
// that increment. Using the successor as an up-counter by feedback is the
// document's; the comparator that gives Ready is this design's addition,
// the same pattern the document uses inside its add cell.
//
// Handshake: raise control and hold it; limit must stay stable. ready
// rises limit+1 clock edges after control is first seen high (one load,
// limit increments) and stays high, with value = limit held, until control
// drops; ready and busy fall with control.
module counter_unit #(
  parameter int unsigned W = formal_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         control,
  input  logic [W-1:0] limit,
  output logic [W-1:0] value,
  output logic         busy,
  output logic         ready
);
  logic active, load, eq, carry;

  always_comb begin
    load  = control && !active;
    busy  = control && active && !eq;
    ready = control && active && eq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active <= 1'b0;
    else        active <= control;
  end

  successor #(.W(W)) u_suc (
    .clk, .rst_n, .load, .count(busy),
    .in('0), .andin(busy), .andout(carry), .out(value)
  );

  eq_comparator #(.W(W)) u_eq (.a(value), .b(limit), .eq);
endmodule
