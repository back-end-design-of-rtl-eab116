// successor: cascadable incrementer / up-counter (successor primitive).
//
// Each clock edge with load high stores in + andin; with count high (and
// load low) it stores out + andin; otherwise out holds. andin is the carry
// into the lowest bit (the increment) and andout the carry out of the top
// bit, so W-bit cells chain into wider ones by tying andout of one cell to
// andin of the next, as the 1-bit cells of the document chain. The
// document's cell latches the selected input on phi1 and drives the sum on
// phi2; here one rising clock edge stands for that pair, so out is valid one
// cycle after load or count. With andin = 1 a load of 7 gives 8, as in the
// document's 4-bit example. Holding when neither load nor count is high is
// this design's choice (the document's dynamic node is then undriven).
// Reset clears out to zero.
module successor #(
  parameter int unsigned W = formal_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         count,
  input  logic [W-1:0] in,
  input  logic         andin,
  output logic         andout,
  output logic [W-1:0] out
);
  logic [W-1:0] inp;   // value selected by the load/count gates
  logic [W-1:0] sum;

  always_comb begin
    inp          = load ? in : out;
    {andout, sum} = {1'b0, inp} + {{W{1'b0}}, andin};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              out <= '0;
    else if (load || count)  out <= sum;
  end
endmodule
