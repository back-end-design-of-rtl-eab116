// projection: the projection primitive, argument sel of N_ARGS arguments.
//
// A bank of W-bit multiplexers. With control high, result carries args[sel]
// and ready is high; with control low the output is disabled. In the
// document the disabled output is a switched-off transmission gate
// (floating); this design drives zero instead, and an out-of-range sel also
// gives zero. The default of two arguments is the document's 2-to-1 cell
// (input con selects Arg2 when high). Combinational, no clock.
module projection #(
  parameter int unsigned W      = formal_pkg::DATA_W,
  parameter int unsigned N_ARGS = 2,
  parameter int unsigned SEL_W  = (N_ARGS > 1) ? $clog2(N_ARGS) : 1
) (
  input  logic [N_ARGS-1:0][W-1:0] args,
  input  logic [SEL_W-1:0]         sel,
  input  logic                     control,
  output logic [W-1:0]             result,
  output logic                     ready
);
  always_comb begin
    result = '0;
    if (control && (32'(sel) < N_ARGS)) result = args[sel];
    ready = control;
  end
endmodule
