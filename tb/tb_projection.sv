// tb_projection: self-checking test of the projection cell.
//
// Checks the document's 2-to-1 cell (con low picks Arg1, high picks Arg2)
// and a 4-argument cell over random arguments, the disabled output when
// control is low and ready following control. Combinational: results are
// sampled 1 ns after the inputs change.
module tb_projection;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0][7:0] args2;
  logic            sel2, ctl2, rdy2;
  logic [7:0]      res2;
  logic [3:0][7:0] args4;
  logic [1:0]      sel4;
  logic            ctl4, rdy4;
  logic [7:0]      res4;

  projection #(.W(8), .N_ARGS(2)) u_p2 (.args(args2), .sel(sel2), .control(ctl2),
                                        .result(res2), .ready(rdy2));
  projection #(.W(8), .N_ARGS(4)) u_p4 (.args(args4), .sel(sel4), .control(ctl4),
                                        .result(res4), .ready(rdy4));

  task automatic check(input logic [8:0] got, input logic [8:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      args2 = {8'($urandom), 8'($urandom)};
      args4 = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      sel2  = 1'($urandom);
      sel4  = 2'($urandom);
      ctl2  = ($urandom % 4) != 0;
      ctl4  = ($urandom % 4) != 0;
      #1;
      check({rdy2, res2}, {ctl2, ctl2 ? (sel2 ? args2[1] : args2[0]) : 8'd0}, "2-to-1");
      check({rdy4, res4}, {ctl4, ctl4 ? args4[sel4] : 8'd0}, "4-to-1");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
