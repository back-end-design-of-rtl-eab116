// tb_inner_product: self-checking test of the inner-product cell.
//
// Runs the 3 x 2 + 4 = 10 and 3 x 2 + 1 = 7 examples, zero operands, wrap-around and random
// small operands through the Control/Ready handshake. For each it checks
// a*b+c, the latency (the pro cell's m*(n+3) edges, or 1 when a = 0, then
// c+1 edges of the add cell), that ready and result hold while control
// stays high, and that ready falls with control.
module tb_inner_product;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       control;
  logic [7:0] a, b, c, result;
  logic       ready;

  inner_product #(.W(8)) dut (.clk, .rst_n, .control, .a, .b, .c, .result, .ready);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (a=%0d b=%0d c=%0d): got %0d expected %0d", what, a, b, c, got, exp);
    end
  endtask

  task automatic run(input logic [7:0] aa, input logic [7:0] bb, input logic [7:0] cc);
    int cyc, exp_lat;
    logic [7:0] exp_res;
    a = aa; b = bb; c = cc; control = 1;
    exp_res = 8'(aa * bb + cc);
    exp_lat = ((aa == 0) ? 1 : int'(aa) * (int'(bb) + 3)) + int'(cc) + 1;
    cyc = 0;
    #1;
    check(int'(ready), 0, "ready low at start");
    while (!ready && cyc < 100000) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(int'(result), int'(exp_res), "a*b+c");
    check(cyc, exp_lat, "latency");
    repeat (2) begin
      @(posedge clk); #1;
      check(int'(ready), 1, "ready holds");
      check(int'(result), int'(exp_res), "result holds");
    end
    control = 0; #1;
    check(int'(ready), 0, "ready falls with control");
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    control = 0; a = 0; b = 0; c = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(8'd3, 8'd2, 8'd4);
    run(8'd3, 8'd2, 8'd1);
    run(8'd0, 8'd7, 8'd5);
    run(8'd4, 8'd0, 8'd0);
    run(8'd16, 8'd16, 8'd3);
    run(8'd15, 8'd17, 8'd250);
    for (int t = 0; t < 30; t++)
      run(8'($urandom % 12), 8'($urandom % 12), 8'($urandom % 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
