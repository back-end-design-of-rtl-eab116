// tb_add_unit: self-checking test of the add cell.
//
// Runs the 15 + 7 = 22 and 3 + 2 = 5 examples, m = 0, wrap-around and random operands
// through the Control/Ready handshake. For each it checks the sum, the
// latency (ready exactly m+1 clock edges after control is raised: one load
// and m increments), that ready and result hold while control stays high,
// and that ready falls with control.
module tb_add_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       control;
  logic [7:0] m, n, result;
  logic       ready;

  add_unit #(.W(8)) dut (.clk, .rst_n, .control, .arg_m(m), .arg_n(n), .result, .ready);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (m=%0d n=%0d): got %0d expected %0d", what, m, n, got, exp);
    end
  endtask

  task automatic run(input logic [7:0] mm, input logic [7:0] nn);
    int cyc;
    m = mm; n = nn; control = 1;
    cyc = 0;
    #1;
    check(int'(ready), 0, "ready low at start");
    while (!ready && cyc < 1000) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(int'(result), int'(8'(mm + nn)), "sum");
    check(cyc, int'(mm) + 1, "latency");
    repeat (2) begin
      @(posedge clk); #1;
      check(int'(ready), 1, "ready holds");
      check(int'(result), int'(8'(mm + nn)), "result holds");
    end
    control = 0; #1;
    check(int'(ready), 0, "ready falls with control");
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    control = 0; m = 0; n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(8'd15, 8'd7);
    run(8'd3, 8'd2);
    run(8'd0, 8'd9);
    run(8'd3, 8'd0);
    run(8'd200, 8'd100);
    for (int t = 0; t < 40; t++) run(8'($urandom % 64), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
