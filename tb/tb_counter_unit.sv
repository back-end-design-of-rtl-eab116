// tb_counter_unit: self-checking test of the counter.
//
// Counts to bounds 0, 1, 7, 255 and random bounds. Checks the final value,
// the latency (ready exactly limit+1 clock edges after control is raised),
// that busy was high for exactly limit cycles, that ready and value hold
// while control stays high and that ready falls with control.
module tb_counter_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       control, busy, ready;
  logic [7:0] limit, value;

  counter_unit #(.W(8)) dut (.clk, .rst_n, .control, .limit, .value, .busy, .ready);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (limit=%0d): got %0d expected %0d", what, limit, got, exp);
    end
  endtask

  task automatic run(input logic [7:0] lim);
    int cyc, nbusy;
    limit = lim; control = 1;
    cyc = 0; nbusy = 0;
    #1;
    check(int'(ready), 0, "ready low at start");
    while (!ready && cyc < 1000) begin
      if (busy) nbusy++;
      @(posedge clk); #1;
      cyc++;
    end
    check(int'(value), int'(lim), "final value");
    check(cyc, int'(lim) + 1, "latency");
    check(nbusy, int'(lim), "busy cycles");
    @(posedge clk); #1;
    check(int'(ready), 1, "ready holds");
    check(int'(value), int'(lim), "value holds");
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
    control = 0; limit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(8'd0);
    run(8'd1);
    run(8'd7);
    run(8'd255);
    for (int t = 0; t < 30; t++) run(8'($urandom % 100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
