// tb_pro_unit: self-checking test of the pro (product) cell.
//
// Runs the 3 x 4 = 12 and 3 x 2 = 6 examples, zero operands, wrap-around and random small
// operands through the Control/Ready handshake. For each it checks the
// product, the latency (m*(n+3) clock edges after control is raised, or 1
// when m = 0: m add steps of n+1 cycles plus two handshake cycles each),
// that ready and result hold while control stays high, and that ready
// falls with control.
module tb_pro_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       control;
  logic [7:0] m, n, result;
  logic       ready;

  pro_unit #(.W(8)) dut (.clk, .rst_n, .control, .arg_m(m), .arg_n(n), .result, .ready);

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
    while (!ready && cyc < 100000) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(int'(result), int'(8'(mm * nn)), "product");
    check(cyc, (mm == 0) ? 1 : int'(mm) * (int'(nn) + 3), "latency");
    repeat (2) begin
      @(posedge clk); #1;
      check(int'(ready), 1, "ready holds");
      check(int'(result), int'(8'(mm * nn)), "result holds");
    end
    control = 0; #1;
    check(int'(ready), 0, "ready falls with control");
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
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
    run(8'd3, 8'd4);
    run(8'd3, 8'd2);
    run(8'd0, 8'd9);
    run(8'd5, 8'd0);
    run(8'd1, 8'd1);
    run(8'd20, 8'd20);
    for (int t = 0; t < 30; t++) run(8'($urandom % 16), 8'($urandom % 16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
