// tb_successor: self-checking test of the successor cell.
//
// Two 4-bit cells are chained (andout of the low cell into andin of the
// high cell) to form an 8-bit incrementer/counter, and a lone 4-bit cell is
// checked against the 7 -> 8 example. Checks load with and without
// increment, counting with carry across the cell boundary, wrap-around and
// holding, against a reference computed in the testbench. Each result must
// appear exactly one clock after load/count.
module tb_successor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       load, count, andin;
  logic [7:0] in8;
  logic [3:0] lo_out, hi_out;
  logic       lo_carry, hi_carry;
  logic [3:0] s_in, s_out;
  logic       s_carry, s_load;

  successor #(.W(4)) u_lo (.clk, .rst_n, .load, .count, .in(in8[3:0]),
                           .andin, .andout(lo_carry), .out(lo_out));
  successor #(.W(4)) u_hi (.clk, .rst_n, .load, .count, .in(in8[7:4]),
                           .andin(lo_carry), .andout(hi_carry), .out(hi_out));
  successor #(.W(4)) u_one (.clk, .rst_n, .load(s_load), .count(1'b0), .in(s_in),
                            .andin(1'b1), .andout(s_carry), .out(s_out));

  logic [7:0] ref_val;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step(input logic l, input logic c, input logic ai, input logic [7:0] v);
    logic [7:0] prev;
    prev = ref_val;
    load = l; count = c; andin = ai; in8 = v;
    #1;
    if (l || c) begin
      check({7'b0, hi_carry}, {7'b0, (ai && ((l ? v : prev) == 8'hFF))}, "carry out");
    end
    @(posedge clk); #1;
    if (l)      ref_val = v + 8'(ai);
    else if (c) ref_val = prev + 8'(ai);
    check({hi_out, lo_out}, ref_val, "chained value");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; count = 0; andin = 0; in8 = 0; s_in = 0; s_load = 0;
    ref_val = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check({hi_out, lo_out}, 8'd0, "reset value");

    // Document example: 4-bit cell loaded with 7 gives 8.
    s_in = 4'd7; s_load = 1;
    @(posedge clk); #1;
    s_load = 0;
    check({4'd0, s_out}, 8'd8, "7 -> 8");
    @(posedge clk); #1;
    check({4'd0, s_out}, 8'd8, "lone cell holds");

    step(1, 0, 0, 8'd14);     // plain load
    step(0, 1, 1, 8'd0);      // 15
    step(0, 1, 1, 8'd0);      // 16: carry into the high cell
    step(0, 0, 1, 8'd0);      // hold
    step(0, 1, 0, 8'd0);      // count without increment: hold
    step(1, 0, 1, 8'd254);    // load with increment: 255
    step(0, 1, 1, 8'd0);      // wrap to 0
    for (int t = 0; t < 300; t++)
      step(($urandom % 5) == 0, $urandom % 2, $urandom % 2, 8'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
