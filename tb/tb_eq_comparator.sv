// tb_eq_comparator: self-checking test of the equality comparator.
//
// Random 8-bit pairs, half of them equal and some differing in one bit
// only, against the testbench's own comparison.
module tb_eq_comparator;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] a, b;
  logic       eq;

  eq_comparator #(.W(8)) dut (.a, .b, .eq);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      a = 8'($urandom);
      case (t % 3)
        0: b = a;
        1: b = a ^ (8'd1 << ($urandom % 8));
        default: b = 8'($urandom);
      endcase
      #1;
      checks++;
      if (eq !== (a == b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d eq=%0b", a, b, eq);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
