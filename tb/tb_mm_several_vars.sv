// tb_mm_several_vars: self-checking test of multiplier 2 (recursion with
// respect to several variables), 2x2 matrices of 8-bit words.
//
// Runs the worked example [[1,2],[1,2]] x [[2,1],[2,1]] = [[6,3],[6,3]],
// a case with zero entries, one that wraps modulo 256 and random small
// matrices. A monitor checks every read pulse: the element value, its
// row and column (row-major order) and the cycle it appears in. The
// expected cycle is one load cycle, then per element the slowest of the N
// parallel pro cells ((a==0) ? 1 : a*(b+3)) plus one, then P[s] + 2 cycles
// for each of the N-1 adds (one gap cycle between adds), and two cycles
// (emit, gap) between elements. ready must follow the last element by two
// cycles.
module tb_mm_several_vars;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                     control, ready, read;
  logic [N-1:0][N-1:0][7:0] a, b;
  logic [7:0]               out_data;
  logic [1:0]               out_row, out_col;

  mm_several_vars #(.W(8), .N(N)) dut (.clk, .rst_n, .control, .a, .b,
    .out_data, .out_row, .out_col, .read, .ready);

  function automatic int pro_lat(int x, int y);
    return (x == 0) ? 1 : x * (y + 3);
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run();
    int cyc, t, seen;
    logic [7:0] part;
    t = 1;
    seen = 0;
    control = 1;
    cyc = 0;
    #1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int worst;
        worst = 0;
        part = 0;
        for (int k = 0; k < N; k++) begin
          if (pro_lat(a[i][k], b[k][j]) > worst) worst = pro_lat(a[i][k], b[k][j]);
          part = 8'(part + a[i][k] * b[k][j]);
        end
        t += worst + 1;
        for (int k = 1; k < N; k++)
          t += int'(8'(a[i][k] * b[k][j])) + 2 + ((k < N - 1) ? 1 : 0);
        while (!read && cyc < 200000) begin
          @(posedge clk); #1;
          cyc++;
        end
        check(cyc, t, $sformatf("cycle of C[%0d][%0d]", i, j));
        check(int'(out_data), int'(part), $sformatf("C[%0d][%0d]", i, j));
        check(int'(out_row), i, "row");
        check(int'(out_col), j, "col");
        check(int'(ready), 0, "ready low while elements remain");
        seen++;
        @(posedge clk); #1;
        cyc++;
        t += 2;
      end
    @(posedge clk); #1;
    check(seen, N * N, "element count");
    check(int'(ready), 1, "ready after last element");
    check(int'(read), 0, "no read after last element");
    control = 0; #1;
    check(int'(ready), 0, "ready falls with control");
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    control = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    a[0][0] = 1; a[0][1] = 2; a[1][0] = 1; a[1][1] = 2;
    b[0][0] = 2; b[0][1] = 1; b[1][0] = 2; b[1][1] = 1;
    run();
    a[0][0] = 0; a[0][1] = 5; a[1][0] = 3; a[1][1] = 0;
    b[0][0] = 4; b[0][1] = 0; b[1][0] = 7; b[1][1] = 2;
    run();
    a[0][0] = 16; a[0][1] = 1; a[1][0] = 2; a[1][1] = 17;
    b[0][0] = 16; b[0][1] = 3; b[1][0] = 1; b[1][1] = 15;
    run();
    for (int r = 0; r < 12; r++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a[i][j] = 8'($urandom % 10);
          b[i][j] = 8'($urandom % 10);
        end
      run();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
