// tb_mm_simultaneous: self-checking test of multiplier 1 (simultaneous
// recursion), 2x2 matrices of 8-bit words.
//
// Runs the worked example [[1,2],[1,2]] x [[2,1],[2,1]] = [[6,3],[6,3]],
// a case with zero entries, one that wraps modulo 256 and random small
// matrices. Checks every element of C against a product computed in the
// testbench, and the latency: one load cycle, then per step k the slowest
// inner-product cell (latency ((a==0) ? 1 : a*(b+3)) + c + 1 with c the
// partial sum so far) plus the cycle that advances the step counter, and
// a one-cycle gap between steps.
module tb_mm_simultaneous;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                       control, ready;
  logic [N-1:0][N-1:0][7:0]   a, b, c;

  mm_simultaneous #(.W(8), .N(N)) dut (.clk, .rst_n, .control, .a, .b, .c, .ready);

  function automatic int ip_lat(int x, int y, int z);
    return ((x == 0) ? 1 : x * (y + 3)) + z + 1;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run();
    int cyc, lat, worst;
    logic [N-1:0][N-1:0][7:0] part;
    part = '0;
    lat  = 1;
    for (int k = 0; k < N; k++) begin
      worst = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          if (ip_lat(a[i][k], b[k][j], part[i][j]) > worst)
            worst = ip_lat(a[i][k], b[k][j], part[i][j]);
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          part[i][j] = 8'(part[i][j] + a[i][k] * b[k][j]);
      lat += worst + 1 + ((k < N - 1) ? 1 : 0);
    end
    control = 1;
    cyc = 0;
    #1;
    while (!ready && cyc < 200000) begin
      @(posedge clk); #1;
      cyc++;
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(int'(c[i][j]), int'(part[i][j]), $sformatf("C[%0d][%0d]", i, j));
    check(cyc, lat, "latency");
    @(posedge clk); #1;
    check(int'(ready), 1, "ready holds");
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
    check(int'(c[0][0]), 6, "example C11");
    check(int'(c[0][1]), 3, "example C12");
    check(int'(c[1][0]), 6, "example C21");
    check(int'(c[1][1]), 3, "example C22");
    a[0][0] = 0; a[0][1] = 5; a[1][0] = 3; a[1][1] = 0;
    b[0][0] = 4; b[0][1] = 0; b[1][0] = 7; b[1][1] = 2;
    run();
    a[0][0] = 16; a[0][1] = 1; a[1][0] = 2; a[1][1] = 17;
    b[0][0] = 16; b[0][1] = 3; b[1][0] = 1; b[1][1] = 15;
    run();
    for (int t = 0; t < 12; t++) begin
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
