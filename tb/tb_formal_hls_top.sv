// tb_formal_hls_top: end-to-end test of the three matrix multipliers at
// the default size (2x2 matrices of 8-bit words).
//
// Each run gives all three multipliers the same A and B at once and waits
// for all three ready signals. Multiplier 1's C and every element that
// multipliers 2 and 3 emit (value, row, column, row-major order) are
// compared with a product computed in the testbench. The first run is the
// worked example [[1,2],[1,2]] x [[2,1],[2,1]] = [[6,3],[6,3]]; then come
// zero entries, wrap-around modulo 256, random small matrices and two
// random matrices over the full 8-bit range (recursions of tens of
// thousands of cycles). The test also
// counts how often each mechanism of the design happened and fails if one
// never did: the step recursion of multiplier 1, Ready-to-Control chaining
// inside the inner-product cells and between the cells of multiplier 3,
// the add cell folding products in multiplier 2, serial emission, a
// recursion ending at once on a zero bound, and result wrap-around.
module tb_formal_hls_top;
  localparam int N = formal_pkg::MAT_N;
  localparam int W = formal_pkg::DATA_W;
  localparam int RW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                       m1_control, m1_ready;
  logic [N-1:0][N-1:0][W-1:0] a, b, m1_c;
  logic                       m2_control, m2_read, m2_ready;
  logic [W-1:0]               m2_out_data;
  logic [RW-1:0]              m2_out_row, m2_out_col;
  logic                       m3_control, m3_read, m3_ready;
  logic [W-1:0]               m3_out_data;
  logic [RW-1:0]              m3_out_row, m3_out_col;

  formal_hls_top dut (
    .clk, .rst_n,
    .m1_control, .m1_a(a), .m1_b(b), .m1_c, .m1_ready,
    .m2_control, .m2_a(a), .m2_b(b), .m2_out_data, .m2_out_row, .m2_out_col,
    .m2_read, .m2_ready,
    .m3_control, .m3_a(a), .m3_b(b), .m3_out_data, .m3_out_row, .m3_out_col,
    .m3_read, .m3_ready
  );

  // Mechanism counters.
  int n_m1_steps = 0, n_ip_chain = 0, n_m3_chain = 0, n_m2_fold = 0;
  int n_serial = 0, n_zero_bound = 0, n_wrap = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_m1.count) n_m1_steps++;
    if (dut.u_m1.g_row[0].g_col[0].u_ip.pro_ready &&
        !dut.u_m1.g_row[0].g_col[0].u_ip.u_add.active) n_ip_chain++;
    if (dut.u_m3.cell_ready[1] && !dut.u_m3.g_cell[1].u_ip.u_pro.active) n_m3_chain++;
    if (dut.u_m2.add_ctrl && dut.u_m2.add_ready) n_m2_fold++;
    if (m2_read) n_serial++;
    if (m3_read) n_serial++;
    if (dut.u_m2.g_pro[0].u_pro.load && dut.u_m2.g_pro[0].u_pro.arg_m == 0) n_zero_bound++;
  end

  logic [N-1:0][N-1:0][W-1:0] exp_c;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic reference();
    int full;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        full = 0;
        for (int k = 0; k < N; k++) full += int'(a[i][k]) * int'(b[k][j]);
        exp_c[i][j] = W'(full);
        if (full >= (1 << W)) n_wrap++;
      end
  endtask

  // Collects one serial multiplier's elements until its ready.
  task automatic watch_serial(input int which);
    int seen = 0;
    forever begin
      @(posedge clk); #1;
      if (which == 2 ? m2_read : m3_read) begin
        int r, c, v;
        r = which == 2 ? int'(m2_out_row) : int'(m3_out_row);
        c = which == 2 ? int'(m2_out_col) : int'(m3_out_col);
        v = which == 2 ? int'(m2_out_data) : int'(m3_out_data);
        check(r * N + c, seen, $sformatf("m%0d element order", which));
        check(v, int'(exp_c[seen / N][seen % N]), $sformatf("m%0d C[%0d][%0d]", which, r, c));
        seen++;
      end
      if (which == 2 ? m2_ready : m3_ready) break;
    end
    check(seen, N * N, $sformatf("m%0d element count", which));
  endtask

  task automatic run();
    reference();
    m1_control = 1; m2_control = 1; m3_control = 1;
    fork
      begin
        do begin @(posedge clk); #1; end while (!m1_ready);
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            check(int'(m1_c[i][j]), int'(exp_c[i][j]), $sformatf("m1 C[%0d][%0d]", i, j));
      end
      watch_serial(2);
      watch_serial(3);
    join
    m1_control = 0; m2_control = 0; m3_control = 0;
    #1;
    check(int'(m1_ready || m2_ready || m3_ready), 0, "ready falls with control");
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m1_control = 0; m2_control = 0; m3_control = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // Worked example (2x2).
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j] = (j % 2 == 0) ? 1 : 2;
        b[i][j] = (j % 2 == 0) ? 2 : 1;
      end
    run();
    if (N == 2) begin
      check(int'(m1_c[0][0]), 6, "example C11");
      check(int'(m1_c[0][1]), 3, "example C12");
      check(int'(m1_c[1][0]), 6, "example C21");
      check(int'(m1_c[1][1]), 3, "example C22");
    end
    // Zero entries and wrap-around.
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j] = ((i + j) % 2 == 0) ? 0 : 17;
        b[i][j] = W'(16 - i);
      end
    run();
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a[i][j] = W'($urandom % 9);
          b[i][j] = W'($urandom % 9);
        end
      run();
    end
    // Full-range 8-bit operands: long recursions, heavy wrap-around.
    for (int t = 0; t < 2; t++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a[i][j] = W'($urandom % 256);
          b[i][j] = W'($urandom % 256);
        end
      run();
    end
    $display("mechanisms: m1_steps=%0d ip_chain=%0d m3_chain=%0d m2_fold=%0d serial=%0d zero_bound=%0d wrap=%0d",
             n_m1_steps, n_ip_chain, n_m3_chain, n_m2_fold, n_serial, n_zero_bound, n_wrap);
    check(int'(n_m1_steps > 0), 1, "multiplier 1 step recursion happened");
    check(int'(n_ip_chain > 0), 1, "pro-to-add chaining happened");
    check(int'(n_m3_chain > 0), 1, "multiplier 3 cell chaining happened");
    check(int'(n_m2_fold > 0), 1, "multiplier 2 add folding happened");
    check(int'(n_serial > 0), 1, "serial emission happened");
    check(int'(n_zero_bound > 0), 1, "zero-bound recursion happened");
    check(int'(n_wrap > 0), 1, "wrap-around happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
