// tb_gauss_solver: random diagonally dominant systems of order 5 with large
// pivots (like an effective stiffness matrix) and random right sides, solved
// by the block and by floating-point elimination in the testbench; the
// solutions must agree to a small tolerance. Checks the cycle count from
// start to done (1171 for order 5) and that a zero pivot raises singular
// while the computation still completes.
module tb_gauss_solver;
  import milling_pkg::*;
  import milling_ref_pkg::*;
  localparam int N = 5;
  localparam int EXP_CYCLES = 1171;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, start = 1'b0, busy, done, singular;
  logic [2:0] wr_row, wr_col, x_idx;
  fix_t wr_data, x_data;
  int checks = 0, failures = 0;

  gauss_solver #(.N(N)) dut (.clk, .rst_n, .wr_en, .wr_row, .wr_col, .wr_data,
                             .start, .busy, .done, .singular, .x_idx, .x_data);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  task automatic run(input rmat_t a, input rvec_t b, output int cycles);
    for (int r = 0; r < N; r++)
      for (int c = 0; c <= N; c++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_row = 3'(r); wr_col = 3'(c);
        wr_data = (c == N) ? r2fx(b[r]) : r2fx(a[r][c]);
      end
    @(negedge clk); wr_en = 1'b0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    wr_row = '0; wr_col = '0; wr_data = '0; x_idx = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 60; t++) begin
      rmat_t a; rvec_t b, x; int cyc;
      real scale;
      scale = (t % 2) ? 1500.0 : 20.0;
      for (int r = 0; r < N; r++) begin
        for (int c = 0; c < N; c++) a[r][c] = rnd(-3.0, 3.0);
        a[r][r] = scale + rnd(0.0, 50.0);
        b[r] = rnd(-100.0, 100.0);
      end
      x = ref_solve(N, a, b);
      run(a, b, cyc);
      checks++;
      if (cyc != EXP_CYCLES) begin failures++; $display("cycles %0d", cyc); end
      checks++; if (singular) failures++;
      for (int r = 0; r < N; r++) begin
        real e;
        x_idx = 3'(r); #1;
        e = fx2r(x_data) - x[r]; if (e < 0) e = -e;
        checks++;
        if (e > 0.0005 + 0.002 * (x[r] < 0 ? -x[r] : x[r])) begin
          failures++;
          $display("test %0d x%0d = %f expected %f", t, r, fx2r(x_data), x[r]);
        end
      end
    end
    // zero pivot
    begin
      rmat_t a; rvec_t b; int cyc;
      for (int r = 0; r < N; r++) begin
        for (int c = 0; c < N; c++) a[r][c] = (r == c) ? 4.0 : 0.0;
        b[r] = 1.0;
      end
      a[2][2] = 0.0;
      run(a, b, cyc);
      checks++; if (!singular) begin failures++; $display("singular not raised"); end
      x_idx = 3'd0; #1;
      checks++; if (fx2r(x_data) != 0.25) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
