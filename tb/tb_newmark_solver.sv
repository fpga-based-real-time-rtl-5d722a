// tb_newmark_solver: a damped 5-mode system with coupled mass, damping and
// stiffness matrices is integrated for 200 steps under a varying load, by
// the block and by a floating-point Newmark-Beta model (beta = 1/4,
// gamma = 1/2); displacements, velocities and accelerations must agree.
// In steps 50 to 149 a random extra stiffness dK is accumulated from two
// halves per entry (as the cutting process does); it is cleared every step.
// The acceleration tolerance is wider: a = a0 (x' - x) - ... amplifies one
// LSB of displacement by a0 = 1600. Also checks that clear zeroes the state and that every step takes the same
// number of cycles (a real-time step must be deterministic).
module tb_newmark_solver;
  import milling_pkg::*;
  import milling_ref_pkg::*;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 0, coef_we = 0, f_we = 0, clear = 0, start = 0;
  logic dk_clr = 0, dk_we = 0;
  logic [2:0] dk_row = 0, dk_col = 0;
  fix_t dk_data = 0;
  logic [1:0] cfg_sel;
  logic [2:0] cfg_row, cfg_col, coef_idx, f_idx, x_idx;
  fix_t cfg_data, coef_data, f_data, x_data, v_data, a_data;
  logic busy, done, singular;
  int checks = 0, failures = 0;

  newmark_solver #(.N(N)) dut (.clk, .rst_n, .cfg_we, .cfg_sel, .cfg_row, .cfg_col,
    .cfg_data, .coef_we, .coef_idx, .coef_data, .dk_clr, .dk_we, .dk_row, .dk_col, .dk_data, .f_we, .f_idx, .f_data, .clear,
    .start, .busy, .done, .singular, .x_idx, .x_data, .v_data, .a_data);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  task automatic cmp(input string what, input int s, input int i, input fix_t g, input real e,
                    input real tol);
    real d;
    d = fx2r(g) - e; if (d < 0) d = -d;
    checks++;
    if (d > tol + 0.02 * (e < 0 ? -e : e)) begin
      failures++;
      if (failures < 10) $display("step %0d %s%0d = %f expected %f", s, what, i, fx2r(g), e);
    end
  endtask

  rmat_t m, c, k, kk;
  rvec_t x, v, acc, f;
  real cf[8];
  int cyc, cyc0;

  initial begin
    cfg_sel = 0; cfg_row = 0; cfg_col = 0; coef_idx = 0; f_idx = 0; x_idx = 0;
    cfg_data = 0; coef_data = 0; f_data = 0;
    for (int i = 0; i < N; i++) begin
      real w;
      w = 1.0 + 0.8 * i;
      for (int j = 0; j < N; j++) begin
        m[i][j] = (i == j) ? 1.0 : 0.05;
        c[i][j] = (i == j) ? 2.0 * 0.05 * w : 0.01;
        k[i][j] = (i == j) ? w * w : -0.1;
      end
      x[i] = 0; v[i] = 0; acc[i] = 0;
    end
    newmark_coefs(0.25, 0.5, 0.05, cf);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          @(negedge clk);
          cfg_we = 1; cfg_sel = 2'(s); cfg_row = 3'(i); cfg_col = 3'(j);
          cfg_data = r2fx(s == 0 ? m[i][j] : s == 1 ? c[i][j] : k[i][j]);
        end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); cfg_we = 0;
      coef_we = 1; coef_idx = 3'(i); coef_data = r2fx(cf[i]);
    end
    @(negedge clk); coef_we = 0;
    // clear after random power-up state
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < N; i++) begin
      x_idx = 3'(i); #1;
      checks++; if (x_data != 0 || v_data != 0 || a_data != 0) failures++;
    end
    for (int s = 0; s < 200; s++) begin
      for (int i = 0; i < N; i++) f[i] = (s < 100) ? (i + 1) * 0.5 * (1.0 + 0.3 * ((s / 7) % 2)) : 0.0;
      for (int i = 0; i < N; i++) begin
        @(negedge clk); f_we = 1; f_idx = 3'(i); f_data = r2fx(f[i]);
      end
      // added stiffness: cleared every step; in steps 50..149 a random
      // matrix, written as two halves that must accumulate
      @(negedge clk); f_we = 0; dk_clr = 1;
      @(negedge clk); dk_clr = 0;
      kk = k;
      if (s >= 50 && s < 150)
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            real d;
            d = (i == j) ? rnd(0.0, 2.0) : rnd(-0.2, 0.2);
            for (int h = 0; h < 2; h++) begin
              @(negedge clk); dk_we = 1; dk_row = 3'(i); dk_col = 3'(j); dk_data = r2fx(d / 2.0);
              kk[i][j] += fx2r(r2fx(d / 2.0));
            end
          end
      @(negedge clk); dk_we = 0; start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      newmark(N, m, c, kk, cf, f, x, v, acc);
      if (s == 0) cyc0 = cyc;
      checks++; if (cyc != cyc0) begin failures++; $display("step cycles %0d vs %0d", cyc, cyc0); end
      checks++; if (singular) failures++;
      for (int i = 0; i < N; i++) begin
        x_idx = 3'(i); #1;
        cmp("x", s, i, x_data, x[i], 0.003);
        cmp("v", s, i, v_data, v[i], 0.01);
        cmp("a", s, i, a_data, acc[i], 0.1);
      end
    end
    $display("newmark step: %0d cycles", cyc0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
