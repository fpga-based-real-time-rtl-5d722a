// newmark_solver: one implicit Newmark-Beta integration step of the linear
// system  M xdd + C xd + K x = f  of order N.
//
// The host loads M, C and K (through cfg_*) and the eight integration
// constants a0..a7 (through coef_*) once, at initialisation; they are
// time-invariant and are pre-computed off line:
//   a0 = 1/(beta dt^2)   a1 = gamma/(beta dt)   a2 = 1/(beta dt)
//   a3 = 1/(2 beta) - 1  a4 = gamma/beta - 1    a5 = dt/2 (gamma/beta - 2)
//   a6 = dt (1 - gamma)  a7 = gamma dt
// dK is the stiffness the cutting process adds in the current step: it is
// cleared with dk_clr and built up entry by entry, dk_we adding dk_data to
// entry (dk_row, dk_col); leave it zero for a plain structural model.
// For every step it writes the load vector f (f_*), pulses start, and after
// done reads the new displacements through x_idx/x_data. The step is:
//   1. u = a0 x + a2 v + a3 a,  w = a1 x + a4 v + a5 a         (N cycles)
//   2. Keff = K + dK + a0 M + a1 C, written into the solver     (N*N cycles)
//   3. r = f + M u + C w, written as the solver's right side    (N*N cycles)
//   4. Keff x' = r by Gaussian elimination (gauss_solver)
//   5. a' = a0 (x' - x) - a2 v - a3 a,  v' = v + a6 a + a7 a'    (N cycles)
// Matrix composition, right side, solver and update are one hardware
// function, as in the reference implementation, so no data leaves the fabric
// between them. A step takes 2 N^2 + 2 N + 2 cycles plus the solver's: 1233
// for N = 5. clear zeroes the state (x, v, a). singular reports a zero
// pivot of the last step; the step still completes.
module newmark_solver
  import milling_pkg::*;
#(
  parameter int unsigned N = N_MODES_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // matrices: sel 0 = M, 1 = C, 2 = K
  input  logic                   cfg_we,
  input  logic [1:0]             cfg_sel,
  input  logic [$clog2(N+1)-1:0] cfg_row,
  input  logic [$clog2(N+1)-1:0] cfg_col,
  input  fix_t                   cfg_data,
  input  logic                   coef_we,
  input  logic [2:0]             coef_idx,
  input  fix_t                   coef_data,
  // stiffness added by the cutting process for this step (accumulated)
  input  logic                   dk_clr,
  input  logic                   dk_we,
  input  logic [$clog2(N+1)-1:0] dk_row,
  input  logic [$clog2(N+1)-1:0] dk_col,
  input  fix_t                   dk_data,
  // load vector
  input  logic                   f_we,
  input  logic [$clog2(N+1)-1:0] f_idx,
  input  fix_t                   f_data,
  // control
  input  logic                   clear,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic                   singular,
  // state read-back
  input  logic [$clog2(N+1)-1:0] x_idx,
  output fix_t                   x_data,
  output fix_t                   v_data,
  output fix_t                   a_data
);
  localparam int unsigned IW = $clog2(N+1);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_KEFF, S_RHS, S_SOLVE,
                            S_WAIT, S_UPD} state_t;
  state_t state;

  fix_t mm [N][N];
  fix_t cm [N][N];
  fix_t km [N][N];
  fix_t dk [N][N];
  fix_t cf [8];
  fix_t f  [N];
  fix_t x  [N];
  fix_t v  [N];
  fix_t ac [N];
  fix_t u  [N];
  fix_t w  [N];

  logic [IW-1:0] r, c;
  fix_t          acc;

  // solver
  logic          g_we, g_start, g_busy, g_done, g_sing;
  logic [IW-1:0] g_row, g_col, g_xidx;
  fix_t          g_wdata, g_x;
  gauss_solver #(.N(N)) u_gauss (
    .clk, .rst_n,
    .wr_en(g_we), .wr_row(g_row), .wr_col(g_col), .wr_data(g_wdata),
    .start(g_start), .busy(g_busy), .done(g_done), .singular(g_sing),
    .x_idx(g_xidx), .x_data(g_x)
  );

  assign busy   = (state != S_IDLE);
  assign x_data = x[x_idx];
  assign v_data = v[x_idx];
  assign a_data = ac[x_idx];

  fix_t keff_rc, rhs_next, a_new;
  assign keff_rc  = fx_add(fx_add(km[r][c], dk[r][c]),
                           fx_add(fx_mul(cf[0], mm[r][c]), fx_mul(cf[1], cm[r][c])));
  assign rhs_next = fx_add(acc, fx_add(fx_mul(mm[r][c], u[c]),
                                       fx_mul(cm[r][c], w[c])));
  assign a_new    = fx_sub(fx_sub(fx_mul(cf[0], fx_sub(g_x, x[c])),
                                  fx_mul(cf[2], v[c])),
                           fx_mul(cf[3], ac[c]));

  always_comb begin
    g_we = 1'b0; g_row = r; g_col = c; g_wdata = keff_rc;
    g_start = (state == S_SOLVE);
    g_xidx  = c;
    if (state == S_KEFF) g_we = 1'b1;
    if (state == S_RHS && c == IW'(N-1)) begin
      g_we = 1'b1; g_col = IW'(N); g_wdata = rhs_next;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; singular <= 1'b0;
      r <= '0; c <= '0; acc <= '0;
      for (int p = 0; p < 8; p++) cf[p] <= '0;
      for (int p = 0; p < N; p++) begin
        f[p] <= '0; x[p] <= '0; v[p] <= '0; ac[p] <= '0; u[p] <= '0; w[p] <= '0;
        for (int q = 0; q < N; q++) begin
          mm[p][q] <= '0; cm[p][q] <= '0; km[p][q] <= '0; dk[p][q] <= '0;
        end
      end
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        if (cfg_we) begin
          unique case (cfg_sel)
            2'd0:    mm[cfg_row][cfg_col] <= cfg_data;
            2'd1:    cm[cfg_row][cfg_col] <= cfg_data;
            default: km[cfg_row][cfg_col] <= cfg_data;
          endcase
        end
        if (coef_we) cf[coef_idx] <= coef_data;
        if (f_we)    f[f_idx]     <= f_data;
        if (dk_clr) begin
          for (int p = 0; p < N; p++)
            for (int q = 0; q < N; q++) dk[p][q] <= '0;
        end else if (dk_we) dk[dk_row][dk_col] <= fx_add(dk[dk_row][dk_col], dk_data);
        if (clear) begin
          for (int p = 0; p < N; p++) begin
            x[p] <= '0; v[p] <= '0; ac[p] <= '0;
          end
        end
      end
      unique case (state)
        S_IDLE: if (start) begin
          c <= '0; state <= S_PRE;
        end
        S_PRE: begin
          u[c] <= fx_add(fx_add(fx_mul(cf[0], x[c]), fx_mul(cf[2], v[c])),
                         fx_mul(cf[3], ac[c]));
          w[c] <= fx_add(fx_add(fx_mul(cf[1], x[c]), fx_mul(cf[4], v[c])),
                         fx_mul(cf[5], ac[c]));
          if (c == IW'(N-1)) begin
            r <= '0; c <= '0; state <= S_KEFF;
          end else c <= c + 1'b1;
        end
        S_KEFF: begin
          if (c == IW'(N-1)) begin
            c <= '0;
            if (r == IW'(N-1)) begin
              r <= '0; acc <= f[0]; state <= S_RHS;
            end else r <= r + 1'b1;
          end else c <= c + 1'b1;
        end
        S_RHS: begin
          if (c == IW'(N-1)) begin
            c <= '0;
            if (r == IW'(N-1)) state <= S_SOLVE;
            else begin
              r   <= r + 1'b1;
              acc <= f[r + 1'b1];
            end
          end else begin
            c   <= c + 1'b1;
            acc <= rhs_next;
          end
        end
        S_SOLVE: state <= S_WAIT;
        S_WAIT: if (g_done) begin
          singular <= g_sing;
          c        <= '0;
          state    <= S_UPD;
        end
        S_UPD: begin
          x[c]  <= g_x;
          ac[c] <= a_new;
          v[c]  <= fx_add(fx_add(v[c], fx_mul(cf[6], ac[c])), fx_mul(cf[7], a_new));
          if (c == IW'(N-1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else c <= c + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
