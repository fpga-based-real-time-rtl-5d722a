// gauss_solver: solves the dense linear system A x = b of order N by Gaussian
// elimination (forward elimination without pivoting, then back substitution).
//
// It is the equation solver of every Newmark-Beta step; in the reference
// software it is the single most expensive routine. The user of this block
// writes the augmented matrix [A | b] through the write port while the block
// is idle (column N holds b), pulses start, and reads x through a
// random-access read port once done pulses; x stays valid until the next
// start. The datapath is one fixed-point multiply-subtract per clock and one
// sequential divider (fx_div, DIV = FX_W+FX_FRAC = 72 cycles). Each row multiplier
// a_ik / a_kk and each unknown is a true division rather than a product with
// a reciprocal, which keeps full precision when the pivots are large (the
// effective stiffness of an implicit integrator is). Every division costs
// DIV + 2 = 74 cycles, so from start to done the count for order N is
//   (N(N-1)/2 + N)(DIV + 2) + sum_k (N-1-k)(N+1-k) + N(N-1)/2 + 1,
// which is 1171 cycles for N = 5. No pivoting is done because the
// effective stiffness matrices are diagonally dominant. A zero pivot sets
// the flag singular (cleared on start); the computation still completes,
// with saturated quotients, instead of stopping. A is overwritten.
module gauss_solver
  import milling_pkg::*;
#(
  parameter int unsigned N = N_MODES_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // load [A | b]
  input  logic                     wr_en,
  input  logic [$clog2(N+1)-1:0]   wr_row,
  input  logic [$clog2(N+1)-1:0]   wr_col,   // N selects b
  input  fix_t                     wr_data,
  // control
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     singular,
  // result
  input  logic [$clog2(N+1)-1:0]   x_idx,
  output fix_t                     x_data
);
  localparam int unsigned IW = $clog2(N+1);

  typedef enum logic [2:0] {S_IDLE, S_MDIV, S_MWAIT, S_ROW,
                            S_BACK, S_XDIV, S_XWAIT} state_t;
  state_t state;

  fix_t a [N][N+1];
  fix_t x [N];

  logic [IW-1:0] k, i, j;
  fix_t          m, acc;

  // shared divider
  logic div_start, div_busy, div_done, div_zero;
  fix_t div_a, div_b, div_q;
  fx_div u_div (
    .clk, .rst_n, .start(div_start), .a(div_a), .b(div_b),
    .busy(div_busy), .done(div_done), .q(div_q), .div0(div_zero)
  );

  always_comb begin
    div_start = 1'b0;
    div_a     = a[i][k];
    div_b     = a[k][k];
    if (state == S_MDIV) div_start = 1'b1;
    if (state == S_XDIV) begin
      div_start = 1'b1;
      div_a     = acc;
      div_b     = a[i][i];
    end
  end

  assign busy   = (state != S_IDLE);
  assign x_data = x[x_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; singular <= 1'b0;
      k <= '0; i <= '0; j <= '0; m <= '0; acc <= '0;
      for (int r = 0; r < N; r++) begin
        x[r] <= '0;
        for (int c = 0; c <= N; c++) a[r][c] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (wr_en && state == S_IDLE) a[wr_row][wr_col] <= wr_data;
      unique case (state)
        S_IDLE: if (start) begin
          singular <= 1'b0;
          if (N == 1) begin
            i <= '0; acc <= a[0][N]; state <= S_XDIV;
          end else begin
            k <= '0; i <= IW'(1); state <= S_MDIV;
          end
        end
        S_MDIV: state <= S_MWAIT;           // m = a_ik / a_kk
        S_MWAIT: if (div_done) begin
          m <= div_q;
          if (div_zero) singular <= 1'b1;
          j     <= k;
          state <= S_ROW;
        end
        S_ROW: begin                        // row_i -= m * row_k
          a[i][j] <= fx_sub(a[i][j], fx_mul(m, a[k][j]));
          if (j == IW'(N)) begin
            if (i != IW'(N-1)) begin
              i     <= i + 1'b1;
              state <= S_MDIV;
            end else if (k != IW'(N-2)) begin
              k     <= k + 1'b1;
              i     <= k + 2'd2;
              state <= S_MDIV;
            end else begin                  // back substitution, last row
              i     <= IW'(N-1);
              acc   <= fx_sub(a[N-1][N], fx_mul(m, a[k][N])); // written now
              state <= S_XDIV;
            end
          end else j <= j + 1'b1;
        end
        S_BACK: begin                       // acc = b_i - sum_{j>i} a_ij x_j
          acc <= fx_sub(acc, fx_mul(a[i][j], x[j]));
          if (j == i + 1'b1) state <= S_XDIV;
          else               j     <= j - 1'b1;
        end
        S_XDIV: state <= S_XWAIT;           // x_i = acc / a_ii
        S_XWAIT: if (div_done) begin
          x[i] <= div_q;
          if (div_zero) singular <= 1'b1;
          if (i == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            i     <= i - 1'b1;
            j     <= IW'(N-1);
            acc   <= a[i-1'b1][N];
            state <= S_BACK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused_ok;
  assign unused_ok = div_busy;
endmodule
