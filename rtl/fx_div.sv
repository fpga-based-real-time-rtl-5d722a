// fx_div: sequential signed fixed-point divider, q = a / b in milling_pkg
// format (the dividend is extended by FX_FRAC zero bits so the quotient keeps
// FX_FRAC fraction bits).
//
// Restoring division on magnitudes, one quotient bit per clock: a pulse on
// start (while not busy) loads the operands, and done pulses FX_W+FX_FRAC
// cycles later with q valid until the next start. A quotient too large for
// fix_t saturates. Division by zero does not stop the computation: q
// saturates to the largest value of the dividend's sign, div0 is raised and
// done pulses in the next cycle, so the real-time loop keeps running and
// reports the exception as a flag.
module fx_div
  import milling_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t a,
  input  fix_t b,
  output logic busy,
  output logic done,
  output fix_t q,
  output logic div0
);
  localparam int unsigned DW = FX_W + FX_FRAC;      // dividend bits
  localparam int unsigned CW = $clog2(DW + 1);

  logic [DW-1:0]   dvd, quo;
  logic [FX_W:0]   rem;
  logic [FX_W-1:0] dmag;
  logic            neg;
  logic [CW-1:0]   cnt;

  function automatic logic [FX_W-1:0] mag(input fix_t v);
    return v[FX_W-1] ? FX_W'(-v) : FX_W'(v);
  endfunction

  // One restoring step.
  logic [FX_W:0]  rem_sh;
  logic           ge;
  logic [DW-1:0]  quo_nx;
  assign rem_sh = {rem[FX_W-1:0], dvd[DW-1]};
  assign ge     = rem_sh >= {1'b0, dmag};
  assign quo_nx = {quo[DW-2:0], ge};

  // Sign and saturation of the finished quotient.
  fix_t q_fin;
  always_comb begin
    if (quo_nx > DW'(FX_MAX)) q_fin = neg ? FX_MIN : FX_MAX;
    else                      q_fin = neg ? -fix_t'(quo_nx) : fix_t'(quo_nx);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; q <= '0; div0 <= 1'b0;
      dvd <= '0; quo <= '0; rem <= '0; dmag <= '0; neg <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        if (b == '0) begin
          q    <= a[FX_W-1] ? FX_MIN : FX_MAX;
          div0 <= 1'b1;
          done <= 1'b1;
        end else begin
          div0 <= 1'b0;
          busy <= 1'b1;
          dvd  <= {mag(a), {FX_FRAC{1'b0}}};
          dmag <= mag(b);
          neg  <= a[FX_W-1] ^ b[FX_W-1];
          rem  <= '0;
          quo  <= '0;
          cnt  <= CW'(DW);
        end
      end else if (busy) begin
        dvd <= dvd << 1;
        rem <= ge ? rem_sh - {1'b0, dmag} : rem_sh;
        quo <= quo_nx;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          q    <= q_fin;
        end
      end
    end
  end
endmodule
