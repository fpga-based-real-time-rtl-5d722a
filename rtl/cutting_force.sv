// cutting_force: cutting force of one coupling element (one active cutting
// edge) from the proportional cutting model with time-delayed feedback.
//
//   F(t) = F0(t) - (DPl - DPn) dw(t) + (DOl - DOn) dw(t - tau)
//
// with dw = (q_z, dh, db). Only the second and third columns of the linear
// proportional matrix and the second column of the other three matrices are
// non-zero, and all three rows are the first row scaled by 1, mu2 and mu3, so
//   F_y1 = kd ( bD hD - bD dh - hD db + db dh + bD dh' - db dh' )
//   F_y2 = mu2 F_y1,  F_y3 = mu3 F_y1
// where dh' is the thickness change one tooth period earlier. q_z does not
// enter the force.
// For an integrator that takes the proportional term into its stiffness
// matrix, the block also gives the part of the force that stays on the
// right-hand side, F0 + (DOl - DOn) dw(t - tau):
//   R_y1 = kd ( bD hD + bD dh' - db dh' ),  R_y2 = mu2 R_y1,  R_y3 = mu3 R_y1 Inputs are sampled when in_valid is high; the result is
// registered and out_valid follows one cycle later. All values are fix_t.
module cutting_force
  import milling_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  fix_t   kd,      // average dynamic specific cutting pressure
  input  fix_t   bd,      // desired cut width b_D
  input  fix_t   hd,      // desired cut thickness h_D
  input  fix_t   mu2,     // force ratio F_y2 / F_y1
  input  fix_t   mu3,     // force ratio F_y3 / F_y1
  input  defl_t  dw,      // deflection now
  input  defl_t  dw_del,  // deflection one tooth period earlier
  output logic   out_valid,
  output force_t f,
  output force_t f_rhs
);
  fix_t s, f1, sr, r1;
  always_comb begin
    sr = fx_mul(bd, hd);
    sr = fx_add(sr, fx_mul(bd, dw_del.dh));
    sr = fx_sub(sr, fx_mul(dw.db, dw_del.dh));
    r1 = fx_mul(kd, sr);
    s = fx_mul(bd, hd);
    s = fx_sub(s, fx_mul(bd, dw.dh));
    s = fx_sub(s, fx_mul(hd, dw.db));
    s = fx_add(s, fx_mul(dw.db, dw.dh));
    s = fx_add(s, fx_mul(bd, dw_del.dh));
    s = fx_sub(s, fx_mul(dw.db, dw_del.dh));
    f1 = fx_mul(kd, s);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      f         <= '0;
      f_rhs     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        f.y1 <= f1;
        f.y2 <= fx_mul(mu2, f1);
        f.y3 <= fx_mul(mu3, f1);
        f_rhs.y1 <= r1;
        f_rhs.y2 <= fx_mul(mu2, r1);
        f_rhs.y3 <= fx_mul(mu3, r1);
      end
    end
  end
endmodule
