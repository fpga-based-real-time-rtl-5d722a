// tb_cutting_force: random operating points; the three force components are
// compared with the cutting model evaluated in floating point, as is the
// right-hand part of the force (desired force plus delayed feedback), and the
// result must appear exactly one cycle after in_valid.
module tb_cutting_force;
  import milling_pkg::*;
  import milling_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  fix_t kd, bd, hd, mu2, mu3;
  defl_t dw, dw_del;
  force_t f, f_rhs;
  int checks = 0, failures = 0;

  cutting_force dut (.clk, .rst_n, .in_valid, .kd, .bd, .hd, .mu2, .mu3,
                     .dw, .dw_del, .out_valid, .f, .f_rhs);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  task automatic cmp(input string what, input fix_t got, input real exp);
    real e;
    e = fx2r(got) - exp;
    if (e < 0) e = -e;
    checks++;
    if (e > 0.002 + 0.001 * (exp < 0 ? -exp : exp)) begin
      failures++;
      if (failures < 8) $display("%s got %f expected %f", what, fx2r(got), exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 500; n++) begin
      real rkd, rbd, rhd, rm2, rm3, dh, db, qz, dhd, dbd, f1, r1;
      rkd = rnd(0.5, 20.0); rbd = rnd(0.1, 3.0); rhd = rnd(0.0, 1.0);
      rm2 = rnd(-1.0, 1.0); rm3 = rnd(-1.0, 1.0);
      qz = rnd(-0.5, 0.5); dh = rnd(-0.2, 0.2); db = rnd(-0.2, 0.2);
      dhd = rnd(-0.2, 0.2); dbd = rnd(-0.2, 0.2);
      if (n % 5 == 0) begin db = 0.0; dh = 0.0; dhd = 0.0; end  // static force only
      f1 = rkd * (rbd * rhd - rbd * dh - rhd * db + db * dh + rbd * dhd - db * dhd);
      r1 = rkd * (rbd * rhd + rbd * dhd - db * dhd);
      @(negedge clk);
      kd = r2fx(rkd); bd = r2fx(rbd); hd = r2fx(rhd); mu2 = r2fx(rm2); mu3 = r2fx(rm3);
      dw = '{qz: r2fx(qz), dh: r2fx(dh), db: r2fx(db)};
      dw_del = '{qz: r2fx(qz), dh: r2fx(dhd), db: r2fx(dbd)};
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++; if (!out_valid) failures++;
      cmp("F_y1", f.y1, f1);
      cmp("F_y2", f.y2, rm2 * f1);
      cmp("F_y3", f.y3, rm3 * f1);
      cmp("R_y1", f_rhs.y1, r1);
      cmp("R_y2", f_rhs.y2, rm2 * r1);
      cmp("R_y3", f_rhs.y3, rm3 * r1);
      @(negedge clk);
      checks++; if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
