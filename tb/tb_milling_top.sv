// tb_milling_top: end-to-end run of the whole fabric design at its default
// size (5 modes, 6 edges, 64 nodes, 1024 map cells, 256-step delay buffer,
// 42 us = 4200-cycle step at 100 MHz), with the tool kinematics of the
// reference cut (1112 rev/min, 6 edges: 3343157 phase units per step and a
// tooth period of 214 steps) and the workpiece's five lowest natural
// frequencies (184.6, 211.4, 242.2, 434.4 and 571.5 Hz, 5 % damping, time
// in milliseconds).
//   run 1: 500 steps; the STOP pin DIG_0 goes high once step 399 has
//          produced its result. Every result is compared with a
//          floating-point model of the algorithm; the DAC pins are decoded
//          like the AD5541A does and each 16-bit frame must carry the code
//          of its step; DAC frames must start exactly 42 us apart; the
//          longest computation must fit into the step; STOP must freeze the
//          feed (the model continues with the feed stopped).
//   run 2: 300 steps of the modified cut (1212 rev/min, feed raised in the
//          ratio 1512/1112, tooth period 196 steps), same checks, no STOP.
//   run 3: step length cut to 300 cycles at run time: every step overruns.
//   run 4: 30 steps with all six edges in contact, the longest computation
//          the loop can have; it must still fit into the step.
// Mechanisms counted (each must occur): active edge, inactive edge, delayed
// feedback, STOP, overrun, DAC frame, map cell change.
module tb_milling_top;
  import milling_pkg::*;
  import milling_ref_pkg::*;
  localparam int N = 5, E = 6, NODES = 64, CELLS = 1024, AB = 8;
  localparam int DT = 4200;
  localparam logic [31:0] EDGE_PH = 32'((64'd1 << 32) / E);

  logic clk = 1'b0, spiclk = 1'b0, rst_n = 1'b0, spi_rst_n = 1'b0;
  logic cfg_we = 1'b0, start = 1'b0;
  logic [19:0] cfg_addr = '0;
  logic [63:0] cfg_data = '0;
  logic busy, done, stopped, singular, res_valid;
  logic [31:0] steps, overruns, max_tc, res_idx;
  fix_t res_data;
  logic [63:0] clk_count;
  logic sw14 = 1'b0, dig_0 = 1'b0, led_0, led_1;
  logic cs, din, ldac, sclk;

  milling_top dut (
    .clk, .rst_n, .spiclk, .spi_rst_n, .cfg_we, .cfg_addr, .cfg_data, .start,
    .busy, .done, .steps, .overruns, .max_tc, .stopped, .singular,
    .res_valid, .res_idx, .res_data, .clk_count, .sw14, .dig_0, .led_0, .led_1,
    .da3_cs_pin(cs), .da3_din_pin(din), .da3_ldac_pin(ldac), .da3_sclk_pin(sclk));

  always #5  clk    = ~clk;      // 100 MHz
  always #10 spiclk = ~spiclk;   // 50 MHz, SCLK 25 MHz

  int checks = 0, failures = 0;
  int n_active = 0, n_inactive = 0, n_delayed = 0, n_stop = 0;
  int n_overrun = 0, n_frames = 0, n_cells = 0, n_all0;

  initial begin
    #60ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model data ----------------
  real kd, bd, mu2, mu3, feed, pos0, gain;
  logic [31:0] dphase, phase0;
  int tau, nsteps, dtc, stop_at;
  real w [NODES][3][N];
  real t [2**AB][3][N];
  int  map [CELLS];
  real hd [2**AB];
  rmat_t m, c, k;
  real cf[8];

  task automatic wr(input int region, input int addr, input logic [63:0] data);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = 20'((region << 16) | addr); cfg_data = data;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic logic [63:0] fx64(input real v);
    return 64'(r2fx(v));
  endfunction

  function automatic real q(input real v);
    return fx2r(r2fx(v));
  endfunction

  task automatic load_all();
    wr(0, 0, fx64(kd)); wr(0, 1, fx64(bd)); wr(0, 2, fx64(mu2)); wr(0, 3, fx64(mu3));
    wr(0, 4, 64'(dphase)); wr(0, 5, fx64(feed)); wr(0, 6, 64'(tau));
    wr(0, 7, 64'(nsteps)); wr(0, 8, 64'(dtc)); wr(0, 9, fx64(pos0));
    wr(0, 10, 64'(phase0)); wr(0, 11, fx64(gain));
    for (int i = 0; i < 8; i++) wr(1, i, fx64(cf[i]));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        wr(2, (i << 8) | j, fx64(m[i][j]));
        wr(3, (i << 8) | j, fx64(c[i][j]));
        wr(4, (i << 8) | j, fx64(k[i][j]));
      end
    for (int n = 0; n < NODES; n++)
      for (int r = 0; r < 3; r++)
        for (int j = 0; j < N; j++) wr(5, n * 3 * N + r * N + j, fx64(w[n][r][j]));
    for (int i = 0; i < CELLS; i++) wr(6, i, 64'(map[i]));
    for (int i = 0; i < 2**AB; i++) wr(7, i, fx64(hd[i]));
    for (int a = 0; a < 2**AB; a++)
      for (int r = 0; r < 3; r++)
        for (int j = 0; j < N; j++) wr(8, a * 3 * N + r * N + j, fx64(t[a][r][j]));
  endtask

  // ---------------- reference model ----------------
  real ref_y [$];
  task automatic ref_run();
    rvec_t x, v, acc;
    real buf_dh [int][E];
    real buf_db [int][E];
    real buf_qz [int][E];
    real pos;
    logic [31:0] phase;
    bit st;
    int last_ci;
    last_ci = 0;
    ref_y.delete();
    for (int i = 0; i < MAXN; i++) begin x[i] = 0; v[i] = 0; acc[i] = 0; end
    pos = q(pos0); phase = phase0; st = 0;
    for (int s = 0; s < nsteps; s++) begin
      int ci, node;
      rvec_t f;
      rmat_t kk;
      real y;
      ci = (pos < 0) ? 0 : $rtoi(pos);
      if (ci > CELLS - 1) ci = CELLS - 1;
      node = map[ci];
      if (s > 0 && ci != last_ci) n_cells++;
      last_ci = ci;
      for (int j = 0; j < MAXN; j++) f[j] = 0;
      kk = k;
      for (int l = 0; l < E; l++) begin
        logic [31:0] eph;
        real h, dw [3], del_dh, f1, fr [3];
        eph = phase - 32'(l) * EDGE_PH;
        h = st ? 0.0 : q(hd[eph[31 -: AB]]);
        if (h <= 0.0) begin
          buf_qz[s][l] = 0; buf_dh[s][l] = 0; buf_db[s][l] = 0;
          n_inactive++;
          continue;
        end
        n_active++;
        for (int r = 0; r < 3; r++) begin
          dw[r] = 0;
          for (int j = 0; j < N; j++) dw[r] += (q(t[eph[31 -: AB]][r][j]) - q(w[node][r][j])) * x[j];
        end
        del_dh = (s >= tau) ? buf_dh[s - tau][(l + E - 1) % E] : 0.0;
        if (del_dh != 0.0) n_delayed++;
        // right-hand part of the force; the proportional part goes into
        // the stiffness as G^T DP G, DP taken with the current db
        f1 = q(kd) * (q(bd) * h + q(bd) * del_dh - dw[2] * del_dh);
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            real gi [3], gj [3];
            for (int r = 0; r < 3; r++) begin
              gi[r] = q(t[eph[31 -: AB]][r][i]) - q(w[node][r][i]);
              gj[r] = q(t[eph[31 -: AB]][r][j]) - q(w[node][r][j]);
            end
            kk[i][j] += (gi[0] + q(mu2) * gi[1] + q(mu3) * gi[2]) *
                        q(kd) * ((q(bd) - dw[2]) * gj[1] + h * gj[2]);
          end
        fr[0] = f1; fr[1] = q(mu2) * f1; fr[2] = q(mu3) * f1;
        for (int j = 0; j < N; j++)
          for (int r = 0; r < 3; r++) f[j] += (q(t[eph[31 -: AB]][r][j]) - q(w[node][r][j])) * fr[r];
        buf_qz[s][l] = dw[0]; buf_dh[s][l] = dw[1]; buf_db[s][l] = dw[2];
      end
      newmark(N, m, c, kk, cf, f, x, v, acc);
      y = 0;
      for (int j = 0; j < N; j++) y -= q(w[node][0][j]) * x[j];
      ref_y.push_back(y);
      if (s + 1 >= stop_at) st = 1;
      phase += dphase;
      if (!st) pos += q(feed);
    end
  endtask

  // ---------------- environment ----------------
  fix_t got_y [$];
  always @(posedge clk) if (rst_n && res_valid) begin
    checks++;
    if (res_idx != 32'(got_y.size())) begin failures++; $display("res_idx %0d", res_idx); end
    got_y.push_back(res_data);
    if (res_idx + 1 >= 32'(stop_at)) dig_0 <= 1'b1;
  end

  // DAC pin decoder
  logic [15:0] word;
  int nbits;
  logic [15:0] got_code [$];
  realtime t_cs, t_cs_prev;
  bit check_spacing = 1'b1;
  always @(negedge cs) begin
    nbits = 0; word = '0;
    t_cs = $realtime;
    if (check_spacing && got_code.size() >= 1) begin
      checks++;
      if (t_cs - t_cs_prev != 42000.0) begin
        failures++; $display("DAC frame spacing %0t", t_cs - t_cs_prev);
      end
    end
    t_cs_prev = t_cs;
  end
  always @(posedge sclk) begin word = {word[14:0], din}; nbits++; end
  always @(posedge cs) if (rst_n) begin
    checks++;
    if (nbits != 16) begin failures++; $display("frame of %0d bits", nbits); end
    got_code.push_back(word);
    n_frames++;
  end

  task automatic run_and_check(input string name, input bit check_values);
    real amp;
    got_y.delete(); got_code.delete();
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    wait (done);
    repeat (400) @(negedge clk);      // last DAC frame
    ref_run();
    checks++;
    if (got_y.size() != nsteps || steps != 32'(nsteps) || got_code.size() != nsteps) begin
      failures++;
      $display("%s: %0d results, %0d frames, steps %0d", name, got_y.size(), got_code.size(), steps);
    end
    amp = 0.0;
    if (check_values)
      for (int s = 0; s < got_y.size() && s < ref_y.size() && s < got_code.size(); s++) begin
        real e, cexp;
        int code;
        e = fx2r(got_y[s]) - ref_y[s]; if (e < 0) e = -e;
        if ((ref_y[s] < 0 ? -ref_y[s] : ref_y[s]) > amp) amp = (ref_y[s] < 0 ? -ref_y[s] : ref_y[s]);
        checks++;
        if (e > 1e-4 + 0.01 * amp) begin
          failures++;
          if (failures < 10) $display("%s step %0d y %f expected %f", name, s, fx2r(got_y[s]), ref_y[s]);
        end
        cexp = 32768.0 + fx2r(got_y[s]) * q(gain);
        code = $rtoi(cexp < 0 ? 0.0 : cexp);
        if (code > 65535) code = 65535;
        checks++;
        if (int'(got_code[s]) - code > 1 || code - int'(got_code[s]) > 1) begin
          failures++; $display("%s step %0d DAC %0d expected %0d", name, s, got_code[s], code);
        end
      end
  endtask

  initial begin
    real fn [N];
    fn = '{184.6, 211.4, 242.2, 434.4, 571.5};
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        real om;
        om = 2.0 * 3.14159265358979 * fn[i] / 1000.0;   // rad/ms
        m[i][j] = q((i == j) ? 1.0 : 0.0);
        c[i][j] = q((i == j) ? 2.0 * 0.05 * om : 0.0);
        k[i][j] = q((i == j) ? om * om : 0.0);
      end
    newmark_coefs(0.25, 0.5, 0.042, cf);                   // 42 us in ms
    for (int i = 0; i < 8; i++) cf[i] = q(cf[i]);
    for (int n = 0; n < NODES; n++)
      for (int r = 0; r < 3; r++)
        for (int j = 0; j < N; j++) w[n][r][j] = real'(int'($urandom % 200) - 100) / 200.0;
    for (int a = 0; a < 2**AB; a++)
      for (int r = 0; r < 3; r++)
        for (int j = 0; j < N; j++) t[a][r][j] = real'(int'($urandom % 200) - 100) / 400.0;
    for (int i = 0; i < CELLS; i++) map[i] = (i * 7) % NODES;
    for (int i = 0; i < 2**AB; i++) hd[i] = 0.4 * $cos(2.0 * 3.14159265358979 * i / (2.0 ** AB));
    kd = 0.1; bd = 1.0; mu2 = 0.5; mu3 = -0.3; gain = 20000.0;
    dphase = 32'd3343157;              // 1112 rev/min over 42 us
    phase0 = 32'h0;
    tau = 214;                         // 60 / (1112 * 6) s in 42 us steps
    feed = 0.02; pos0 = 3.5;
    nsteps = 500; dtc = DT; stop_at = 400;

    repeat (4) @(posedge clk);
    rst_n <= 1'b1; spi_rst_n <= 1'b1;
    load_all();

    run_and_check("run1", 1);
    checks++; if (overruns != 0) begin failures++; $display("run1 overruns %0d", overruns); end
    checks++; if (!stopped) begin failures++; $display("STOP not seen"); end
    else n_stop++;
    checks++; if (!led_1) failures++;
    checks++; if (max_tc >= 32'(DT)) failures++;
    $display("run1: longest computation %0d cycles of %0d", max_tc, DT);

    // run 2: the modified cut, 1212 rev/min and a feed 1512/1112 times
    // larger; the tooth period shrinks to 196 steps
    dig_0 = 1'b0;
    repeat (10) @(negedge clk);
    dphase = 32'd3643793; tau = 196; feed = 0.02 * 1512.0 / 1112.0;
    nsteps = 300; stop_at = 1000;
    wr(0, 4, 64'(dphase)); wr(0, 5, fx64(feed)); wr(0, 6, 64'(tau));
    wr(0, 7, 64'(nsteps));
    run_and_check("run2", 1);
    checks++; if (overruns != 0) begin failures++; $display("run2 overruns %0d", overruns); end
    checks++; if (stopped) begin failures++; $display("run2 stopped"); end
    $display("run2: longest computation %0d cycles of %0d", max_tc, DT);

    // run 3: step of 300 cycles, shorter than the computation
    check_spacing = 1'b0;
    repeat (10) @(negedge clk);
    dtc = 300; nsteps = 4; stop_at = 1000;
    wr(0, 8, 64'(dtc)); wr(0, 7, 64'(nsteps));
    run_and_check("run3", 1);
    checks++; if (overruns != 32'(nsteps)) begin failures++; $display("run3 overruns %0d", overruns); end
    n_overrun = overruns;

    // run 4: every edge in contact in every step, the worst case for the
    // computation time
    dtc = DT; nsteps = 30; stop_at = 1000;
    for (int i = 0; i < 2**AB; i++) begin
      hd[i] = 0.1 + 0.2 * (1.0 + $cos(2.0 * 3.14159265358979 * i / (2.0 ** AB)));
      wr(7, i, fx64(hd[i]));
    end
    wr(0, 8, 64'(dtc)); wr(0, 7, 64'(nsteps));
    check_spacing = 1'b1;
    n_all0 = n_active;
    run_and_check("run4", 1);
    checks++; if (n_active - n_all0 != E * nsteps) begin failures++; $display("run4 active %0d", n_active - n_all0); end
    checks++; if (overruns != 0) begin failures++; $display("run4 overruns %0d", overruns); end
    checks++; if (max_tc >= 32'(DT)) failures++;
    $display("run4: all %0d edges active, longest computation %0d cycles of %0d", E, max_tc, DT);

    $display("mechanisms: active %0d inactive %0d delayed %0d stop %0d overrun %0d frames %0d cells %0d",
             n_active, n_inactive, n_delayed, n_stop, n_overrun, n_frames, n_cells);
    checks++; if (n_active == 0)   failures++;
    checks++; if (n_inactive == 0) failures++;
    checks++; if (n_delayed == 0)  failures++;
    checks++; if (n_stop == 0)     failures++;
    checks++; if (n_overrun == 0)  failures++;
    checks++; if (n_frames == 0)   failures++;
    checks++; if (n_cells == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
