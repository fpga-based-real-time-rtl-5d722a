// tb_aloop: runs the real-time loop on a small model (3 modes, 4 edges, 4
// nodes, 16 map cells) and checks every step's output against a
// floating-point model of the same algorithm (map lookup, active edges,
// deflection through random tool-side (T) and workpiece-side (W) tables,
// delayed feedback, cutting force, Newmark-Beta step, output).
//   run 1: 120 steps, a STOP command from step 80 on, DAC ready delayed at
//          random from step 60 on. Checks the result values, the DAC codes,
//          that DAC samples leave exactly dt_cycles apart while the DAC is
//          ready, that no step overruns, and that STOP freezes the feed.
//   run 2: dt_cycles shorter than the computation: every step must be
//          counted as an overrun, and the results must still be right.
//   run 3: all matrices zero: the singular flag must rise and the loop
//          must still finish.
// Mechanisms counted (each must occur): active edge, inactive edge, delayed
// feedback term, STOP, DAC stall, overrun, singular system.
module tb_aloop;
  import milling_pkg::*;
  import milling_ref_pkg::*;
  localparam int N = 3, E = 4, NODES = 4, CELLS = 16, AB = 6, DEPTH = 32;
  localparam int DT = 2000;
  localparam logic [31:0] EDGE_PH = 32'((64'd1 << 32) / E);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0, start = 1'b0;
  logic [19:0] cfg_addr = '0;
  logic [63:0] cfg_data = '0;
  logic busy, done, stopped, singular;
  logic [31:0] steps, overruns, max_tc;
  logic time_tready, in_tready, dac_tvalid, dac_tready, res_valid;
  logic [63:0] cyc = '0;
  logic [31:0] in_word;
  logic [15:0] dac_tdata;
  logic [31:0] res_idx;
  fix_t res_data;

  aloop #(.N(N), .EDGES(E), .NODES(NODES), .CELLS(CELLS), .ANG_BITS(AB),
          .DELAY_DEPTH(DEPTH), .DT_CYCLES(DT)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .start, .busy, .done, .steps,
    .overruns, .max_tc, .stopped, .singular,
    .time_tvalid(1'b1), .time_tready, .time_tdata(cyc),
    .in_tvalid(1'b1), .in_tready, .in_tdata(in_word),
    .dac_tvalid, .dac_tready, .dac_tdata, .res_valid, .res_idx, .res_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int n_active = 0, n_inactive = 0, n_delayed = 0, n_stop = 0, n_stall = 0;
  int n_overrun = 0, n_singular = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model data ----------------
  real kd, bd, mu2, mu3, feed, pos0, gain;
  logic [31:0] dphase, phase0;
  int tau, nsteps, dtc, stop_at, stall_from;
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

  // quantise to the hardware's number format
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
  int dac_count;
  bit check_spacing = 1'b1;
  longint last_hs;
  fix_t got_y [$];
  logic [15:0] got_code [$];
  assign in_word = (dac_count >= stop_at) ? 32'h4000_0000 : 32'h0;

  always @(posedge clk) if (rst_n) begin
    if (res_valid) begin
      checks++;
      if (res_idx != 32'(got_y.size())) begin failures++; $display("res_idx %0d", res_idx); end
      got_y.push_back(res_data);
    end
    if (dac_tvalid && !dac_tready) n_stall++;
    if (dac_tvalid && dac_tready) begin
      if (check_spacing && dac_count >= 1 && dac_count < stall_from) begin
        checks++;
        if (longint'(cyc) - last_hs != longint'(dtc)) begin
          failures++; $display("DAC spacing %0d", longint'(cyc) - last_hs);
        end
      end
      last_hs = longint'(cyc);
      got_code.push_back(dac_tdata);
      dac_count++;
    end
  end
  always @(negedge clk) dac_tready <= (dac_count < stall_from) ? 1'b1 : ($urandom % 4 == 0);

  task automatic run_and_check(input string name, input bit check_values);
    real amp;
    dac_count = 0; got_y.delete(); got_code.delete();
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    wait (done);
    @(negedge clk);
    ref_run();
    checks++;
    if (got_y.size() != nsteps || steps != 32'(nsteps)) begin
      failures++; $display("%s: %0d results, steps %0d", name, got_y.size(), steps);
    end
    amp = 0.0;
    if (check_values)
      for (int s = 0; s < got_y.size() && s < ref_y.size(); s++) begin
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
    // model: 3 lightly damped modes, beta = 1/4, gamma = 1/2, dt = 0.05
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        real om;
        om = 1.0 + 0.6 * i;
        m[i][j] = (i == j) ? 1.0 : 0.0;
        c[i][j] = (i == j) ? 2.0 * 0.05 * om : 0.0;
        k[i][j] = (i == j) ? om * om : 0.0;
      end
    newmark_coefs(0.25, 0.5, 0.05, cf);
    for (int i = 0; i < 8; i++) cf[i] = q(cf[i]);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      m[i][j] = q(m[i][j]); c[i][j] = q(c[i][j]); k[i][j] = q(k[i][j]);
    end
    for (int n = 0; n < NODES; n++)
      for (int r = 0; r < 3; r++)
        for (int j = 0; j < N; j++) w[n][r][j] = real'(int'($urandom % 200) - 100) / 200.0;
    for (int a = 0; a < 2**AB; a++)
      for (int r = 0; r < 3; r++)
        for (int j = 0; j < N; j++) t[a][r][j] = real'(int'($urandom % 200) - 100) / 400.0;
    for (int i = 0; i < CELLS; i++) map[i] = i % NODES;
    for (int i = 0; i < 2**AB; i++) hd[i] = 0.4 * $cos(2.0 * 3.14159265358979 * i / (2.0 ** AB));
    kd = 1.5; bd = 1.0; mu2 = 0.5; mu3 = -0.3; gain = 20000.0;
    dphase = 32'h1000_0000;           // 16 steps per revolution
    phase0 = 32'h0100_0000;
    tau = 4;                          // one tooth period with 4 edges
    feed = 0.125; pos0 = 0.0;
    nsteps = 120; dtc = DT; stop_at = 80; stall_from = 60;

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    load_all();

    // run 1
    run_and_check("run1", 1);
    checks++; if (overruns != 0) begin failures++; $display("run1 overruns %0d", overruns); end
    checks++; if (!stopped) begin failures++; $display("STOP not seen"); end
    else n_stop++;
    checks++; if (max_tc >= 32'(dtc)) failures++;
    $display("run1: longest computation %0d cycles of %0d", max_tc, dtc);

    // run 2: too short a step
    dtc = 300; nsteps = 6; stop_at = 1000; stall_from = 1000; check_spacing = 1'b0;
    wr(0, 8, 64'(dtc)); wr(0, 7, 64'(nsteps));
    run_and_check("run2", 1);
    checks++; if (overruns != 32'(nsteps)) begin failures++; $display("run2 overruns %0d", overruns); end
    n_overrun = overruns;

    // run 3: singular effective stiffness
    dtc = DT; nsteps = 2;
    wr(0, 8, 64'(dtc)); wr(0, 7, 64'(nsteps));
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      wr(2, (i << 8) | j, 64'd0); wr(3, (i << 8) | j, 64'd0); wr(4, (i << 8) | j, 64'd0);
    end
    run_and_check("run3", 0);
    checks++; if (!singular) begin failures++; $display("singular not raised"); end
    else n_singular++;

    $display("mechanisms: active %0d inactive %0d delayed %0d stop %0d stall %0d overrun %0d singular %0d",
             n_active, n_inactive, n_delayed, n_stop, n_stall, n_overrun, n_singular);
    checks++; if (n_active == 0)   failures++;
    checks++; if (n_inactive == 0) failures++;
    checks++; if (n_delayed == 0)  failures++;
    checks++; if (n_stop == 0)     failures++;
    checks++; if (n_stall == 0)    failures++;
    checks++; if (n_overrun == 0)  failures++;
    checks++; if (n_singular == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
