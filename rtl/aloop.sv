// aloop: the complete real-time loop of the face-milling simulation, run in
// the fabric.
//
// After the host has loaded the model (cfg_*) and pulsed start, the loop runs
// n_steps integration steps of dt_cycles clock cycles each (42 us = 4200
// cycles at 100 MHz by default). Every step has a computation part t_c and a
// synchronisation part t_s, and t_c + t_s must fit into the step:
//   computation  1. the active FE node under the tool is read from the
//                   pre-computed map (node_map);
//                2. for every cutter edge l the desired cut thickness h_D is
//                   read from a table indexed by the edge's angle; an edge
//                   with h_D <= 0 is not in contact and is skipped;
//                3. for an active edge the deflection dw = G xi is formed
//                   with G = T(angle) - W(node): T (3 x N) carries the
//                   coordinates of the rotating tool into the edge's frame
//                   and is read by the edge angle, W (3 x N) holds the
//                   constraint rows of the workpiece node; the delayed
//                   deflection of the previous edge is read from the delay
//                   buffer (tau_steps steps ago); cutting_force gives the
//                   part R of the force that stays on the right-hand side
//                   (desired force plus delayed feedback) and G^T R is added
//                   to the load f; the proportional part enters the
//                   stiffness instead: G^T DP G = u c^T is added to dK
//                   (N*N cycles per active edge);
//                4. one Newmark-Beta step (newmark_solver) with stiffness
//                   K + dK gives the new coordinates xi;
//                5. the output y = -W(node)[0] xi (relative displacement
//                   along the tool axis) is written to the result port;
//   synchronisation
//                6. the loop drains the stale beat held by the counter
//                   register, waits until the 64-bit clock count reaches the
//                   step's deadline, sends the DAC code of y, samples the
//                   discrete input word (again after draining the stale
//                   beat) and moves the deadline on by
//                   dt_cycles. A set STOP bit stops the feed: the tool
//                   position freezes and h_D is forced to zero from then on.
// Edge l sits one pitch (2^32 / EDGES) behind edge l-1, so the surface an
// edge cuts was left by edge l-1 one tooth period (tau_steps) earlier.
// Angle and feed advance by dphase (2^32 = one revolution) and feed per step.
// A step whose computation ends after its deadline is counted in overruns;
// max_tc is the longest computation seen, in cycles.
//
// The proportional matrix DP depends on the width change db, which is taken
// from the deflection formed with the previous step's coordinates; the
// deflection stored for the delayed feedback is that same one. T is
// tabulated against the edge angle and W against the map node, both with
// the resolution of their index. Table sizes, the register map and the
// sticky STOP are this design's choices too.
//
// Register map (cfg_addr[19:16] = region, written only while idle):
//   0 scalars   0 kd, 1 bD, 2 mu2, 3 mu3, 4 dphase, 5 feed, 6 tau_steps,
//               7 n_steps, 8 dt_cycles, 9 pos0, 10 phase0, 11 dac_gain
//   1 a0..a7    Newmark constants (cfg_addr[2:0])
//   2/3/4 M/C/K row = cfg_addr[15:8], column = cfg_addr[7:0]
//   5 W table   index = node*3N + row*N + column
//   6 map       cell index, data = node
//   7 h_D table angle index (top ANG_BITS bits of the edge angle)
//   8 T table   index = angle index*3N + row*N + column
module aloop
  import milling_pkg::*;
#(
  parameter int unsigned N           = N_MODES_DEF,
  parameter int unsigned EDGES       = N_EDGES_DEF,
  parameter int unsigned NODES       = 64,
  parameter int unsigned CELLS       = 1024,
  parameter int unsigned ANG_BITS    = 8,
  parameter int unsigned DELAY_DEPTH = 256,
  parameter int unsigned DT_CYCLES   = DT_CYCLES_DEF,
  parameter int unsigned STOP_BIT    = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  // host configuration
  input  logic        cfg_we,
  input  logic [19:0] cfg_addr,
  input  logic [63:0] cfg_data,   // fix_t values in the low FX_W bits
  // control and status
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [31:0] steps,
  output logic [31:0] overruns,
  output logic [31:0] max_tc,
  output logic        stopped,
  output logic        singular,
  // clock count (from the counter register)
  input  logic        time_tvalid,
  output logic        time_tready,
  input  logic [63:0] time_tdata,
  // discrete input word (from the input register)
  input  logic        in_tvalid,
  output logic        in_tready,
  input  logic [31:0] in_tdata,
  // DAC samples
  output logic        dac_tvalid,
  input  logic        dac_tready,
  output logic [15:0] dac_tdata,
  // per-step results, to host memory
  output logic        res_valid,
  output logic [31:0] res_idx,
  output fix_t        res_data
);
  localparam int unsigned IW   = $clog2(N + 1);
  localparam int unsigned NB   = $clog2(NODES);
  localparam int unsigned EB   = $clog2(EDGES + 1);
  localparam int unsigned DB   = $clog2(DELAY_DEPTH);
  localparam int unsigned WSZ  = NODES * 3 * N;
  localparam int unsigned WB   = $clog2(WSZ);
  localparam int unsigned TSZ  = (2**ANG_BITS) * 3 * N;
  localparam int unsigned TB   = $clog2(TSZ);
  localparam logic [31:0] EDGE_PH = 32'((64'd1 << 32) / EDGES);

  // ---------------- configuration ----------------
  fix_t        kd, bd, mu2, mu3, feed, pos0, dac_gain;
  logic [31:0] dphase, tau_steps, n_steps, dt_cycles, phase0;
  fix_t        wtab [WSZ];
  fix_t        hdtab [2**ANG_BITS];
  fix_t        ttab [TSZ];

  logic       idle;
  logic [3:0] region;
  assign region = cfg_addr[19:16];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kd <= '0; bd <= '0; mu2 <= '0; mu3 <= '0; feed <= '0; pos0 <= '0;
      dac_gain <= '0; dphase <= '0; tau_steps <= 32'd1; n_steps <= '0;
      dt_cycles <= 32'(DT_CYCLES); phase0 <= '0;
    end else if (cfg_we && idle && region == 4'd0) begin
      unique case (cfg_addr[3:0])
        4'd0:    kd        <= cfg_data[FX_W-1:0];
        4'd1:    bd        <= cfg_data[FX_W-1:0];
        4'd2:    mu2       <= cfg_data[FX_W-1:0];
        4'd3:    mu3       <= cfg_data[FX_W-1:0];
        4'd4:    dphase    <= cfg_data[31:0];
        4'd5:    feed      <= cfg_data[FX_W-1:0];
        4'd6:    tau_steps <= cfg_data[31:0];
        4'd7:    n_steps   <= cfg_data[31:0];
        4'd8:    dt_cycles <= cfg_data[31:0];
        4'd9:    pos0      <= cfg_data[FX_W-1:0];
        4'd10:   phase0    <= cfg_data[31:0];
        4'd11:   dac_gain  <= cfg_data[FX_W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we && idle && region == 4'd5) wtab[cfg_addr[WB-1:0]] <= cfg_data[FX_W-1:0];
    if (cfg_we && idle && region == 4'd7) hdtab[cfg_addr[ANG_BITS-1:0]] <= cfg_data[FX_W-1:0];
    if (cfg_we && idle && region == 4'd8) ttab[cfg_addr[TB-1:0]] <= cfg_data[FX_W-1:0];
  end

  // ---------------- state machine ----------------
  typedef enum logic [4:0] {
    S_IDLE, S_T0, S_MAP, S_MAPW, S_EDGE, S_EDGEW, S_DW, S_CF, S_CFW, S_GF,
    S_LOADF, S_SOLVE, S_SWAIT, S_OUT, S_RES, S_SYNC, S_DAC, S_IN, S_NEXT,
    S_T0F, S_SYNCF, S_INF, S_DK
  } state_t;
  state_t state;
  assign idle = (state == S_IDLE);
  assign busy = !idle;

  logic [31:0]   step, phase, tc;
  fix_t          pos;
  logic [63:0]   deadline;
  logic          first_t;
  logic [NB-1:0] node;
  logic [EB-1:0] l;
  logic [1:0]    r;
  logic [IW-1:0] j;
  fix_t          dwv [3];
  fix_t          fvec [N];
  fix_t          hd, yacc;
  force_t        fce, fce_rhs;
  fix_t          uvec [N];
  fix_t          cvec [N];
  logic [IW-1:0] di;
  logic [DB-1:0] wptr;

  // delay buffer: deflection of every edge for the last DELAY_DEPTH steps
  defl_t dbuf [DELAY_DEPTH][EDGES];

  // map
  logic [NB-1:0] map_node;
  node_map #(.CELLS(CELLS), .NODES(NODES)) u_map (
    .clk,
    .wr_en  (cfg_we && idle && region == 4'd6),
    .wr_cell(cfg_addr[$clog2(CELLS)-1:0]),
    .wr_node(cfg_data[NB-1:0]),
    .rd_en  (state == S_MAP),
    .pos    (pos),
    .node   (map_node)
  );

  // h_D table read, one cycle
  logic [31:0]         eph;
  logic [ANG_BITS-1:0] aidx;
  fix_t                hd_q;
  assign eph  = phase - 32'(l) * EDGE_PH;   // edge l trails edge l-1
  assign aidx = eph[31 -: ANG_BITS];
  always_ff @(posedge clk) if (state == S_EDGE) hd_q <= hdtab[aidx];

  // integrator
  logic          nm_clear, nm_start, nm_busy, nm_done, nm_sing, nm_fwe;
  fix_t          nm_x, nm_v, nm_a;
  newmark_solver #(.N(N)) u_nm (
    .clk, .rst_n,
    .cfg_we   (cfg_we && idle && (region >= 4'd2) && (region <= 4'd4)),
    .cfg_sel  (2'(region - 4'd2)),
    .cfg_row  (cfg_addr[8 +: IW]),
    .cfg_col  (cfg_addr[0 +: IW]),
    .cfg_data (cfg_data[FX_W-1:0]),
    .coef_we  (cfg_we && idle && region == 4'd1),
    .coef_idx (cfg_addr[2:0]),
    .coef_data(cfg_data[FX_W-1:0]),
    .dk_clr   (state == S_MAP),
    .dk_we    (state == S_DK),
    .dk_row   (di),
    .dk_col   (j),
    .dk_data  (fx_mul(uvec[di], cvec[j])),
    .f_we     (nm_fwe),
    .f_idx    (j),
    .f_data   (fvec[j]),
    .clear    (nm_clear),
    .start    (nm_start),
    .busy     (nm_busy),
    .done     (nm_done),
    .singular (nm_sing),
    .x_idx    (j),
    .x_data   (nm_x),
    .v_data   (nm_v),
    .a_data   (nm_a)
  );
  assign nm_clear = idle && start;
  assign nm_fwe   = (state == S_LOADF);
  assign nm_start = (state == S_SOLVE);

  // cutting force of the current edge
  logic  cf_valid;
  defl_t dw_now, dw_del;
  logic [DB-1:0] rptr;
  logic [EB-1:0] lprev;
  assign dw_now = '{qz: dwv[0], dh: dwv[1], db: dwv[2]};
  assign rptr   = wptr - DB'(tau_steps);
  assign lprev  = (l == '0) ? EB'(EDGES - 1) : l - 1'b1;
  assign dw_del = (step >= tau_steps) ? dbuf[rptr][lprev] : '0;
  cutting_force u_cf (
    .clk, .rst_n,
    .in_valid(state == S_CF),
    .kd, .bd, .hd, .mu2, .mu3,
    .dw(dw_now), .dw_del(dw_del),
    .out_valid(cf_valid),
    .f(fce),
    .f_rhs(fce_rhs)
  );

  // Stiffness of the proportional term for this edge, G^T DP G = u c^T:
  // every row of DP is (0, kd (bD - db), kd hD) scaled by (1, mu2, mu3), so
  // u = G^T (1, mu2, mu3) and c = kd (bD - db) G row 1 + kd hD G row 2.
  fix_t kbd, khd, u_j, c_j;
  assign kbd = fx_mul(kd, fx_sub(bd, dwv[2]));
  assign khd = fx_mul(kd, hd);

  // Coupling rows G = T(angle of edge l) - W(node): row r / rows 0..2,
  // column j. W row 0 alone gives the output.
  function automatic int unsigned widx(input int unsigned base, input int unsigned row,
                                       input logic [IW-1:0] col);
    return base * 3 * N + row * N + int'(col);
  endfunction
  fix_t w0j, g_rj, g0j, g1j, g2j;
  assign w0j  = wtab[WB'(widx(int'(node), 0, j))];
  assign g_rj = fx_sub(ttab[TB'(widx(int'(aidx), int'(r), j))],
                       wtab[WB'(widx(int'(node), int'(r), j))]);
  assign g0j  = fx_sub(ttab[TB'(widx(int'(aidx), 0, j))], w0j);
  assign g1j  = fx_sub(ttab[TB'(widx(int'(aidx), 1, j))], wtab[WB'(widx(int'(node), 1, j))]);
  assign g2j  = fx_sub(ttab[TB'(widx(int'(aidx), 2, j))], wtab[WB'(widx(int'(node), 2, j))]);
  assign u_j  = fx_add(g0j, fx_add(fx_mul(mu2, g1j), fx_mul(mu3, g2j)));
  assign c_j  = fx_add(fx_mul(kbd, g1j), fx_mul(khd, g2j));

  // DAC code: mid-scale plus gain * y, clamped to 16 bits
  logic signed [FX_W-1:0] code_i;
  assign code_i = fx_mul(yacc, dac_gain) >>> FX_FRAC;

  assign time_tready = (state == S_T0F) || (state == S_T0) ||
                       (state == S_SYNCF) || (state == S_SYNC);
  assign in_tready   = (state == S_INF) || (state == S_IN);
  assign dac_tvalid  = (state == S_DAC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; steps <= '0; overruns <= '0; max_tc <= '0;
      stopped <= 1'b0; singular <= 1'b0; step <= '0; phase <= '0; pos <= '0;
      tc <= '0; deadline <= '0; first_t <= 1'b0; node <= '0; l <= '0; r <= '0;
      j <= '0; di <= '0; hd <= '0; yacc <= '0; wptr <= '0;
      for (int p = 0; p < N; p++) begin uvec[p] <= '0; cvec[p] <= '0; end
      dac_tdata <= 16'h8000; res_valid <= 1'b0; res_idx <= '0; res_data <= '0;
      for (int p = 0; p < 3; p++) dwv[p] <= '0;
      for (int p = 0; p < N; p++) fvec[p] <= '0;
    end else begin
      done      <= 1'b0;
      res_valid <= 1'b0;
      if (!idle && state != S_SYNCF && state != S_SYNC && state != S_DAC &&
          state != S_INF && state != S_IN) tc <= tc + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          step <= '0; steps <= '0; overruns <= '0; max_tc <= '0;
          stopped <= 1'b0; singular <= 1'b0; wptr <= '0;
          phase <= phase0; pos <= pos0;
          state <= S_T0F;
        end
        // The register slices hold the beat last read, which may be a whole
        // step old: each read first drains that beat, then uses a fresh one.
        S_T0F: if (time_tvalid) state <= S_T0;
        S_T0: if (time_tvalid) begin
          deadline <= time_tdata + 64'(dt_cycles);
          state    <= (n_steps == '0) ? S_IDLE : S_MAP;
          done     <= (n_steps == '0);
          tc       <= '0;
        end
        S_MAP: begin
          for (int p = 0; p < N; p++) fvec[p] <= '0;
          state <= S_MAPW;
        end
        S_MAPW: begin
          node  <= map_node;
          l     <= '0;
          state <= S_EDGE;
        end
        S_EDGE: state <= S_EDGEW;          // h_D table read
        S_EDGEW: begin
          hd <= stopped ? '0 : hd_q;
          if (stopped || hd_q <= 0) begin   // edge not in contact
            dbuf[wptr][l] <= '0;
            state <= (l == EB'(EDGES - 1)) ? S_LOADF : S_EDGE;
            j     <= '0;
            l     <= l + 1'b1;
          end else begin
            for (int p = 0; p < 3; p++) dwv[p] <= '0;
            r <= '0; j <= '0;
            state <= S_DW;
          end
        end
        S_DW: begin                         // dw = (T - W) xi
          dwv[r] <= fx_add(dwv[r], fx_mul(g_rj, nm_x));
          if (j == IW'(N - 1)) begin
            j <= '0;
            if (r == 2'd2) state <= S_CF;
            else           r <= r + 1'b1;
          end else j <= j + 1'b1;
        end
        S_CF: begin
          dbuf[wptr][l] <= dw_now;
          state <= S_CFW;
        end
        S_CFW: if (cf_valid) begin
          j     <= '0;
          state <= S_GF;
        end
        S_GF: begin                         // f += G^T R, u and c of G^T DP G
          fvec[j] <= fx_add(fvec[j], fx_add(fx_add(fx_mul(g0j, fce_rhs.y1),
                                                   fx_mul(g1j, fce_rhs.y2)),
                                            fx_mul(g2j, fce_rhs.y3)));
          uvec[j] <= u_j;
          cvec[j] <= c_j;
          if (j == IW'(N - 1)) begin
            j  <= '0;
            di <= '0;
            state <= S_DK;
          end else j <= j + 1'b1;
        end
        S_DK: begin                         // dK += u c^T, one entry a cycle
          if (j == IW'(N - 1)) begin
            j <= '0;
            if (di == IW'(N - 1)) begin
              state <= (l == EB'(EDGES - 1)) ? S_LOADF : S_EDGE;
              l     <= l + 1'b1;
            end else di <= di + 1'b1;
          end else j <= j + 1'b1;
        end
        S_LOADF: begin                      // f into the integrator
          if (j == IW'(N - 1)) begin
            j <= '0; state <= S_SOLVE;
          end else j <= j + 1'b1;
        end
        S_SOLVE: state <= S_SWAIT;
        S_SWAIT: if (nm_done) begin
          if (nm_sing) singular <= 1'b1;
          j     <= '0;
          yacc  <= '0;
          state <= S_OUT;
        end
        S_OUT: begin                        // y = -W[0] xi
          yacc <= fx_sub(yacc, fx_mul(w0j, nm_x));
          if (j == IW'(N - 1)) state <= S_RES;
          else                 j <= j + 1'b1;
        end
        S_RES: begin
          res_valid <= 1'b1;
          res_idx   <= step;
          res_data  <= yacc;
          if (code_i > 32767)       dac_tdata <= 16'hFFFF;
          else if (code_i < -32768) dac_tdata <= 16'h0000;
          else                      dac_tdata <= 16'(code_i + 32768);
          if (tc + 1'b1 > max_tc) max_tc <= tc + 1'b1;
          first_t <= 1'b1;
          state   <= S_SYNCF;
        end
        S_SYNCF: if (time_tvalid) state <= S_SYNC;
        S_SYNC: if (time_tvalid) begin
          first_t <= 1'b0;
          if (first_t && time_tdata > deadline) overruns <= overruns + 1'b1;
          if (time_tdata >= deadline) state <= S_DAC;
        end
        S_DAC: if (dac_tready) state <= S_INF;
        S_INF: if (in_tvalid) state <= S_IN;
        S_IN: if (in_tvalid) begin
          if (in_tdata[STOP_BIT]) stopped <= 1'b1;
          state <= S_NEXT;
        end
        S_NEXT: begin
          deadline <= deadline + 64'(dt_cycles);
          tc       <= '0;
          phase    <= phase + dphase;
          if (!stopped) pos <= fx_add(pos, feed);
          wptr     <= wptr + 1'b1;
          step     <= step + 1'b1;
          steps    <= step + 1'b1;
          if (step + 1'b1 == n_steps) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else state <= S_MAP;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // unused read-back of the integrator state
  logic unused_ok;
  assign unused_ok = ^{nm_v, nm_a, nm_busy, fce};
endmodule
