// tb_fsmpc_top: end-to-end, closed-loop test of both controllers at their
// default word length (WL = 32, FRAC = 16), each driving its own model of the
// four-leg inverter with unbalanced RL loads.
//
// The plant is four_leg_inverter_model (Vdc = 140 V, Rf = 0.05 ohm,
// Lf = 6 mH, loads Ru = 5, Rv = 3.5, Rw = 4, Rx = 5 ohm), integrated every
// 1 us with the gate state the controller currently applies. Clock 100 MHz. The 4-unit controller samples at 17 kHz (5882
// cycles) and the 6-unit one at 24 kHz (4166 cycles); both track 9 A, 50 Hz
// balanced references for one mains period (20 ms).
//
// Checked: every sampling period ends CC + SAMPLE_OVERHEAD cycles after its
// start with the gates on the arg-min of the costs recomputed by an integer
// model from the latched sample; the load currents track the references
// (RMS error bound after a 4 ms start-up); in a final phase the 4-unit
// controller is sampled at 24 kHz, shorter than its computation time, and
// must flag overruns. Mechanisms counted (each must occur): completed
// periods, replacements of the best cost, switching-state changes, overruns.
module tb_fsmpc_top;
  import fsmpc_pkg::*;
  import tb_fsmpc_ref_pkg::*;

  localparam int WL = 32;
  localparam int FRAC = 16;
  localparam real VDC = 140.0, LF = 6.0e-3, RF = 0.05, IREF = 9.0, F0 = 50.0;
  localparam real TCLK = 10.0e-9;
  localparam real PI2 = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // Per controller (0: four units, 1: six units).
  logic                 start [2];
  logic signed [WL-1:0] i_meas [2][3], i_ref [2][3], ca [2], cb [2], cc [2], cd;
  logic [3:0]           gate [2], gate_n [2], cost_idx [2], j_op [2];
  logic                 done [2], busy [2], overrun [2], cost_valid [2], improved [2];
  logic signed [WL-1:0] g [2], g_op [2];

  fsmpc_top dut (
    .clk, .rst_n,
    .a4_sample_start(start[0]), .a4_i_meas(i_meas[0]), .a4_i_ref(i_ref[0]),
    .a4_coef_a(ca[0]), .a4_coef_b(cb[0]), .a4_coef_c(cc[0]), .a4_coef_d(cd),
    .a4_gate(gate[0]), .a4_gate_n(gate_n[0]), .a4_done(done[0]), .a4_busy(busy[0]),
    .a4_overrun(overrun[0]), .a4_cost_valid(cost_valid[0]), .a4_cost_idx(cost_idx[0]),
    .a4_g(g[0]), .a4_improved(improved[0]), .a4_j_op(j_op[0]), .a4_g_op(g_op[0]),
    .a6_sample_start(start[1]), .a6_i_meas(i_meas[1]), .a6_i_ref(i_ref[1]),
    .a6_coef_a(ca[1]), .a6_coef_b(cb[1]), .a6_coef_c(cc[1]),
    .a6_gate(gate[1]), .a6_gate_n(gate_n[1]), .a6_done(done[1]), .a6_busy(busy[1]),
    .a6_overrun(overrun[1]), .a6_cost_valid(cost_valid[1]), .a6_cost_idx(cost_idx[1]),
    .a6_g(g[1]), .a6_improved(improved[1]), .a6_j_op(j_op[1]), .a6_g_op(g_op[1])
  );

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #50ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic signed [WL-1:0] fx(input real v);
    return WL'($rtoi(v * real'(1 << FRAC)));
  endfunction

  // ---------------- plant ----------------
  real cur [2][3];          // i_u, i_v, i_w of each plant
  real err2 [2][3];
  int  nerr [2];
  bit  measuring = 1'b0;
  int  sp [2] = '{5882, 4166};  // sampling period in clock cycles

  function automatic real iref_at(input real t, input int ph);
    return IREF * $sin(PI2 * F0 * t - PI2 * ph / 3.0);
  endfunction

  for (genvar p = 0; p < 2; p++) begin : g_plant
    four_leg_inverter_model #(.VDC(VDC), .LF(LF), .RF(RF), .TCLK(TCLK)) u_inv (
      .clk, .rst_n, .gate(gate[p]), .i_u(cur[p][0]), .i_v(cur[p][1]), .i_w(cur[p][2])
    );
  end

  // Tracking error, sampled every microsecond.
  always @(posedge clk) if (measuring && cycle % 100 == 0) begin
    for (int p = 0; p < 2; p++) begin
      for (int m = 0; m < 3; m++) begin
        real e;
        e = cur[p][m] - iref_at(real'(cycle) * TCLK, m);
        err2[p][m] += e * e;
      end
      nerr[p]++;
    end
  end

  // ---------------- sampling and checking ----------------
  longint t_start [2];
  longint expc [2][16];
  int n_done [2], n_improved [2], n_change [2], n_overrun [2], n_costs [2];
  logic [3:0] last_gate [2];
  bit run_loop = 1'b0;

  task automatic take_sample(input int p);
    longint ir [3], rr [3];
    real tnext = real'(cycle + sp[p]) * TCLK;
    for (int m = 0; m < 3; m++) begin
      i_meas[p][m] = fx(cur[p][m]);
      i_ref[p][m]  = fx(iref_at(tnext, m));
      ir[m] = longint'(i_meas[p][m]);
      rr[m] = longint'(i_ref[p][m]);
    end
    if (!busy[p]) begin
      for (int j = 0; j < 16; j++)
        expc[p][j] = (p == 0)
          ? cost4(ir, rr, longint'(ca[0]), longint'(cb[0]), longint'(cc[0]), longint'(cd),
                  4'(j), WL, FRAC)
          : cost6(ir, rr, longint'(ca[1]), longint'(cb[1]), longint'(cc[1]), 4'(j), WL, FRAC);
      t_start[p] = cycle;
    end
  endtask

  for (genvar p = 0; p < 2; p++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        if (cost_valid[p]) n_costs[p]++;
        if (improved[p]) n_improved[p]++;
        if (overrun[p]) n_overrun[p]++;
        if (done[p]) begin
          int best;
          best = 0;
          for (int j = 1; j < 16; j++) if (expc[p][j] < expc[p][best]) best = j;
          n_done[p]++;
          check(gate[p] == 4'(best), $sformatf("arch%0d gates = arg-min", p));
          check(gate_n[p] == ~gate[p], "complementary gates");
          check(j_op[p] == gate[p] && longint'(g_op[p]) == expc[p][best], "best cost");
          check(cycle - t_start[p] == longint'(cycles_per_sample(p == 0 ? 4 : 6, WL)
                                               + SAMPLE_OVERHEAD),
                $sformatf("arch%0d period latency", p));
          if (gate[p] != last_gate[p]) n_change[p]++;
          last_gate[p] = gate[p];
        end
      end
    end
  end

  initial begin
    real ts;
    for (int p = 0; p < 2; p++) begin
      start[p] = 1'b0;
      for (int m = 0; m < 3; m++) begin
        err2[p][m] = 0.0;
        i_meas[p][m] = '0; i_ref[p][m] = '0;
      end
      nerr[p] = 0; n_done[p] = 0; n_improved[p] = 0; n_change[p] = 0;
      n_overrun[p] = 0; n_costs[p] = 0; last_gate[p] = '0; t_start[p] = 0;
      // Discrete load model with nominal R = 5 ohm: a = 1 - Ts(R+Rf)/Lf,
      // b = 3/4 Ts Vdc/Lf, c = -1/4 Ts Vdc/Lf; d = -1.
      ts = real'(sp[p]) * TCLK;
      ca[p] = fx(1.0 - ts * (5.0 + RF) / LF);
      cb[p] = fx(0.75 * ts * VDC / LF);
      cc[p] = fx(-0.25 * ts * VDC / LF);
    end
    cd = fx(-1.0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Closed loop, one mains period.
    fork
      for (int p = 0; p < 2; p++) begin
        automatic int q = p;
        fork
          begin
            while (cycle < 2000000) begin
              if (cycle % sp[q] == 0) begin
                take_sample(q);
                start[q] = 1'b1;
                @(negedge clk);
                start[q] = 1'b0;
              end else @(negedge clk);
              if (q == 0) measuring = (cycle >= 400000);
            end
          end
        join_none
      end
    join_none
    wait (cycle >= 2000000);
    @(negedge clk);
    measuring = 1'b0;
    repeat (10000) @(negedge clk);
    for (int p = 0; p < 2; p++) begin
      real rms;
      rms = 0.0;
      for (int m = 0; m < 3; m++) rms += err2[p][m];
      rms = $sqrt(rms / (3.0 * nerr[p]));
      $display("arch%0d: periods=%0d tracking RMS error %f A", p, n_done[p], rms);
      check(rms < 1.0, $sformatf("arch%0d tracking", p));
    end
    // Overrun phase: the 4-unit controller sampled faster than it computes.
    sp[0] = 4166;
    for (int n = 0; n < 6; n++) begin
      take_sample(0);
      start[0] = 1'b1;
      @(negedge clk);
      start[0] = 1'b0;
      repeat (4165) @(negedge clk);
    end
    repeat (6000) @(negedge clk);
    for (int p = 0; p < 2; p++) begin
      check(n_costs[p] == 16 * n_done[p], "16 costs per period");
      $display("arch%0d: done=%0d improved=%0d changes=%0d overruns=%0d", p, n_done[p],
               n_improved[p], n_change[p], n_overrun[p]);
      check(n_done[p] > 0 && n_improved[p] > 0 && n_change[p] > 0, "mechanisms seen");
    end
    check(n_overrun[0] > 0, "overrun seen");
    check(n_overrun[1] == 0, "no overrun at 24 kHz with six units");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
