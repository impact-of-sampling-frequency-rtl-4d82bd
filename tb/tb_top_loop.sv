// tb_top_loop: closed-loop harness used by tb_fsmpc_wordlength. It holds one
// fsmpc_top at word length WL (FRAC fractional bits) and one
// four_leg_inverter_model per controller, samples each controller at its
// fastest rate, one sample every CC + 1 cycles (CC = 16*N*WL), and tracks
// 9 A, 50 Hz balanced references for RUN_CYCLES clock cycles (100 MHz); the
// reference amplitude ramps up over the first 4 ms.
// Checks, counted on checks/failures: gates equal the arg-min of the
// integer cost model after every period, period latency CC + 2, no overrun
// at CC + 1, and overruns once the period is shortened to CC. rms[p] is the
// RMS tracking error (A) of controller p (0: four units, 1: six units) after
// a 4 ms start-up; fin goes high at the end.
module tb_top_loop
  import fsmpc_pkg::*;
  import tb_fsmpc_ref_pkg::*;
#(
  parameter int WL         = 32,
  parameter int FRAC       = 16,
  parameter int RUN_CYCLES = 2000000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output real  rms [2],
  output int   periods [2],
  output int   overruns [2],
  output logic fin
);
  localparam real VDC = 140.0, LF = 6.0e-3, RF = 0.05, IREF = 9.0, F0 = 50.0;
  localparam real TCLK = 10.0e-9;
  localparam real PI2 = 6.283185307179586;
  localparam int  SETTLE = 400000;

  logic                 start [2];
  logic signed [WL-1:0] i_meas [2][3], i_ref [2][3], ca [2], cb [2], cc [2], cd;
  logic [3:0]           gate [2], gate_n [2], cost_idx [2], j_op [2];
  logic                 done [2], busy [2], overrun [2], cost_valid [2], improved [2];
  logic signed [WL-1:0] g [2];
  real                  cur [2][3];

  fsmpc_top #(.WL(WL), .FRAC(FRAC)) dut (
    .clk, .rst_n,
    .a4_sample_start(start[0]), .a4_i_meas(i_meas[0]), .a4_i_ref(i_ref[0]),
    .a4_coef_a(ca[0]), .a4_coef_b(cb[0]), .a4_coef_c(cc[0]), .a4_coef_d(cd),
    .a4_gate(gate[0]), .a4_gate_n(gate_n[0]), .a4_done(done[0]), .a4_busy(busy[0]),
    .a4_overrun(overrun[0]), .a4_cost_valid(cost_valid[0]), .a4_cost_idx(cost_idx[0]),
    .a4_g(g[0]), .a4_improved(improved[0]), .a4_j_op(j_op[0]),
    .a6_sample_start(start[1]), .a6_i_meas(i_meas[1]), .a6_i_ref(i_ref[1]),
    .a6_coef_a(ca[1]), .a6_coef_b(cb[1]), .a6_coef_c(cc[1]),
    .a6_gate(gate[1]), .a6_gate_n(gate_n[1]), .a6_done(done[1]), .a6_busy(busy[1]),
    .a6_overrun(overrun[1]), .a6_cost_valid(cost_valid[1]), .a6_cost_idx(cost_idx[1]),
    .a6_g(g[1]), .a6_improved(improved[1]), .a6_j_op(j_op[1])
  );

  for (genvar p = 0; p < 2; p++) begin : g_plant
    four_leg_inverter_model #(.VDC(VDC), .LF(LF), .RF(RF), .TCLK(TCLK)) u_inv (
      .clk, .rst_n, .gate(gate[p]), .i_u(cur[p][0]), .i_v(cur[p][1]), .i_w(cur[p][2])
    );
  end

  function automatic logic signed [WL-1:0] fx(input real v);
    return WL'(longint'($floor(v * real'(longint'(1) << FRAC) + 0.5)));
  endfunction

  // The amplitude ramps up over the first SETTLE cycles (soft start), so
  // that the squared errors stay inside the number range at small WL.
  function automatic real iref_at(input real t, input int ph);
    real amp;
    amp = (t < SETTLE * TCLK) ? IREF * t / (SETTLE * TCLK) : IREF;
    return amp * $sin(PI2 * F0 * t - PI2 * ph / 3.0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL WL=%0d %s at %0t", WL, what, $time); end
  endtask

  longint cycle;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) cycle <= 0; else cycle <= cycle + 1;

  int     cc_cyc [2];
  int     sp [2];
  typedef struct {
    longint t_start;
    longint expc [16];
  } snap_t;
  snap_t  pend [2][$];       // accepted periods whose done is still to come
  real    err2 [2];
  int     nerr;

  always @(posedge clk) if (rst_n && cycle >= SETTLE && cycle < RUN_CYCLES
                            && cycle % 100 == 0) begin
    for (int p = 0; p < 2; p++)
      for (int m = 0; m < 3; m++) begin
        real e;
        e = cur[p][m] - iref_at(real'(cycle) * TCLK, m);
        err2[p] += e * e;
      end
    nerr++;
  end

  for (genvar p = 0; p < 2; p++) begin : g_chk
    always @(posedge clk) if (rst_n) begin
      if (overrun[p]) overruns[p]++;
      if (done[p]) begin
        int best;
        snap_t sn;
        check(pend[p].size() > 0, "done without a sample");
        if (pend[p].size() > 0) begin
          sn = pend[p].pop_front();
          best = 0;
          for (int j = 1; j < 16; j++) if (sn.expc[j] < sn.expc[best]) best = j;
          periods[p]++;
          check(gate[p] == 4'(best), "gates = arg-min");
          check(cycle - sn.t_start == longint'(cc_cyc[p] + SAMPLE_OVERHEAD), "latency");
        end
      end
    end
  end

  task automatic take_sample(input int p);
    longint ir [3], rr [3];
    real tnext;
    tnext = real'(cycle + sp[p]) * TCLK;
    for (int m = 0; m < 3; m++) begin
      i_meas[p][m] = fx(cur[p][m]);
      i_ref[p][m]  = fx(iref_at(tnext, m));
      ir[m] = longint'(i_meas[p][m]);
      rr[m] = longint'(i_ref[p][m]);
    end
    if (!busy[p]) begin
      snap_t sn;
      for (int j = 0; j < 16; j++)
        sn.expc[j] = (p == 0)
          ? cost4(ir, rr, longint'(ca[0]), longint'(cb[0]), longint'(cc[0]), longint'(cd),
                  4'(j), WL, FRAC)
          : cost6(ir, rr, longint'(ca[1]), longint'(cb[1]), longint'(cc[1]), 4'(j), WL, FRAC);
      sn.t_start = cycle;
      pend[p].push_back(sn);
    end
  endtask

  initial begin
    real ts;
    checks = 0; failures = 0; fin = 1'b0; nerr = 0; cd = fx(-1.0);
    for (int p = 0; p < 2; p++) begin
      cc_cyc[p] = int'(cycles_per_sample(p == 0 ? 4 : 6, WL));
      sp[p] = cc_cyc[p] + 1;
      start[p] = 1'b0; err2[p] = 0.0; periods[p] = 0; overruns[p] = 0;
      for (int m = 0; m < 3; m++) begin i_meas[p][m] = '0; i_ref[p][m] = '0; end
      ts = real'(sp[p]) * TCLK;
      ca[p] = fx(1.0 - ts * (5.0 + RF) / LF);
      cb[p] = fx(0.75 * ts * VDC / LF);
      cc[p] = fx(-0.25 * ts * VDC / LF);
    end
    wait (rst_n);
    @(negedge clk);
    for (int p = 0; p < 2; p++) begin
      fork
        automatic int q = p;
        begin
          automatic longint next;
          next = cycle;
          while (cycle < RUN_CYCLES) begin
            if (cycle == next) begin
              take_sample(q);
              start[q] = 1'b1;
              next += sp[q];
            end
            @(negedge clk);
            start[q] = 1'b0;
          end
        end
      join_none
    end
    wait (cycle >= RUN_CYCLES);
    repeat (6000) @(negedge clk);
    for (int p = 0; p < 2; p++) begin
      rms[p] = $sqrt(err2[p] / (3.0 * nerr));
      check(overruns[p] == 0, "no overrun at CC + 1 cycles per sample");
    end
    // One cycle shorter than the computation: samples are dropped.
    for (int n = 0; n < 4; n++) begin
      take_sample(0);
      start[0] = 1'b1;
      @(negedge clk);
      start[0] = 1'b0;
      repeat (cc_cyc[0] - 1) @(negedge clk);
    end
    repeat (cc_cyc[0] + 10) @(negedge clk);
    check(overruns[0] > 0, "overrun at CC cycles per sample");
    fin = 1'b1;
  end
endmodule
