// tb_mpc_control_unit: self-checking test of the sampling-period sequencer,
// for both schedule lengths (11 and 8 states) at WL = 32. An independent cycle
// counter predicts, for every busy cycle, the candidate, schedule state,
// first and last flags; the test checks that a period is busy for exactly
// CC = 16*N*WL cycles, that cost_valid pulses once per candidate with the
// right index one cycle after the candidate ends (cost_last on the 16th),
// that load accompanies an accepted sample_start only, and that a
// sample_start during a busy period is ignored and flagged on overrun.
module tb_mpc_control_unit;
  import fsmpc_pkg::*;

  localparam int WL = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_start;
  int checks = 0, failures = 0;

  logic       busy [2], load [2], run [2], first [2], last [2];
  logic [3:0] state [2], cand [2], cost_idx [2];
  logic       cost_valid [2], cost_last [2], overrun [2];

  mpc_control_unit #(.WL(WL), .N_STATES(STATES_4FU)) dut4 (
    .clk, .rst_n, .sample_start, .busy(busy[0]), .load(load[0]), .run(run[0]),
    .state(state[0]), .first(first[0]), .last(last[0]), .cand(cand[0]),
    .cost_valid(cost_valid[0]), .cost_idx(cost_idx[0]), .cost_last(cost_last[0]),
    .overrun(overrun[0])
  );
  mpc_control_unit #(.WL(WL), .N_STATES(STATES_6FU)) dut6 (
    .clk, .rst_n, .sample_start, .busy(busy[1]), .load(load[1]), .run(run[1]),
    .state(state[1]), .first(first[1]), .last(last[1]), .cand(cand[1]),
    .cost_valid(cost_valid[1]), .cost_idx(cost_idx[1]), .cost_last(cost_last[1]),
    .overrun(overrun[1])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run one period on unit u with n schedule states; inject a second start
  // in the middle to provoke an overrun.
  task automatic period(input int u, input int n);
    int cc, t, nvalid, nover;
    cc = N_CAND * n * WL;
    sample_start = 1'b1;
    #1;
    check(load[u] && !busy[u], "load with accepted sample_start");
    @(posedge clk); #1;
    sample_start = 1'b0;
    nvalid = 0; nover = 0;
    for (t = 0; t < cc + 4; t++) begin
      int j, st, c;
      j = t / (n * WL); st = (t / WL) % n; c = t % WL;
      if (t < cc) begin
        check(busy[u] && !load[u], "busy during period");
        check(cand[u] == 4'(j) && state[u] == 4'(st), "candidate/state sequence");
        check(first[u] == (c == 0) && last[u] == (c == WL - 1), "first/last flags");
      end else begin
        check(!busy[u], "idle after CC cycles");
      end
      if (cost_valid[u]) begin
        check(t == (nvalid + 1) * n * WL, "cost_valid timing");
        check(cost_idx[u] == 4'(nvalid), "cost_idx");
        check(cost_last[u] == (nvalid == N_CAND - 1), "cost_last");
        nvalid++;
      end
      if (overrun[u]) nover++;
      sample_start = (t == cc / 2);
      @(posedge clk); #1;
      sample_start = 1'b0;
    end
    check(nvalid == N_CAND, "16 costs per period");
    check(nover == 1, "overrun flagged once");
  endtask

  initial begin
    sample_start = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(!busy[0] && !busy[1], "idle after reset");
    period(0, STATES_4FU);
    repeat (5) @(posedge clk);
    #1;
    // dut4 is idle again; dut6 started with the previous pulses, let it end.
    wait (!busy[1]);
    @(posedge clk); #1;
    period(1, STATES_6FU);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
