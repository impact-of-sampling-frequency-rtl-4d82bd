// tb_fsmpc_controller: self-checking test of the complete controller in both
// configurations (4 and 6 functional units) at WL = 32. For random samples of
// measured and reference currents it checks each reported candidate cost
// against the integer model, that the gates after done select the lowest
// cost (lowest index on ties) with complementary lower-switch signals, and
// that done comes exactly CC + SAMPLE_OVERHEAD cycles after sample_start,
// CC = 16*N*WL.
module tb_fsmpc_controller;
  import fsmpc_pkg::*;
  import tb_fsmpc_ref_pkg::*;

  localparam int WL = 32;
  localparam int FRAC = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_start;
  logic signed [WL-1:0] i_meas [3], i_ref [3], ca, cb, cc, cd;
  int checks = 0, failures = 0;

  logic [3:0] gate [2], gate_n [2], cost_idx [2], j_op [2];
  logic       done [2], busy [2], overrun [2], cost_valid [2], improved [2];
  logic signed [WL-1:0] g [2];

  fsmpc_controller #(.NUM_FU(4), .WL(WL), .FRAC(FRAC)) dut4 (
    .clk, .rst_n, .sample_start, .i_meas, .i_ref, .coef_a(ca), .coef_b(cb),
    .coef_c(cc), .coef_d(cd), .gate(gate[0]), .gate_n(gate_n[0]), .done(done[0]),
    .busy(busy[0]), .overrun(overrun[0]), .cost_valid(cost_valid[0]),
    .cost_idx(cost_idx[0]), .g(g[0]), .improved(improved[0]), .j_op(j_op[0])
  );
  fsmpc_controller #(.NUM_FU(6), .WL(WL), .FRAC(FRAC)) dut6 (
    .clk, .rst_n, .sample_start, .i_meas, .i_ref, .coef_a(ca), .coef_b(cb),
    .coef_c(cc), .coef_d(cd), .gate(gate[1]), .gate_n(gate_n[1]), .done(done[1]),
    .busy(busy[1]), .overrun(overrun[1]), .cost_valid(cost_valid[1]),
    .cost_idx(cost_idx[1]), .g(g[1]), .improved(improved[1]), .j_op(j_op[1])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic sample();
    longint ir [3], rr [3], exp4 [16], exp6 [16];
    int best4, best6, t, seen4, seen6, t4, t6;
    for (int k = 0; k < 3; k++) begin
      i_meas[k] = WL'($signed($urandom) >>> 12);
      i_ref[k]  = WL'($signed($urandom) >>> 12);
      ir[k] = longint'(i_meas[k]);
      rr[k] = longint'(i_ref[k]);
    end
    best4 = 0; best6 = 0;
    for (int j = 0; j < 16; j++) begin
      exp4[j] = cost4(ir, rr, longint'(ca), longint'(cb), longint'(cc), longint'(cd),
                      4'(j), WL, FRAC);
      exp6[j] = cost6(ir, rr, longint'(ca), longint'(cb), longint'(cc), 4'(j), WL, FRAC);
      if (exp4[j] < exp4[best4]) best4 = j;
      if (exp6[j] < exp6[best6]) best6 = j;
    end
    sample_start = 1'b1;
    @(posedge clk); #1;
    sample_start = 1'b0;
    // Inputs may change once latched.
    for (int k = 0; k < 3; k++) begin i_meas[k] = WL'($urandom); i_ref[k] = WL'($urandom); end
    seen4 = 0; seen6 = 0; t4 = -1; t6 = -1;
    for (t = 1; t < cycles_per_sample(4, WL) + 10; t++) begin
      if (cost_valid[0]) begin
        check(longint'(g[0]) == exp4[cost_idx[0]], "4-unit candidate cost");
        seen4++;
      end
      if (cost_valid[1]) begin
        check(longint'(g[1]) == exp6[cost_idx[1]], "6-unit candidate cost");
        seen6++;
      end
      if (done[0]) t4 = t;
      if (done[1]) t6 = t;
      @(posedge clk); #1;
    end
    check(seen4 == 16 && seen6 == 16, "16 costs each");
    check(t4 == int'(cycles_per_sample(4, WL) + SAMPLE_OVERHEAD), "4-unit latency");
    check(t6 == int'(cycles_per_sample(6, WL) + SAMPLE_OVERHEAD), "6-unit latency");
    check(gate[0] == 4'(best4) && gate_n[0] == ~gate[0], "4-unit gates");
    check(gate[1] == 4'(best6) && gate_n[1] == ~gate[1], "6-unit gates");
    if (t4 != int'(cycles_per_sample(4, WL) + SAMPLE_OVERHEAD))
      $display("  latency4 = %0d", t4);
  endtask

  initial begin
    sample_start = 1'b0;
    for (int k = 0; k < 3; k++) begin i_meas[k] = '0; i_ref[k] = '0; end
    ca = 32'sd62290;   // ~0.9505
    cb = 32'sd67450;   // ~1.029
    cc = -32'sd22483;  // ~-0.343
    cd = -32'sd65536;  // -1.0
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    repeat (12) sample();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
