// tb_cost_minimizer: self-checking test of the minimum-cost selector.
// Feeds periods of 16 costs (random, with ties, with negative and extreme
// values, spaced by random gaps) and checks j_op/g_op after every cost
// against a running minimum kept by the testbench, that the gates change only
// at the end of a period and then equal the arg-min (lowest index on ties),
// that gate_n is their complement and that done pulses exactly once.
module tb_cost_minimizer;
  localparam int WL = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cost_valid, cost_last, improved, done;
  logic [3:0] cost_idx, j_op, gate, gate_n;
  logic signed [WL-1:0] g, g_op;
  int checks = 0, failures = 0;

  cost_minimizer #(.WL(WL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic period(input int mode);
    longint best; int bj; logic [3:0] gate_before; int ndone;
    gate_before = gate;
    best = 0; bj = 0; ndone = 0;
    for (int j = 0; j < 16; j++) begin
      logic signed [WL-1:0] v;
      case (mode)
        0: v = WL'($urandom);
        1: v = WL'($urandom_range(5, 0));           // many ties
        2: v = WL'(32'sh7fffffff);                  // all equal: j_op = 0
        default: v = WL'(100 - j);                  // decreasing: j_op = 15
      endcase
      g = v; cost_idx = 4'(j); cost_last = (j == 15); cost_valid = 1'b1;
      #1;
      check(improved == (j == 0 || longint'(v) < best), "improved flag");
      if (j == 0 || longint'(v) < best) begin best = longint'(v); bj = j; end
      @(posedge clk); #1;
      cost_valid = 1'b0; g = WL'($urandom); cost_idx = 4'($urandom);
      check(j_op == 4'(bj) && longint'(g_op) == best, "running minimum");
      if (j < 15) check(gate == gate_before && !done, "gates hold inside a period");
      if (done) ndone++;
      repeat ($urandom_range(3, 0)) begin
        @(posedge clk); #1;
        if (done) ndone++;
      end
    end
    check(gate == 4'(bj), "gates = arg-min");
    check(gate_n == ~gate, "complementary gates");
    check(ndone == 1, "one done pulse");
    if (mode == 2) check(bj == 0, "tie keeps first");
  endtask

  initial begin
    cost_valid = 1'b0; cost_last = 1'b0; cost_idx = '0; g = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(gate == 4'b0000 && gate_n == 4'b1111, "reset gates");
    for (int p = 0; p < 40; p++) period(p % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
