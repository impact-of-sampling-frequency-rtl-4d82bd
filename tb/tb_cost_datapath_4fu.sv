// tb_cost_datapath_4fu: self-checking test of the 4-unit cost datapath.
// The testbench plays the control unit: it latches a sample of measured and
// reference currents, then for each of the 16 switching states steps the
// schedule through its 11 states of WL cycles and compares g with an integer
// model of the cost computed from the prediction equations. It checks that g
// appears exactly 11*WL cycles after a candidate starts and is still
// valid during state 0 of the next candidate. Samples use realistic inverter
// values (load model of a 6 mH / 5 ohm leg at 17 kHz) and random or
// saturating values.
module tb_cost_datapath_4fu;
  import fsmpc_pkg::*;
  import tb_fsmpc_ref_pkg::*;

  localparam int WL = 32;
  localparam int FRAC = 16;
  localparam int NST = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, run, first, last;
  logic [3:0] state;
  logic [3:0] s;
  logic signed [WL-1:0] i_meas [3], i_ref [3];
  logic signed [WL-1:0] ca, cb, cc, cd, g;
  int checks = 0, failures = 0;

  cost_datapath_4fu #(.WL(WL), .FRAC(FRAC)) dut (
    .clk, .rst_n, .load, .i_meas, .i_ref, .coef_a(ca), .coef_b(cb), .coef_c(cc),
    .coef_d(cd), .s, .state, .run, .first, .last, .g
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [WL-1:0] fx(input real v);
    return WL'($rtoi(v * real'(1 << FRAC)));
  endfunction

  task automatic run_sample();
    longint ir [3], rr [3], expv, prev_exp;
    for (int k = 0; k < 3; k++) begin
      ir[k] = longint'(i_meas[k]);
      rr[k] = longint'(i_ref[k]);
    end
    load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    prev_exp = 0;
    for (int j = 0; j < N_CAND; j++) begin
      s = 4'(j);
      for (int st = 0; st < NST; st++) begin
        for (int c = 0; c < WL; c++) begin
          run = 1'b1; state = 4'(st); first = (c == 0); last = (c == WL - 1);
          @(posedge clk); #1;
          // Previous candidate's g must still be valid during state 0.
          if (j > 0 && st == 0 && c < WL - 1) begin
            checks++;
            if (longint'(g) != prev_exp) begin
              failures++;
              $display("FAIL g of candidate %0d not held in next state 0", j - 1);
            end
          end
        end
      end
      expv = cost4(ir, rr, ca, cb, cc, cd, s, WL, FRAC);
      checks++;
      if (longint'(g) != expv) begin
        failures++;
        $display("FAIL s=%b g=%0d exp %0d", s, g, expv);
      end
      prev_exp = expv;
    end
    run = 1'b0; first = 1'b0; last = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    load = 1'b0; run = 1'b0; first = 1'b0; last = 1'b0; state = '0; s = '0;
    for (int k = 0; k < 3; k++) begin i_meas[k] = '0; i_ref[k] = '0; end
    ca = '0; cb = '0; cc = '0; cd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // Load model: a = 1 - Ts*(R+Rf)/Lf, b = 3/4*Ts*Vdc/Lf, c = -1/4*Ts*Vdc/Lf.
    ca = fx(1.0 - (5.05 / 17000.0) / 0.006);
    cb = fx(0.75 * 140.0 / 17000.0 / 0.006);
    cc = fx(-0.25 * 140.0 / 17000.0 / 0.006);
    cd = fx(-1.0);
    for (int n = 0; n < 6; n++) begin
      for (int k = 0; k < 3; k++) begin
        i_meas[k] = fx(9.0 * $sin(6.2832 * (n / 6.0 + k / 3.0)));
        i_ref[k]  = fx(9.0 * $sin(6.2832 * (n / 6.0 + k / 3.0) + 0.05));
      end
      run_sample();
    end
    // Random coefficients and currents, including saturating magnitudes.
    for (int n = 0; n < 4; n++) begin
      ca = WL'($signed($urandom) >>> (n * 4)); cb = WL'($signed($urandom) >>> (n * 4));
      cc = WL'($signed($urandom) >>> (n * 4)); cd = WL'($signed($urandom) >>> (n * 4));
      for (int k = 0; k < 3; k++) begin
        i_meas[k] = WL'($signed($urandom) >>> (n * 4));
        i_ref[k]  = WL'($signed($urandom) >>> (n * 4));
      end
      run_sample();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
