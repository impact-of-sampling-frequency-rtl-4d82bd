// tb_fsmpc_wordlength: the word-length / sampling-frequency sweep. Both
// controllers are run in closed loop at WL = 8, 16, 24 and 32 bits, each at
// its maximum sampling rate f_s = 100 MHz / (16*N*WL + 1), for one 50 Hz
// mains period, with FRAC = WL - 5 fractional bits so that every word length
// covers the +-16 A range of the 9 A reference. Prints the sampling rate and
// the RMS tracking error of each case and checks the per-period results of
// every case (see tb_top_loop) and that the tracking error stays below 1.5 A
// for WL >= 16. At WL = 8 the tracking error is only reported: with 3
// fractional bits the coupling coefficient c of the 97.6 kHz six-unit loop
// (-0.06) rounds to zero and that loop does not track.
module tb_fsmpc_wordlength;
  localparam int NW = 4;
  localparam int WLS [NW] = '{8, 16, 24, 32};

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks, failures;
  int   c [NW], f [NW], per [NW][2], ovr [NW][2];
  real  rms [NW][2];
  logic fin [NW];

  always #5 clk = ~clk;

  for (genvar w = 0; w < NW; w++) begin : g_wl
    tb_top_loop #(.WL(WLS[w]), .FRAC(WLS[w] - 5)) u_loop (
      .clk, .rst_n, .checks(c[w]), .failures(f[w]), .rms(rms[w]), .periods(per[w]),
      .overruns(ovr[w]), .fin(fin[w])
    );
  end

  initial begin
    #60ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = 0; failures = 0;
    $display("  WL  units  f_s (kHz)  periods  RMS error (A)");
    for (int w = 0; w < NW; w++) begin
      checks += c[w]; failures += f[w];
      for (int p = 0; p < 2; p++) begin
        real fs;
        fs = 1.0e5 / real'(16 * (p == 0 ? 11 : 8) * WLS[w] + 1);
        $display("  %2d  %0d      %7.2f    %5d    %f", WLS[w], p == 0 ? 4 : 6, fs,
                 per[w][p], rms[w][p]);
        // At WL = 8 (FRAC = 3) the coefficient c of the six-unit loop at
        // 97.6 kHz rounds to zero; tracking is reported, not required.
        if (WLS[w] == 8) continue;
        checks++;
        if (!(rms[w][p] < 1.5)) begin
          failures++;
          $display("FAIL tracking WL=%0d units=%0d", WLS[w], p == 0 ? 4 : 6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
