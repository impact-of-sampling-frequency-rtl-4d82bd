// four_leg_inverter_model: behavioural model (not synthesizable) of a
// two-level four-leg inverter feeding star-connected RL loads, used to close
// the control loop in simulation.
//
// Each leg m in {u, v, w, x} connects its output to Vdc when gate bit
// (3 = u, 2 = v, 1 = w, 0 = x) is 1, else to the negative rail N. Each leg
// drives Rf + Lf + R_m into the common load neutral n. With all Lf equal, the
// neutral voltage is v_nN = (sum of (v_mN - (Rf+R_m) i_m)) / 4 and the
// currents follow L di_m/dt = v_mN - v_nN - (Rf+R_m) i_m, with
// i_x = -(i_u + i_v + i_w). The model integrates this with forward Euler
// every STEP_CYCLES clock cycles of period TCLK. Defaults: Vdc = 140 V,
// Rf = 0.05 ohm, Lf = 6 mH, Ru = 5, Rv = 3.5, Rw = 4, Rx = 5 ohm.
module four_leg_inverter_model #(
  parameter real VDC         = 140.0,
  parameter real LF          = 6.0e-3,
  parameter real RF          = 0.05,
  parameter real RU          = 5.0,
  parameter real RV          = 3.5,
  parameter real RW          = 4.0,
  parameter real RX          = 5.0,
  parameter real TCLK        = 10.0e-9,
  parameter int  STEP_CYCLES = 100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] gate,
  output real        i_u,
  output real        i_v,
  output real        i_w
);

  real cur [3];
  int  div;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur[0] <= 0.0; cur[1] <= 0.0; cur[2] <= 0.0;
      div <= 0;
    end else if (div == STEP_CYCLES - 1) begin
      real r [4], i4 [4], v [4], vn, dt;
      div <= 0;
      dt = TCLK * STEP_CYCLES;
      r[0] = RF + RU; r[1] = RF + RV; r[2] = RF + RW; r[3] = RF + RX;
      i4[0] = cur[0]; i4[1] = cur[1]; i4[2] = cur[2];
      i4[3] = -(cur[0] + cur[1] + cur[2]);
      vn = 0.0;
      for (int m = 0; m < 4; m++) begin
        v[m] = gate[3 - m] ? VDC : 0.0;
        vn += (v[m] - r[m] * i4[m]) / 4.0;
      end
      for (int m = 0; m < 3; m++) cur[m] <= cur[m] + dt / LF * (v[m] - vn - r[m] * i4[m]);
    end else begin
      div <= div + 1;
    end
  end

  assign i_u = cur[0];
  assign i_v = cur[1];
  assign i_w = cur[2];

endmodule
