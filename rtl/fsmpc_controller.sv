// fsmpc_controller: finite-set model predictive current controller for a
// two-level four-leg inverter, built from a control unit, a cost datapath
// (registers and functional units) and a cost minimiser.
//
// NUM_FU selects the datapath: 4 (two adders, two multipliers, 11 states,
// cost includes the predicted neutral current) or 6 (three adders, three
// multipliers, 8 states). All numbers are signed fixed point with WL bits,
// FRAC of them fractional. A sample_start pulse latches i_meas and i_ref;
// the 16 switching states are costed one after another and, after
// CC = 16 * N * WL cycles plus SAMPLE_OVERHEAD, gate/gate_n change to the
// state of lowest cost and done pulses. cost_valid/cost_idx/g expose every
// candidate's cost; j_op/g_op the best candidate and cost so far. The
// coefficients a, b, c (and d, 4-unit datapath only; unused with 6 units)
// are static inputs: a = 1 - Ts*(R+Rf)/Lf, b and c the weights of the leg's
// own and the other legs' switch states, d = -1 for the error.
module fsmpc_controller
  import fsmpc_pkg::*;
#(
  parameter int unsigned NUM_FU = 4,
  parameter int unsigned WL     = 32,
  parameter int unsigned FRAC   = WL / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample_start,
  input  logic signed [WL-1:0]  i_meas [3],
  input  logic signed [WL-1:0]  i_ref  [3],
  input  logic signed [WL-1:0]  coef_a,
  input  logic signed [WL-1:0]  coef_b,
  input  logic signed [WL-1:0]  coef_c,
  input  logic signed [WL-1:0]  coef_d,
  output logic [N_SWITCHES-1:0] gate,
  output logic [N_SWITCHES-1:0] gate_n,
  output logic                  done,
  output logic                  busy,
  output logic                  overrun,
  output logic                  cost_valid,
  output logic [N_SWITCHES-1:0] cost_idx,
  output logic signed [WL-1:0]  g,
  output logic                  improved,
  output logic [N_SWITCHES-1:0] j_op,
  output logic signed [WL-1:0]  g_op
);

  localparam int unsigned N_STATES = states_for(NUM_FU);

  logic                  load, run, first, last, cost_last;
  logic [3:0]            state;
  logic [N_SWITCHES-1:0] cand;

  mpc_control_unit #(.WL(WL), .N_STATES(N_STATES)) u_ctrl (
    .clk, .rst_n, .sample_start, .busy, .load, .run, .state, .first, .last,
    .cand, .cost_valid, .cost_idx, .cost_last, .overrun
  );

  if (NUM_FU == 6) begin : g_6fu
    cost_datapath_6fu #(.WL(WL), .FRAC(FRAC)) u_dp (
      .clk, .rst_n, .load, .i_meas, .i_ref, .coef_a, .coef_b, .coef_c,
      .s(cand), .state, .run, .first, .last, .g
    );
  end else begin : g_4fu
    cost_datapath_4fu #(.WL(WL), .FRAC(FRAC)) u_dp (
      .clk, .rst_n, .load, .i_meas, .i_ref, .coef_a, .coef_b, .coef_c, .coef_d,
      .s(cand), .state, .run, .first, .last, .g
    );
  end

  cost_minimizer #(.WL(WL)) u_min (
    .clk, .rst_n, .cost_valid, .cost_idx, .cost_last, .g, .g_op, .j_op,
    .improved, .gate, .gate_n, .done
  );

endmodule
