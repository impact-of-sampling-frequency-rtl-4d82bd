// fsmpc_top: the two FS-MPC controller architectures for the four-leg
// inverter side by side, so that they can be compared on the same clock.
//
// a4_* is the controller with four functional units (11 states per switching
// state, CC = 16*11*WL cycles per sample), a6_* the one with six functional
// units (8 states, CC = 16*8*WL). Each has its own measured/reference current
// inputs, coefficients, sample_start and gate outputs; see fsmpc_controller
// for the interface and timing. The inverter power stage and the current
// A/D converters are outside this design: their signals are the ports.
module fsmpc_top
  import fsmpc_pkg::*;
#(
  parameter int unsigned WL   = 32,
  parameter int unsigned FRAC = WL / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // four-functional-unit controller
  input  logic                  a4_sample_start,
  input  logic signed [WL-1:0]  a4_i_meas [3],
  input  logic signed [WL-1:0]  a4_i_ref  [3],
  input  logic signed [WL-1:0]  a4_coef_a,
  input  logic signed [WL-1:0]  a4_coef_b,
  input  logic signed [WL-1:0]  a4_coef_c,
  input  logic signed [WL-1:0]  a4_coef_d,
  output logic [N_SWITCHES-1:0] a4_gate,
  output logic [N_SWITCHES-1:0] a4_gate_n,
  output logic                  a4_done,
  output logic                  a4_busy,
  output logic                  a4_overrun,
  output logic                  a4_cost_valid,
  output logic [N_SWITCHES-1:0] a4_cost_idx,
  output logic signed [WL-1:0]  a4_g,
  output logic                  a4_improved,
  output logic [N_SWITCHES-1:0] a4_j_op,
  output logic signed [WL-1:0]  a4_g_op,
  // six-functional-unit controller
  input  logic                  a6_sample_start,
  input  logic signed [WL-1:0]  a6_i_meas [3],
  input  logic signed [WL-1:0]  a6_i_ref  [3],
  input  logic signed [WL-1:0]  a6_coef_a,
  input  logic signed [WL-1:0]  a6_coef_b,
  input  logic signed [WL-1:0]  a6_coef_c,
  output logic [N_SWITCHES-1:0] a6_gate,
  output logic [N_SWITCHES-1:0] a6_gate_n,
  output logic                  a6_done,
  output logic                  a6_busy,
  output logic                  a6_overrun,
  output logic                  a6_cost_valid,
  output logic [N_SWITCHES-1:0] a6_cost_idx,
  output logic signed [WL-1:0]  a6_g,
  output logic                  a6_improved,
  output logic [N_SWITCHES-1:0] a6_j_op,
  output logic signed [WL-1:0]  a6_g_op
);

  fsmpc_controller #(.NUM_FU(4), .WL(WL), .FRAC(FRAC)) u_arch4 (
    .clk, .rst_n, .sample_start(a4_sample_start), .i_meas(a4_i_meas),
    .i_ref(a4_i_ref), .coef_a(a4_coef_a), .coef_b(a4_coef_b),
    .coef_c(a4_coef_c), .coef_d(a4_coef_d), .gate(a4_gate),
    .gate_n(a4_gate_n), .done(a4_done), .busy(a4_busy),
    .overrun(a4_overrun), .cost_valid(a4_cost_valid),
    .cost_idx(a4_cost_idx), .g(a4_g), .improved(a4_improved),
    .j_op(a4_j_op), .g_op(a4_g_op)
  );

  fsmpc_controller #(.NUM_FU(6), .WL(WL), .FRAC(FRAC)) u_arch6 (
    .clk, .rst_n, .sample_start(a6_sample_start), .i_meas(a6_i_meas),
    .i_ref(a6_i_ref), .coef_a(a6_coef_a), .coef_b(a6_coef_b),
    .coef_c(a6_coef_c), .coef_d('0), .gate(a6_gate),
    .gate_n(a6_gate_n), .done(a6_done), .busy(a6_busy),
    .overrun(a6_overrun), .cost_valid(a6_cost_valid),
    .cost_idx(a6_cost_idx), .g(a6_g), .improved(a6_improved),
    .j_op(a6_j_op), .g_op(a6_g_op)
  );

endmodule
