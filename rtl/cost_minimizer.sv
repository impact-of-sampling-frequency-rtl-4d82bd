// cost_minimizer: keeps the lowest cost of a sampling period and applies the
// winning switching state to the inverter gates.
//
// On every cost_valid pulse the cost g of candidate cost_idx is compared with
// the best cost so far, g_op. Candidate 0 is always taken (g_op starts at
// "infinity"); a later candidate replaces the best only if g < g_op, so the
// lowest index wins a tie. On the pulse that carries cost_last the best
// index j_op is registered on gate (bit 3 = Su .. bit 0 = Sx) with gate_n its
// complement for the lower switches, and done pulses one cycle. The compare
// and select steps follow the published flowchart; the tie rule, the reset
// state of the gates (all lower switches on) and the complementary outputs
// without dead time are this design's choices.
module cost_minimizer
  import fsmpc_pkg::*;
#(
  parameter int unsigned WL = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cost_valid,
  input  logic [N_SWITCHES-1:0] cost_idx,
  input  logic                  cost_last,
  input  logic signed [WL-1:0]  g,
  output logic signed [WL-1:0]  g_op,
  output logic [N_SWITCHES-1:0] j_op,
  output logic                  improved,   // this cost replaced the best
  output logic [N_SWITCHES-1:0] gate,
  output logic [N_SWITCHES-1:0] gate_n,
  output logic                  done
);

  logic                  take;
  logic [N_SWITCHES-1:0] best_idx;

  assign take     = cost_valid && ((cost_idx == '0) || (g < g_op));
  assign best_idx = take ? cost_idx : j_op;
  assign improved = take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_op <= '0;
      j_op <= '0;
      gate <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (take) begin
        g_op <= g;
        j_op <= cost_idx;
      end
      if (cost_valid && cost_last) begin
        gate <= best_idx;
        done <= 1'b1;
      end
    end
  end

  assign gate_n = ~gate;

endmodule
