// mpc_control_unit: sequencer of one FS-MPC sampling period.
//
// A pulse on sample_start while idle starts a period: load is asserted in
// that cycle so the datapath latches the measured and reference currents.
// The unit then walks the candidate switching states j = 0..15 and, for each,
// the N_STATES schedule states of the datapath, each lasting WL cycles, i.e.
// CC = 16 * N_STATES * WL busy cycles. first and last mark cycle 0 and cycle
// WL-1 of a state. One cycle after the last state of candidate j ends,
// cost_valid pulses with cost_idx = j (cost_last for j = 15), when the
// datapath's g belongs to j. A sample_start that arrives while busy (the
// computation is longer than the sampling period) is ignored and reported on
// overrun. The loop structure follows the published flowchart; the handshake
// and the overrun flag are this design's choices.
module mpc_control_unit
  import fsmpc_pkg::*;
#(
  parameter int unsigned WL       = 32,
  parameter int unsigned N_STATES = STATES_4FU
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample_start,
  output logic                  busy,
  output logic                  load,
  output logic                  run,
  output logic [3:0]            state,
  output logic                  first,
  output logic                  last,
  output logic [N_SWITCHES-1:0] cand,
  output logic                  cost_valid,
  output logic [N_SWITCHES-1:0] cost_idx,
  output logic                  cost_last,
  output logic                  overrun
);

  localparam int unsigned CW = (WL > 1) ? $clog2(WL) : 1;

  typedef enum logic {IDLE, RUN} phase_e;

  phase_e        phase;
  logic [CW-1:0] cnt;
  logic          cand_end;

  assign run   = (phase == RUN);
  assign busy  = run;
  assign load  = (phase == IDLE) && sample_start;
  assign first = run && (cnt == '0);
  assign last  = run && (cnt == CW'(WL - 1));
  assign cand_end = last && (state == 4'(N_STATES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= IDLE;
      cnt        <= '0;
      state      <= '0;
      cand       <= '0;
      cost_valid <= 1'b0;
      cost_idx   <= '0;
      cost_last  <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      cost_valid <= 1'b0;
      cost_last  <= 1'b0;
      overrun    <= run && sample_start;
      unique case (phase)
        IDLE: if (sample_start) begin
          phase <= RUN;
          cnt   <= '0;
          state <= '0;
          cand  <= '0;
        end
        RUN: begin
          if (!last) begin
            cnt <= cnt + 1'b1;
          end else begin
            cnt <= '0;
            if (!cand_end) begin
              state <= state + 1'b1;
            end else begin
              state      <= '0;
              cost_valid <= 1'b1;
              cost_idx   <= cand;
              cost_last  <= (cand == N_SWITCHES'(N_CAND - 1));
              if (cand == N_SWITCHES'(N_CAND - 1)) phase <= IDLE;
              else                                 cand  <= cand + 1'b1;
            end
          end
        end
        default: phase <= IDLE;
      endcase
    end
  end

  // A cost is reported exactly one cycle after a candidate's last state ends.
  a_cost_after_candidate: assert property (@(posedge clk) disable iff (!rst_n)
    cost_valid |-> $past(cand_end));

endmodule
