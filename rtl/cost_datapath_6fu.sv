// cost_datapath_6fu: cost-function datapath with six functional units (three
// adders, three multipliers) and three holding registers REG1..REG3,
// scheduled over 8 states.
//
// Unit k (k = 0, 1, 2) works on phase w, v, u respectively. For the switching
// state s it predicts
//   i_m(k+1) = a*i_m(k) + b*S_m + c*(sum of the other three S),  m = u, v, w
// forms e_m = i_m*(k+1) - i_m(k+1) and the cost g = e_u^2 + e_v^2 + e_w^2.
// The operations, their grouping into states 0..7 and REG1..REG3 (holding
// a*i_m over state 1) follow the published 6-unit schedule; the subtraction
// in state 4 and the binding of operations to units are this design's
// choices. Timing is as in cost_datapath_4fu: every state lasts WL cycles
// (first = cycle 0, last = cycle WL-1), results appear at the edge that ends
// a state, and g is valid from the end of state 7 until ADD0 finishes state 0
// of the next candidate. coef_d is unused by this schedule and not a port.
module cost_datapath_6fu
  import fsmpc_pkg::*;
#(
  parameter int unsigned WL   = 32,
  parameter int unsigned FRAC = WL / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [WL-1:0] i_meas [3],
  input  logic signed [WL-1:0] i_ref  [3],
  input  logic signed [WL-1:0] coef_a,
  input  logic signed [WL-1:0] coef_b,
  input  logic signed [WL-1:0] coef_c,
  input  logic [N_SWITCHES-1:0] s,
  input  logic [3:0]           state,   // schedule state 0..7
  input  logic                 run,
  input  logic                 first,
  input  logic                 last,
  output logic signed [WL-1:0] g
);

  localparam logic signed [WL-1:0] ONE = WL'(1) << FRAC;

  typedef logic signed [WL-1:0] word_t;

  word_t i_k [3], r_k [3], s_k [3];   // per unit: measured, reference, own switch
  word_t su, sv, sw, sx;
  word_t hold [3];                    // REG1, REG2, REG3

  word_t add_a [3], add_b [3], add_y [3];
  word_t mul_a [3], mul_b [3], mul_y [3];
  logic  add_en [3], mul_en [3], add_sub [3];
  logic  ld_hold;

  // Unit 0 = w, unit 1 = v, unit 2 = u.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin
        i_k[k] <= '0;
        r_k[k] <= '0;
      end
    end else if (load) begin
      i_k[0] <= i_meas[PH_W]; r_k[0] <= i_ref[PH_W];
      i_k[1] <= i_meas[PH_V]; r_k[1] <= i_ref[PH_V];
      i_k[2] <= i_meas[PH_U]; r_k[2] <= i_ref[PH_U];
    end
  end

  assign su = s[SW_U] ? ONE : '0;
  assign sv = s[SW_V] ? ONE : '0;
  assign sw = s[SW_W] ? ONE : '0;
  assign sx = s[SW_X] ? ONE : '0;
  assign s_k[0] = sw;
  assign s_k[1] = sv;
  assign s_k[2] = su;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      add_en[k] = 1'b0; add_sub[k] = 1'b0; add_a[k] = '0; add_b[k] = '0;
      mul_en[k] = 1'b0; mul_a[k] = '0; mul_b[k] = '0;
    end
    ld_hold = 1'b0;
    unique case (state)
      4'd0: begin
        for (int k = 0; k < 3; k++) begin
          mul_en[k] = 1'b1; mul_a[k] = i_k[k]; mul_b[k] = coef_a;
          add_en[k] = 1'b1;
        end
        // Two of the three other switches of each phase (sx joins in state 1).
        add_a[0] = su; add_b[0] = sv;   // for w
        add_a[1] = su; add_b[1] = sw;   // for v
        add_a[2] = sw; add_b[2] = sv;   // for u
      end
      4'd1: begin
        for (int k = 0; k < 3; k++) begin
          mul_en[k] = 1'b1; mul_a[k] = s_k[k];   mul_b[k] = coef_b;
          add_en[k] = 1'b1; add_a[k] = add_y[k]; add_b[k] = sx;
        end
        ld_hold = 1'b1;                  // REGk <= a*i_m
      end
      4'd2: begin
        for (int k = 0; k < 3; k++) begin
          add_en[k] = 1'b1; add_a[k] = mul_y[k]; add_b[k] = hold[k];  // b*S + a*i
          mul_en[k] = 1'b1; mul_a[k] = add_y[k]; mul_b[k] = coef_c;   // c-term
        end
      end
      4'd3: begin
        for (int k = 0; k < 3; k++) begin
          add_en[k] = 1'b1; add_a[k] = add_y[k]; add_b[k] = mul_y[k]; // prediction
        end
      end
      4'd4: begin
        for (int k = 0; k < 3; k++) begin
          add_en[k] = 1'b1; add_sub[k] = 1'b1;
          add_a[k] = r_k[k]; add_b[k] = add_y[k];                     // error
        end
      end
      4'd5: begin
        for (int k = 0; k < 3; k++) begin
          mul_en[k] = 1'b1; mul_a[k] = add_y[k]; mul_b[k] = add_y[k]; // error^2
        end
      end
      4'd6: begin
        add_en[1] = 1'b1; add_a[1] = mul_y[1]; add_b[1] = mul_y[2];   // e_v^2+e_u^2
      end
      4'd7: begin
        add_en[0] = 1'b1; add_a[0] = mul_y[0]; add_b[0] = add_y[1];   // g
      end
      default: ;
    endcase
    if (!run) begin
      for (int k = 0; k < 3; k++) begin
        add_en[k] = 1'b0;
        mul_en[k] = 1'b0;
      end
      ld_hold = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) hold[k] <= '0;
    end else if (last && ld_hold) begin
      for (int k = 0; k < 3; k++) hold[k] <= mul_y[k];
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_fu
    serial_adder #(.WL(WL)) u_add (
      .clk, .rst_n, .en(add_en[k]), .first, .last, .sub(add_sub[k]),
      .a(add_a[k]), .b(add_b[k]), .y(add_y[k])
    );
    serial_multiplier #(.WL(WL), .FRAC(FRAC)) u_mul (
      .clk, .rst_n, .en(mul_en[k]), .first, .last,
      .a(mul_a[k]), .b(mul_b[k]), .y(mul_y[k])
    );
  end

  assign g = add_y[0];

endmodule
