// cost_datapath_4fu: cost-function datapath with four functional units (two
// adders ADD0/ADD1, two multipliers MUL0/MUL1) and three holding registers
// REG1..REG3, scheduled over 11 states.
//
// For the switching state s it predicts the next load currents
//   i_m(k+1) = a*i_m(k) + b*S_m + c*(sum of the other three S),  m = u, v, w
// (a, b, c are the coefficients of the discretised load model), forms the
// errors e_m = i_m*(k+1) + d*i_m(k+1) (d is normally -1) and the cost
//   g = e_u^2 + e_v^2 + e_w^2 + (i_u(k+1) + i_v(k+1) + i_w(k+1))^2,
// where the last term is the square of the predicted neutral-leg current.
// The operations, their grouping into states 0..10 and the use of REG1..REG3
// follow the published 4-unit schedule; which physical unit runs each
// operation is this design's binding. Every state lasts WL cycles: the control
// unit drives state, first (cycle 0 of a state) and last (cycle WL-1); unit
// results and REG loads take effect at the clock edge that ends a state. A unit
// result stays readable during the following state (and longer while the unit
// is idle). g is valid from the end of state 10 until ADD0 finishes state 0 of
// the next candidate. The measured and reference currents are latched when
// load = 1. Switch values enter as fixed-point 0 or 1.0.
module cost_datapath_4fu
  import fsmpc_pkg::*;
#(
  parameter int unsigned WL   = 32,
  parameter int unsigned FRAC = WL / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,            // latch i_meas and i_ref
  input  logic signed [WL-1:0] i_meas [3],      // i_u(k), i_v(k), i_w(k)
  input  logic signed [WL-1:0] i_ref  [3],      // i*_u, i*_v, i*_w at k+1
  input  logic signed [WL-1:0] coef_a,
  input  logic signed [WL-1:0] coef_b,
  input  logic signed [WL-1:0] coef_c,
  input  logic signed [WL-1:0] coef_d,
  input  logic [N_SWITCHES-1:0] s,              // candidate switching state
  input  logic [3:0]           state,           // schedule state 0..10
  input  logic                 run,             // a schedule state is active
  input  logic                 first,
  input  logic                 last,
  output logic signed [WL-1:0] g
);

  localparam logic signed [WL-1:0] ONE = WL'(1) << FRAC;

  typedef logic signed [WL-1:0] word_t;

  word_t iu, iv, iw, iur, ivr, iwr;
  word_t su, sv, sw, sx;
  word_t reg1, reg2, reg3;

  word_t add_a [2], add_b [2], add_y [2];
  word_t mul_a [2], mul_b [2], mul_y [2];
  logic  add_en [2], mul_en [2];
  logic  ld1, ld2, ld3;
  word_t d1, d2, d3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iu <= '0; iv <= '0; iw <= '0;
      iur <= '0; ivr <= '0; iwr <= '0;
    end else if (load) begin
      iu  <= i_meas[PH_U]; iv  <= i_meas[PH_V]; iw  <= i_meas[PH_W];
      iur <= i_ref[PH_U];  ivr <= i_ref[PH_V];  iwr <= i_ref[PH_W];
    end
  end

  assign su = s[SW_U] ? ONE : '0;
  assign sv = s[SW_V] ? ONE : '0;
  assign sw = s[SW_W] ? ONE : '0;
  assign sx = s[SW_X] ? ONE : '0;

  // Operand routing and register loads per schedule state.
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      add_en[k] = 1'b0; add_a[k] = '0; add_b[k] = '0;
      mul_en[k] = 1'b0; mul_a[k] = '0; mul_b[k] = '0;
    end
    ld1 = 1'b0; ld2 = 1'b0; ld3 = 1'b0;
    d1 = '0; d2 = '0; d3 = '0;
    unique case (state)
      4'd0: begin
        add_en[0] = 1'b1; add_a[0] = sx;       add_b[0] = su;
        mul_en[0] = 1'b1; mul_a[0] = iv;       mul_b[0] = coef_a;
        mul_en[1] = 1'b1; mul_a[1] = iu;       mul_b[1] = coef_a;
        add_en[1] = 1'b1; add_a[1] = sw;       add_b[1] = sx;
      end
      4'd1: begin  // sum for w = su+sx+sv, sum for u = sw+sx+sv
        add_en[0] = 1'b1; add_a[0] = add_y[0]; add_b[0] = sv;
        mul_en[0] = 1'b1; mul_a[0] = sv;       mul_b[0] = coef_b;
        mul_en[1] = 1'b1; mul_a[1] = su;       mul_b[1] = coef_b;
        add_en[1] = 1'b1; add_a[1] = add_y[1]; add_b[1] = sv;
        ld3 = 1'b1; d3 = add_y[0];             // sx+su
        ld2 = 1'b1; d2 = mul_y[0];             // a*iv
        ld1 = 1'b1; d1 = mul_y[1];             // a*iu
      end
      4'd2: begin
        mul_en[0] = 1'b1; mul_a[0] = add_y[0]; mul_b[0] = coef_c;  // c-term w
        add_en[0] = 1'b1; add_a[0] = reg3;     add_b[0] = sw;      // sum for v
        mul_en[1] = 1'b1; mul_a[1] = add_y[1]; mul_b[1] = coef_c;  // c-term u
        add_en[1] = 1'b1; add_a[1] = reg1;     add_b[1] = mul_y[1]; // a*iu+b*su
        ld1 = 1'b1; d1 = mul_y[0];             // b*sv
      end
      4'd3: begin
        mul_en[0] = 1'b1; mul_a[0] = iw;       mul_b[0] = coef_a;
        mul_en[1] = 1'b1; mul_a[1] = add_y[0]; mul_b[1] = coef_c;  // c-term v
        add_en[0] = 1'b1; add_a[0] = reg1;     add_b[0] = reg2;    // b*sv+a*iv
        add_en[1] = 1'b1; add_a[1] = add_y[1]; add_b[1] = mul_y[1]; // pred u
        ld3 = 1'b1; d3 = mul_y[0];             // c-term w
      end
      4'd4: begin
        add_en[0] = 1'b1; add_a[0] = reg3;     add_b[0] = mul_y[0]; // c-term w + a*iw
        mul_en[0] = 1'b1; mul_a[0] = sw;       mul_b[0] = coef_b;
        add_en[1] = 1'b1; add_a[1] = mul_y[1]; add_b[1] = add_y[0]; // pred v
        mul_en[1] = 1'b1; mul_a[1] = add_y[1]; mul_b[1] = coef_d;   // d*pred u
        ld1 = 1'b1; d1 = add_y[1];             // pred u
      end
      4'd5: begin
        add_en[0] = 1'b1; add_a[0] = add_y[0]; add_b[0] = mul_y[0]; // pred w
        mul_en[0] = 1'b1; mul_a[0] = add_y[1]; mul_b[0] = coef_d;   // d*pred v
        add_en[1] = 1'b1; add_a[1] = iur;      add_b[1] = mul_y[1]; // e_u
        ld2 = 1'b1; d2 = add_y[1];             // pred v
      end
      4'd6: begin
        mul_en[0] = 1'b1; mul_a[0] = add_y[0]; mul_b[0] = coef_d;   // d*pred w
        add_en[0] = 1'b1; add_a[0] = ivr;      add_b[0] = mul_y[0]; // e_v
        add_en[1] = 1'b1; add_a[1] = reg2;     add_b[1] = reg1;     // pred v + pred u
        mul_en[1] = 1'b1; mul_a[1] = add_y[1]; mul_b[1] = add_y[1]; // e_u^2
        ld3 = 1'b1; d3 = add_y[0];             // pred w
      end
      4'd7: begin
        add_en[0] = 1'b1; add_a[0] = iwr;      add_b[0] = mul_y[0]; // e_w
        mul_en[0] = 1'b1; mul_a[0] = add_y[0]; mul_b[0] = add_y[0]; // e_v^2
        add_en[1] = 1'b1; add_a[1] = reg3;     add_b[1] = add_y[1]; // sum of preds
        ld1 = 1'b1; d1 = mul_y[1];             // e_u^2
      end
      4'd8: begin
        mul_en[0] = 1'b1; mul_a[0] = add_y[0]; mul_b[0] = add_y[0]; // e_w^2
        add_en[0] = 1'b1; add_a[0] = mul_y[0]; add_b[0] = reg1;     // e_v^2+e_u^2
        mul_en[1] = 1'b1; mul_a[1] = add_y[1]; mul_b[1] = add_y[1]; // neutral^2
      end
      4'd9: begin
        add_en[0] = 1'b1; add_a[0] = mul_y[0]; add_b[0] = add_y[0];
        ld2 = 1'b1; d2 = mul_y[1];             // neutral^2
      end
      4'd10: begin
        add_en[0] = 1'b1; add_a[0] = add_y[0]; add_b[0] = reg2;     // g
      end
      default: ;
    endcase
    if (!run) begin
      for (int k = 0; k < 2; k++) begin
        add_en[k] = 1'b0;
        mul_en[k] = 1'b0;
      end
      ld1 = 1'b0; ld2 = 1'b0; ld3 = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1 <= '0; reg2 <= '0; reg3 <= '0;
    end else if (last) begin
      if (ld1) reg1 <= d1;
      if (ld2) reg2 <= d2;
      if (ld3) reg3 <= d3;
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_fu
    serial_adder #(.WL(WL)) u_add (
      .clk, .rst_n, .en(add_en[k]), .first, .last, .sub(1'b0),
      .a(add_a[k]), .b(add_b[k]), .y(add_y[k])
    );
    serial_multiplier #(.WL(WL), .FRAC(FRAC)) u_mul (
      .clk, .rst_n, .en(mul_en[k]), .first, .last,
      .a(mul_a[k]), .b(mul_b[k]), .y(mul_y[k])
    );
  end

  assign g = add_y[0];

endmodule
