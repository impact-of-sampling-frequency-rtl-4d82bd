// serial_multiplier: shift-add multiplier functional unit for signed
// fixed-point numbers of WL bits with FRAC fractional bits.
//
// One operation takes exactly WL clock cycles: each cycle examines one bit of
// |b| (least significant first) and adds |a| to the upper half of a 2*WL-bit
// partial product that shifts right. The operands are taken from a and b on
// the first cycle of a state (first = 1). On the last cycle (last = 1) the
// magnitude is shifted right by FRAC (truncation toward zero), given the sign
// a[WL-1] ^ b[WL-1], saturated to the WL-bit range and written to y, which
// holds until the unit's next operation ends. The unit only works in cycles
// with en = 1. The WL-cycle timing follows the statement that a state takes
// about WL cycles; the shift-add method, rounding and saturation are choices
// of this design.
module serial_multiplier #(
  parameter int unsigned WL   = 32,
  parameter int unsigned FRAC = WL / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [WL-1:0] a,
  input  logic signed [WL-1:0] b,
  output logic signed [WL-1:0] y
);

  localparam logic signed [WL-1:0] MAXV = {1'b0, {(WL-1){1'b1}}};
  localparam logic signed [WL-1:0] MINV = {1'b1, {(WL-1){1'b0}}};
  localparam logic [2*WL-1:0] MAXMAG = {{(WL+1){1'b0}}, {(WL-1){1'b1}}};
  localparam logic [2*WL-1:0] MINMAG = {{WL{1'b0}}, 1'b1, {(WL-1){1'b0}}};

  logic [WL-1:0] mag_a, hi, lo;
  logic          neg;

  logic [WL-1:0]   cur_ma, cur_hi, cur_lo;
  logic            cur_neg;
  logic [WL:0]     psum;
  logic [2*WL-1:0] prod, mag;
  logic [WL-1:0]   res;

  always_comb begin
    cur_ma  = first ? (a[WL-1] ? WL'(-a) : WL'(a)) : mag_a;
    cur_lo  = first ? (b[WL-1] ? WL'(-b) : WL'(b)) : lo;
    cur_hi  = first ? '0 : hi;
    cur_neg = first ? (a[WL-1] ^ b[WL-1]) : neg;
    psum    = {1'b0, cur_hi} + (cur_lo[0] ? {1'b0, cur_ma} : '0);
    prod    = {psum, cur_lo[WL-1:1]};
    mag     = prod >> FRAC;
    if (cur_neg) res = (mag > MINMAG) ? MINV : WL'(-mag[WL-1:0]);
    else         res = (mag > MAXMAG) ? MAXV : mag[WL-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag_a <= '0;
      hi    <= '0;
      lo    <= '0;
      neg   <= 1'b0;
      y     <= '0;
    end else if (en) begin
      mag_a <= cur_ma;
      hi    <= psum[WL:1];
      lo    <= {psum[0], cur_lo[WL-1:1]};
      neg   <= cur_neg;
      if (last) y <= res;
    end
  end

endmodule
