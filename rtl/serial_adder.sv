// serial_adder: bit-serial adder/subtractor functional unit.
//
// One operation takes exactly WL clock cycles, one result bit per cycle,
// least significant bit first, so that a datapath state built from these
// units lasts WL cycles. On the first cycle of a state (first = 1) the unit
// takes its operands straight from a and b and processes bit 0; later cycles
// work on internal shift registers, so a and b only need to be valid in the
// first cycle. On the last cycle (last = 1) the full sum is written to y with
// two's-complement saturation; y then holds until the unit's next operation
// ends, which lets the next state read it. sub = 1 computes a - b (inverted b,
// carry-in 1). The unit only works in cycles with en = 1. The serial
// organisation follows the statement that a state takes about WL cycles;
// subtraction and saturation are choices of this design.
module serial_adder #(
  parameter int unsigned WL = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,     // unit is scheduled in this state
  input  logic                 first,  // first cycle of the state
  input  logic                 last,   // last cycle of the state
  input  logic                 sub,    // 1: a - b, 0: a + b (sampled on first)
  input  logic signed [WL-1:0] a,
  input  logic signed [WL-1:0] b,
  output logic signed [WL-1:0] y
);

  localparam logic signed [WL-1:0] MAXV = {1'b0, {(WL-1){1'b1}}};
  localparam logic signed [WL-1:0] MINV = {1'b1, {(WL-1){1'b0}}};

  logic [WL-1:0] sh_a, sh_b;
  logic [WL-2:0] acc;              // result bits produced so far
  logic          carry, sign_a, sign_b;

  logic [WL-1:0] cur_a, cur_b, full;
  logic          cur_c, cur_sa, cur_sb, sbit, cout, ovf;

  always_comb begin
    cur_a  = first ? a : sh_a;
    cur_b  = first ? (sub ? ~b : b) : sh_b;
    cur_c  = first ? sub : carry;
    cur_sa = first ? a[WL-1] : sign_a;
    cur_sb = first ? (b[WL-1] ^ sub) : sign_b;
    sbit   = cur_a[0] ^ cur_b[0] ^ cur_c;
    cout   = (cur_a[0] & cur_b[0]) | (cur_c & (cur_a[0] ^ cur_b[0]));
    full   = {sbit, acc};
    ovf    = (cur_sa == cur_sb) && (full[WL-1] != cur_sa);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_a   <= '0;
      sh_b   <= '0;
      acc    <= '0;
      carry  <= 1'b0;
      sign_a <= 1'b0;
      sign_b <= 1'b0;
      y      <= '0;
    end else if (en) begin
      sh_a   <= cur_a >> 1;
      sh_b   <= cur_b >> 1;
      acc    <= full[WL-1:1];
      carry  <= cout;
      sign_a <= cur_sa;
      sign_b <= cur_sb;
      if (last) y <= ovf ? (cur_sa ? MINV : MAXV) : full;
    end
  end

endmodule
