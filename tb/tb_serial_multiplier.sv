// tb_serial_multiplier: self-checking test of the shift-add multiplier.
// Back-to-back WL-cycle products of random and corner operands are compared
// with a saturating fixed-point integer model (truncation toward zero after
// the FRAC shift); y must hold its previous value until the WL-th cycle.
module tb_serial_multiplier;
  import tb_fsmpc_ref_pkg::*;

  localparam int WL = 32;
  localparam int FRAC = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, first, last;
  logic signed [WL-1:0] a, b, y;
  int checks = 0, failures = 0;

  serial_multiplier #(.WL(WL), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_op(input logic signed [WL-1:0] ta, input logic signed [WL-1:0] tb);
    longint expv;
    logic signed [WL-1:0] prev;
    prev = y;
    expv = q_mul(longint'(ta), longint'(tb), WL, FRAC);
    for (int c = 0; c < WL; c++) begin
      en = 1'b1; first = (c == 0); last = (c == WL - 1);
      a = (c == 0) ? ta : WL'($urandom);
      b = (c == 0) ? tb : WL'($urandom);
      @(posedge clk); #1;
      if (c < WL - 1) begin
        checks++;
        if (y !== prev) begin failures++; $display("FAIL hold at cycle %0d", c); end
      end
    end
    checks++;
    if (longint'(y) != expv) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d exp %0d", ta, tb, y, expv);
    end
  endtask

  initial begin
    logic signed [WL-1:0] corner [8];
    corner = '{32'sh7fffffff, 32'sh80000000, 0, 1, -1, 32'sh00010000, -32'sh00010000,
               32'sh00018000};
    en = 1'b0; first = 1'b0; last = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (corner[p]) foreach (corner[q]) do_op(corner[p], corner[q]);
    repeat (300) do_op(WL'($urandom), WL'($urandom));
    // Values in the working range of the controller (|x| < 128).
    repeat (300) do_op(WL'($signed($urandom) >>> 8), WL'($signed($urandom) >>> 8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
