// tb_serial_adder: self-checking test of the bit-serial adder/subtractor.
// Runs back-to-back WL-cycle operations (random and corner operands, add and
// subtract), checks every result against saturating integer arithmetic,
// checks that y changes exactly at the end of the WL-th cycle and holds its
// previous value while the next operation is in progress, and that an idle
// unit (en = 0) keeps its result.
module tb_serial_adder;
  import tb_fsmpc_ref_pkg::*;

  localparam int WL = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, first, last, sub;
  logic signed [WL-1:0] a, b, y;
  int checks = 0, failures = 0;

  serial_adder #(.WL(WL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_op(input logic signed [WL-1:0] ta, input logic signed [WL-1:0] tb,
                       input logic tsub);
    longint expv;
    logic signed [WL-1:0] prev;
    prev = y;
    expv = tsub ? q_sub(longint'(ta), longint'(tb), WL) : q_add(longint'(ta), longint'(tb), WL);
    for (int c = 0; c < WL; c++) begin
      en = 1'b1; first = (c == 0); last = (c == WL - 1);
      sub = tsub;
      // Operands only need to be valid on the first cycle.
      a = (c == 0) ? ta : WL'($urandom);
      b = (c == 0) ? tb : WL'($urandom);
      @(posedge clk); #1;
      if (c < WL - 1) begin
        checks++;
        if (y !== prev) begin
          failures++;
          $display("FAIL hold: cycle %0d y=%0d prev=%0d", c, y, prev);
        end
      end
    end
    checks++;
    if (longint'(y) != expv) begin
      failures++;
      $display("FAIL %0d %s %0d: got %0d exp %0d", ta, tsub ? "-" : "+", tb, y, expv);
    end
  endtask

  initial begin
    logic signed [WL-1:0] corner [6];
    corner = '{32'sh7fffffff, 32'sh80000000, 0, 1, -1, 32'sh40000000};
    en = 1'b0; first = 1'b0; last = 1'b0; sub = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (corner[p]) foreach (corner[q]) begin
      do_op(corner[p], corner[q], 1'b0);
      do_op(corner[p], corner[q], 1'b1);
    end
    repeat (300) do_op(WL'($urandom), WL'($urandom), 1'($urandom));
    repeat (200) do_op(WL'($signed($urandom) >>> 8), WL'($signed($urandom) >>> 8),
                       1'($urandom));
    // Idle unit keeps its result.
    begin
      logic signed [WL-1:0] keep;
      keep = y;
      en = 1'b0; first = 1'b1; last = 1'b1; a = 5; b = 7;
      repeat (5) @(posedge clk);
      #1;
      checks++;
      if (y !== keep) begin failures++; $display("FAIL idle changed y"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
