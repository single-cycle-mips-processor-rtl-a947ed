// tb_approx_adder: checks the 32-bit approximate adder.
//
// Directed cases: 0x000000ff + 0x00000002, which needs the carry out of the
// lowest slice, gives 0x00000001 with one correction stage and 0x00000101
// with full correction; 0xdeadbeef + 0x0000c0fe gives 0xdeae7fed at both
// settings. Then random and carry-heavy operands at every stage count: full
// correction must equal a + b, every setting must match the slice-by-slice
// reference model, and the number of inexact sums seen is counted (it must
// be non-zero without full correction).
module tb_approx_adder;
  import approx_ref_pkg::*;
  logic [31:0] a, b, s;
  logic [1:0] stages;
  int checks = 0, failures = 0, inexact = 0;

  approx_adder #(.SEG_W(8), .NSEG(4)) dut (.a(a), .b(b), .stages(stages), .s(s));

  task automatic check(input logic [31:0] exp);
    #1;
    checks++;
    if (s !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h stages=%0d: %h, expected %h", a, b, stages, s, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h000000ff; b = 32'h00000002;
    stages = 2'd1; check(32'h00000001);
    stages = 2'd3; check(32'h00000101);
    stages = 2'd0; check(32'h00000001);
    a = 32'hdeadbeef; b = 32'h0000c0fe;
    stages = 2'd1; check(32'hdeae7fed);
    stages = 2'd3; check(32'hdeae7fed);
    // carry chain through all slices: only full correction is exact
    a = 32'h00ffffff; b = 32'h00000001;
    stages = 2'd3; check(32'h01000000);
    stages = 2'd2; check(32'h00ffff00);
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = $urandom;
      if (i % 4 == 1) b = ~a + 32'($urandom_range(0, 2));  // long carry chains
      for (int n = 0; n < 4; n++) begin
        stages = 2'(n);
        check(approx_sum(a, b, n));
        if (n == 3) check(a + b);
        else if (s != a + b) inexact++;
      end
    end
    checks++;
    if (inexact == 0) begin
      failures++;
      $display("FAIL no inexact approximate sum seen");
    end
    $display("inexact approximate sums: %0d", inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
