// tb_correction_unit: checks the correction unit on its own.
//
// The testbench builds the unit's inputs itself from random operands: the
// raw sum of four 8-bit slices with predicted carries, the slice carry outs
// (kill) and the predictions. The corrected result must equal the reference
// model at each stage count, and a + b at full correction. The figure cases
// 0xff + 0x02 and 0xdeadbeef + 0x0000c0fe are included.
module tb_correction_unit;
  import approx_ref_pkg::*;
  logic [31:0] s, res, a, b;
  logic [2:0] kill, pred;
  logic [1:0] stages;
  int checks = 0, failures = 0;

  correction_unit #(.SEG_W(8), .NSEG(4)) dut (
    .kill(kill), .pred(pred), .s(s), .stages(stages), .res(res));

  task automatic drive();
    int unsigned cin, t;
    cin = 0;
    for (int k = 0; k < 4; k++) begin
      t = int'(a[8*k +: 8]) + int'(b[8*k +: 8]) + cin;
      s[8*k +: 8] = t[7:0];
      if (k < 3) begin
        kill[k] = t[8];
        pred[k] = a[8*k+7] & b[8*k+7];
        cin = {31'b0, pred[k]};
      end
    end
  endtask

  task automatic check(input logic [31:0] exp);
    #1;
    checks++;
    if (res !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h stages=%0d: %h, expected %h", a, b, stages, res, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h000000ff; b = 32'h00000002; drive();
    stages = 2'd1; check(32'h00000001);
    stages = 2'd3; check(32'h00000101);
    a = 32'hdeadbeef; b = 32'h0000c0fe; drive();
    stages = 2'd1; check(32'hdeae7fed);
    stages = 2'd3; check(32'hdeae7fed);
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = $urandom;
      if (i % 3 == 1) b = ~a + 32'($urandom_range(0, 2));
      drive();
      for (int n = 0; n < 4; n++) begin
        stages = 2'(n);
        check(n == 3 ? a + b : approx_sum(a, b, n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
