// tb_carry_prediction: checks the predicted carries into slices 1..3 of a
// 32-bit adder with 8-bit slices: pred[k] must be the AND of operand bits
// 8k+7. Directed cases for every pattern of the three bit pairs, then random
// operands.
module tb_carry_prediction;
  logic [31:0] a, b;
  logic [2:0] pred, exp;
  int checks = 0, failures = 0;

  carry_prediction #(.SEG_W(8), .NSEG(4)) dut (.a(a), .b(b), .pred(pred));

  task automatic check();
    #1;
    exp = {a[23] && b[23], a[15] && b[15], a[7] && b[7]};
    checks++;
    if (pred !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h pred=%b exp=%b", a, b, pred, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 64; m++) begin
      a = '0; b = '0;
      a[7] = m[0]; a[15] = m[1]; a[23] = m[2];
      b[7] = m[3]; b[15] = m[4]; b[23] = m[5];
      check();
      a = ~a; b = ~b;  // same MSB pattern inverted, all other bits set
      check();
    end
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
