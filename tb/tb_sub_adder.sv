// tb_sub_adder: checks the 8-bit sub-adder exhaustively over both operands
// for carry in 0 and 1 against an integer sum.
module tb_sub_adder;
  logic [7:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  sub_adder #(.W(8)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          int unsigned exp;
          a = 8'(i); b = 8'(j); cin = c[0];
          #1;
          exp = i + j + c;
          checks++;
          if ({cout, s} !== 9'(exp)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d -> %0d", i, j, c, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
