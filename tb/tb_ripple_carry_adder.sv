// tb_ripple_carry_adder: checks the 32-bit ripple-carry adder against a
// 33-bit integer sum on random operands, full-length carry chains and
// carry in 0 and 1.
module tb_ripple_carry_adder;
  logic [31:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(32)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check();
    logic [32:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + {32'b0, cin};
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%b -> %h", a, b, cin, {cout, s});
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'hffffffff; b = 32'h0; cin = 1'b1; check();
    a = 32'h7fffffff; b = 32'h1; cin = 1'b0; check();
    a = 32'h0; b = 32'h4; cin = 1'b0; check();
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (i % 4 == 0) b = ~a;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
