// tb_pc_register: checks that reset loads address 0 and that the register
// takes pc_next at each rising edge and holds it in between.
module tb_pc_register;
  logic clk = 0, rst;
  logic [31:0] pc_next, pc;
  int checks = 0, failures = 0;

  pc_register #(.W(32)) dut (.clk(clk), .rst(rst), .pc_next(pc_next), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pc_next = 32'h1234;
    @(negedge clk);
    checks++;
    if (pc !== 32'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      logic [31:0] v;
      v = $urandom;
      pc_next = v;
      @(negedge clk);
      pc_next = ~v;  // must not show before the next edge
      #1;
      checks++;
      if (pc !== v) begin failures++; $display("FAIL pc=%h exp %h", pc, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
