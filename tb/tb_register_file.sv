// tb_register_file: checks the register file against a shadow array:
// reset clears every register, writes land one clock later, register 0
// stays zero, both read ports work, and a write with we clear changes nothing.
module tb_register_file;
  logic clk = 0, rst, we;
  logic [4:0] wa, ra1, ra2;
  logic [31:0] wd, rd1, rd2;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  register_file #(.W(32), .NREG(32)) dut (
    .clk(clk), .rst(rst), .we(we), .wa(wa), .wd(wd),
    .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input logic [4:0] r1, input logic [4:0] r2);
    ra1 = r1; ra2 = r2;
    #1;
    checks += 2;
    if (rd1 !== shadow[r1]) begin failures++; $display("FAIL rd1 r%0d=%h exp %h", r1, rd1, shadow[r1]); end
    if (rd2 !== shadow[r2]) begin failures++; $display("FAIL rd2 r%0d=%h exp %h", r2, rd2, shadow[r2]); end
  endtask

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0;
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int r = 0; r < 32; r++) read_check(5'(r), 5'(31 - r));
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      @(negedge clk);
      we = 0;
      read_check(5'($urandom), wa);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
