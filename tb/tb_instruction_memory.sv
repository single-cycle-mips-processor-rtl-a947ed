// tb_instruction_memory: loads random words through the program port and
// reads them back at byte addresses (word address times 4 plus a random
// low two bits, which must be ignored).
module tb_instruction_memory;
  logic clk = 0, prog_we;
  logic [5:0] prog_addr;
  logic [31:0] prog_wdata, addr, rdata;
  logic [31:0] shadow [64];
  int checks = 0, failures = 0;

  instruction_memory #(.DEPTH(64)) dut (
    .clk(clk), .prog_we(prog_we), .prog_addr(prog_addr), .prog_wdata(prog_wdata),
    .addr(addr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; prog_addr = 0; prog_wdata = 0; addr = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 6'(i); prog_wdata = $urandom; shadow[i] = prog_wdata;
    end
    @(negedge clk);
    prog_we = 0;
    for (int i = 0; i < 500; i++) begin
      int w;
      w = $urandom_range(0, 63);
      addr = 32'(w * 4 + $urandom_range(0, 3));
      #1;
      checks++;
      if (rdata !== shadow[w]) begin failures++; $display("FAIL word %0d: %h exp %h", w, rdata, shadow[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
