// tb_data_memory: writes random words, then reads them back as words (LW)
// and as sign-extended bytes (LB, byte 0 = bits 7:0), and checks that a
// cycle with we clear leaves the memory unchanged.
module tb_data_memory;
  logic clk = 0, we, load_byte;
  logic [31:0] addr, wdata, rdata, exp;
  logic [31:0] shadow [64];
  int checks = 0, failures = 0;

  data_memory #(.DEPTH(64)) dut (
    .clk(clk), .we(we), .load_byte(load_byte), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; load_byte = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(i * 4); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk);
    we = 0; addr = 32'h0; wdata = 32'hffffffff;  // no write
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      int w, bsel;
      logic [7:0] by;
      w = $urandom_range(0, 63);
      bsel = $urandom_range(0, 3);
      load_byte = 1'($urandom);
      addr = 32'(w * 4 + bsel);
      by = shadow[w][8*bsel +: 8];
      exp = load_byte ? {{24{by[7]}}, by} : shadow[w];
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h lb=%b: %h exp %h", addr, load_byte, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
