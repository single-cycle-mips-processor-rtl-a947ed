// tb_mips_top: end-to-end test of the single-cycle processor at its default
// sizes.
//
// A program is loaded through the program port while reset is held. It adds
// the operand pairs 0x000000ff + 0x00000002 and 0xdeadbeef + 0x0000c0fe with
// ADD (exact), ADDC1 and ADDC2, builds 0xdeadbeef with a counted loop of
// doublings (BEQ taken and not taken, J), runs SUB, AND, OR, SLT, stores the
// sums with SW, loads them back with LW and LB and adds them again, and ends
// in a jump-to-self. An instruction-level model in this testbench executes
// the same program; every cycle the PC, the instruction, the ALU result, the
// store strobe and the store data of the processor must match the model, so
// each instruction must complete in exactly one cycle. The sums are also
// checked against constants worked out by hand, and each mechanism (exact,
// ADDC1 and ADDC2 addition with an inexact result, taken and untaken branch,
// jump, word and byte load, store) must occur at least once.
module tb_mips_top;
  import approx_ref_pkg::*;

  logic        clk = 0, rst;
  logic        prog_we;
  logic [5:0]  prog_addr;
  logic [31:0] prog_wdata, pc, instr, alu_result, write_data;
  logic        mem_write;
  logic [1:0]  alu_stages;

  mips_top dut (
    .clk(clk), .rst(rst), .prog_we(prog_we), .prog_addr(prog_addr), .prog_wdata(prog_wdata),
    .pc(pc), .instr(instr), .alu_result(alu_result), .write_data(write_data),
    .mem_write(mem_write), .alu_stages(alu_stages));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- assembler
  function automatic logic [31:0] rtype(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] itype(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] jtype(input int word_addr);
    return {6'h02, 26'(word_addr)};
  endfunction
  localparam logic [5:0] ADD = 6'h20, SUB = 6'h22, AND_ = 6'h24, OR_ = 6'h25, SLT = 6'h2a,
                         ADDC1 = 6'h28, ADDC2 = 6'h29;
  localparam logic [5:0] ADDI = 6'h08, LW = 6'h23, LB = 6'h20, SW = 6'h2b, BEQ = 6'h04;

  logic [31:0] prog [64];
  int nprog;
  int halt_addr;

  task automatic emit(input logic [31:0] w);
    prog[nprog] = w;
    nprog++;
  endtask

  task automatic build_program();
    int loop_at;
    nprog = 0;
    foreach (prog[i]) prog[i] = 32'h0;
    emit(itype(ADDI, 1, 0, 16'h00ff));      // $1 = 0xff
    emit(itype(ADDI, 2, 0, 2));             // $2 = 2
    emit(rtype(ADD,   3, 1, 2));            // $3 = 0x101   exact
    emit(rtype(ADDC1, 4, 1, 2));            // $4 = 0x001   one correction stage
    emit(rtype(ADDC2, 5, 1, 2));            // $5 = 0x001   no correction
    emit(itype(ADDI, 6, 0, 16'h6eae));      // $6 = 0xdeae
    emit(itype(ADDI, 6, 6, 16'h7000));
    emit(itype(ADDI, 11, 0, 16));           // $11 = 16 doublings
    loop_at = nprog;
    emit(rtype(ADD, 6, 6, 6));              // loop: $6 += $6
    emit(itype(ADDI, 11, 11, -1));
    emit(itype(BEQ, 0, 11, 1));             // leave the loop when $11 == 0
    emit(jtype(loop_at));
    emit(itype(ADDI, 6, 6, 16'hbeef));      // $6 = 0xdeadbeef
    emit(itype(ADDI, 7, 0, 16'h60fe));      // $7 = 0xc0fe
    emit(itype(ADDI, 7, 7, 16'h6000));
    emit(rtype(ADD,   8, 6, 7));            // $8  = 0xdeae7fed
    emit(rtype(ADDC1, 9, 6, 7));            // $9  = 0xdeae7fed
    emit(rtype(ADDC2, 10, 6, 7));           // $10 = 0xdeae7fed
    emit(itype(ADDI, 12, 0, -1));           // $12 = 0xffffffff
    emit(itype(ADDI, 13, 0, 16'h0100));
    emit(rtype(ADDC1, 14, 12, 13));         // 0xffffffff + 0x100, 1 stage: 0xffff00ff
    emit(rtype(ADD,   15, 12, 13));         // exact: 0x000000ff
    emit(rtype(SUB, 16, 8, 3));
    emit(rtype(AND_, 17, 6, 7));
    emit(rtype(OR_, 18, 6, 7));
    emit(rtype(SLT, 19, 12, 1));            // -1 < 0xff -> 1
    emit(rtype(SLT, 20, 1, 12));            // 0
    emit(itype(SW, 3, 0, 16'h0010));        // mem[0x10] = 0x101
    emit(itype(SW, 4, 0, 16'h0014));        // mem[0x14] = 0x001
    emit(itype(SW, 8, 0, 16'h0018));        // mem[0x18] = 0xdeae7fed
    emit(itype(LW, 21, 0, 16'h0010));
    emit(itype(LB, 22, 0, 16'h001b));       // byte 3 of 0xdeae7fed: 0xffffffde
    emit(itype(LB, 23, 0, 16'h0019));       // byte 1: 0x7f
    emit(rtype(ADDC2, 24, 21, 2));          // 0x101 + 2, no correction
    emit(itype(BEQ, 21, 3, 1));             // taken: $21 == $3
    emit(rtype(ADD, 25, 0, 0));             // skipped
    emit(rtype(ADD, 26, 22, 23));
    halt_addr = nprog;
    emit(jtype(halt_addr));                 // halt
  endtask

  // --------------------------------------------------- instruction-level model
  logic [31:0] r [32];
  logic [31:0] m [64];
  logic [31:0] mpc;
  int n_exact = 0, n_addc1_inexact = 0, n_addc2_inexact = 0, n_br_taken = 0,
      n_br_not = 0, n_jump = 0, n_lw = 0, n_lb = 0, n_sw = 0, n_addc1 = 0, n_addc2 = 0;
  logic [31:0] seen [32];  // last ALU result per destination register

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL pc=%h %s: %h, expected %h", mpc, what, got, exp);
    end
  endtask

  // Check one cycle of the processor against the model, then step the model.
  task automatic step();
    logic [31:0] w, a, b, simm, res, nextpc, ea;
    logic [5:0] op, fn;
    int rs, rt, rd;
    w = prog[mpc[7:2]];
    op = w[31:26]; fn = w[5:0];
    rs = int'(w[25:21]); rt = int'(w[20:16]); rd = int'(w[15:11]);
    a = r[rs]; b = r[rt];
    simm = {{16{w[15]}}, w[15:0]};
    nextpc = mpc + 4;
    expect_eq("pc", pc, mpc);
    expect_eq("instr", instr, w);
    res = 'x;
    case (op)
      6'h00: begin
        case (fn)
          ADD:   begin res = a + b; n_exact++; end
          ADDC1: begin res = approx_sum(a, b, 1); n_addc1++; if (res != a + b) n_addc1_inexact++; end
          ADDC2: begin res = approx_sum(a, b, 0); n_addc2++; if (res != a + b) n_addc2_inexact++; end
          SUB:   res = a - b;
          AND_:  res = a & b;
          OR_:   res = a | b;
          SLT:   res = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
          default: ;
        endcase
        expect_eq("alu_result", alu_result, res);
        if (rd != 0) begin r[rd] = res; seen[rd] = alu_result; end
      end
      ADDI: begin
        res = a + simm;
        expect_eq("alu_result", alu_result, res);
        if (rt != 0) r[rt] = res;
      end
      LW, LB: begin
        ea = a + simm;
        expect_eq("address", alu_result, ea);
        if (op == LW) begin res = m[ea[7:2]]; n_lw++; end
        else begin
          logic [7:0] by;
          by = m[ea[7:2]][8*ea[1:0] +: 8];
          res = {{24{by[7]}}, by};
          n_lb++;
        end
        if (rt != 0) r[rt] = res;
      end
      SW: begin
        ea = a + simm;
        expect_eq("address", alu_result, ea);
        expect_eq("store data", write_data, b);
        m[ea[7:2]] = b;
        n_sw++;
      end
      BEQ: begin
        expect_eq("alu_result", alu_result, a - b);
        if (a == b) begin nextpc = mpc + 4 + (simm << 2); n_br_taken++; end
        else n_br_not++;
      end
      6'h02: begin
        nextpc = {mpc[31:28], w[25:0], 2'b00};
        n_jump++;
      end
      default: ;
    endcase
    expect_eq("mem_write", 32'(mem_write), 32'(op == SW));
    // Accuracy of the ALU addition: reduced only for ADDC1 and ADDC2.
    if (op != 6'h02)
      expect_eq("alu_stages", 32'(alu_stages),
                (op == 6'h00 && fn == ADDC1) ? 32'd1 : (op == 6'h00 && fn == ADDC2) ? 32'd0 : 32'd3);
    mpc = nextpc;
  endtask

  task automatic mechanism(input string name, input int count);
    checks++;
    $display("  %-34s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    build_program();
    foreach (r[i]) r[i] = '0;
    foreach (m[i]) m[i] = '0;
    rst = 1; prog_we = 0; prog_addr = '0; prog_wdata = '0;
    // Load the whole program memory while reset is held.
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 6'(i); prog_wdata = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    @(negedge clk);
    rst = 0;
    mpc = 0;
    cycles = 0;
    #1;
    while (!(mpc == 32'(halt_addr * 4) && cycles > 0) && cycles < 1000) begin
      step();
      @(posedge clk);
      @(negedge clk);
      cycles++;
    end
    // One instruction per cycle: the model's instruction count is the cycle count.
    expect_eq("pc at halt", pc, 32'(halt_addr * 4));
    // Hand-computed sums from the program (independent of the model).
    expect_eq("ADD 0xff+2", seen[3], 32'h00000101);
    expect_eq("ADDC1 0xff+2", seen[4], 32'h00000001);
    expect_eq("ADDC2 0xff+2", seen[5], 32'h00000001);
    expect_eq("ADD deadbeef+c0fe", seen[8], 32'hdeae7fed);
    expect_eq("ADDC1 deadbeef+c0fe", seen[9], 32'hdeae7fed);
    expect_eq("ADDC2 deadbeef+c0fe", seen[10], 32'hdeae7fed);
    expect_eq("ADDC1 ffffffff+100", seen[14], 32'hffff00ff);
    expect_eq("ADDC2 lw 0x101 + 2", seen[24], 32'h00000103);
    expect_eq("lb sum 0xffffffde + 0x7f", seen[26], 32'h0000005d);
    $display("executed %0d instructions in %0d cycles", cycles, cycles);
    $display("mechanisms:");
    mechanism("exact addition (ADD)", n_exact);
    mechanism("ADDC1 addition", n_addc1);
    mechanism("ADDC2 addition", n_addc2);
    mechanism("ADDC1 inexact result", n_addc1_inexact);
    mechanism("ADDC2 inexact result", n_addc2_inexact);
    mechanism("branch taken", n_br_taken);
    mechanism("branch not taken", n_br_not);
    mechanism("jump", n_jump);
    mechanism("word load", n_lw);
    mechanism("byte load", n_lb);
    mechanism("store", n_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
