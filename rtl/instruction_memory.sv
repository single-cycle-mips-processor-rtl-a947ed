// instruction_memory: program memory of the single-cycle processor.
//
// DEPTH words of 32 bits, read combinationally at the word address
// addr[AW+1:2] (the byte address from the PC with its two low bits dropped;
// addresses beyond DEPTH words wrap). The program is written before it runs
// through a simple load port: prog_we writes prog_wdata to word prog_addr on
// the rising clock edge. The memory is not cleared at reset.
//
// The depth and the program-load port are this design's choices.
module instruction_memory #(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [31:0]   prog_wdata,
  input  logic [31:0]   addr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
