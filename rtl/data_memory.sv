// data_memory: data memory of the single-cycle processor.
//
// DEPTH words of 32 bits, byte addressed, word address addr[AW+1:2]
// (addresses beyond DEPTH words wrap). Reads are combinational: with
// load_byte clear the whole word is returned (LW); with load_byte set the byte
// selected by addr[1:0] is returned sign-extended (LB), byte 0 being bits 7:0
// (little-endian byte order). Stores write a whole word on the rising clock
// edge when we is set (SW). The memory is not cleared at reset.
//
// LB is supported because byte loads are named as needing exact addresses;
// the depth, byte order and word-only stores are this design's choices.
module data_memory #(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        we,
  input  logic        load_byte,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  logic [31:0] mem [DEPTH];
  logic [31:0] word;
  logic [7:0]  byte_sel;

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign word     = mem[addr[AW+1:2]];
  assign byte_sel = word[8*addr[1:0] +: 8];
  assign rdata    = load_byte ? {{24{byte_sel[7]}}, byte_sel} : word;

endmodule
