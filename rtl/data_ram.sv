// data_ram: 255 x 64-bit data memory.
//
// A write stores wr_data at addr on the rising clock edge when we is high.
// The read side is a register loaded on the falling edge: rd_data shows the
// word at addr half a cycle after the address is applied, so a single-cycle
// datapath can present an address early in a cycle and catch the data at the
// next rising edge. Because reads happen on the falling edge and writes on the
// rising edge, a location is never read and written at the same instant.
// Addresses at or above DEPTH read as zero and ignore writes.
//
// The word count, the width and the edge assignment follow the datasheet.
// The memory cells are not reset (their contents are unknown until written);
// the output register is cleared by the asynchronous active-high reset. Both
// are this design's choices.
module data_ram
  import legv8_pkg::*;
#(
  parameter int unsigned W     = XLEN,
  parameter int unsigned DEPTH = 255,
  parameter int unsigned AW    = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wr_data,
  output logic [W-1:0]  rd_data
);

  logic [W-1:0] mem [DEPTH];
  logic         in_range;

  assign in_range = (32'(addr) < DEPTH);

  always_ff @(posedge clk) begin
    if (we && in_range) mem[addr] <= wr_data;
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst)           rd_data <= '0;
    else if (in_range) rd_data <= mem[addr];
    else               rd_data <= '0;
  end

endmodule
