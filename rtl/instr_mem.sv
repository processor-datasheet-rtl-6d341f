// instr_mem: instruction memory, DEPTH words of 32 bits.
//
// The read port is combinational and word addressed by the byte address on
// pc (bits [AW+1:2]); addresses beyond the memory read as zero, which the
// control unit decodes as no operation. A write port loads the program one
// word at a time at the rising clock edge (load_addr is a word index).
//
// The datasheet names the instruction memory and its place between the PC
// and the register file; the depth, the load port and the out-of-range
// behaviour are this design's choices.
module instr_mem
  import legv8_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic [XLEN-1:0] pc,
  output logic [ILEN-1:0] instr,
  input  logic            load_en,
  input  logic [AW-1:0]   load_addr,
  input  logic [ILEN-1:0] load_data
);

  logic [ILEN-1:0] mem [DEPTH];
  logic [AW-1:0]   widx;

  assign widx = pc[AW+1:2];

  always_ff @(posedge clk) begin
    if (load_en) mem[load_addr] <= load_data;
  end

  assign instr = (pc[XLEN-1:AW+2] == '0) ? mem[widx] : '0;

endmodule
